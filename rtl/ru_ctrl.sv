// ru_ctrl: control of the reconfigurable unit (RU), as seen by the embedded CPU.
//
// The embedded CPU configures the RU through a small register file and then
// triggers it; the RU interrupts the host when the results are in the
// on-device DRAM. Register map (32-bit words, index = cpu_addr):
//   0 CTRL    write: bit0 start a job, bit1 clear the interrupt (host ack)
//             read : bit0 busy, bit1 irq, bits 15:8 enabled cells
//   1 MODE    bit0 mode (0 regular, 1 ISP), bits 2:1 application
//   2 NSEL    cells to enable; 0 = let the channel planner decide
//   3 LEN     bytes per channel          4 THRESH  Binarization threshold
//   5 WIDTH   Sobel tile width           6 ITERS   K-Means iterations
//   7 RESBASE first result line          8 CENLINE line for K-Means centres
//   9..14     planner: P0, P1, BUDGET (mW), BW, HOST (MB/s), BETA (1/1000)
//  15 PLANEN  bit0 power constraint, bit1 bandwidth constraint
//  16..20     regular mode: DIR, NWORDS, NVM address, DRAM line, channel
//  21 CENW    write: bits 15:8 centre element, 7:0 value (local memory)
//  22 CYCLES  read: cycles the last job took
//  23 PLAN    read: {n_bw[23:16], n_power[15:8], n[7:0]} from the planner
// A job in ISP mode: choose n (NSEL or planner), let the channel mapper form
// the groups, start every enabled processing cell, wait for all of them and
// for the result lines to drain; for K-Means clear the cells' accumulators
// before and run the public cell's reduction after each of ITERS passes. A
// job in regular mode runs one regular-path transfer. While a job runs the RU
// owns the global memory; afterwards the host does and irq is raised.
// The steps follow the reference's six-step flow; register map and
// encodings are this design's choices. Reconfiguration itself (loading a
// bitstream) is outside the RU: here `app` selects an already present kernel.
module ru_ctrl
  import risp_pkg::*;
#(
  parameter int unsigned N_CH = N_CH_DEF,
  localparam int unsigned CHW = clog2_min1(N_CH),
  localparam int unsigned NW  = $clog2(N_CH + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // embedded CPU register port
  input  logic            cpu_we,
  input  logic [4:0]      cpu_addr,
  input  logic [31:0]     cpu_wdata,
  output logic [31:0]     cpu_rdata,
  // configuration to the datapath
  output mode_e           mode,
  output app_e            app,
  output logic [31:0]     len_bytes,
  output logic [7:0]      threshold,
  output logic [15:0]     img_width,
  output logic [31:0]     res_base,
  output logic [31:0]     cen_line,
  output logic            cen_we,
  output logic [7:0]      cen_widx,
  output logic [7:0]      cen_wdata,
  // channel groups
  output logic [N_CH-1:0] starts,
  output logic [CHW-1:0]  owner [N_CH],
  output logic [NW-1:0]   n_active,
  // processing cells and public cell
  output logic            cell_go,
  output logic            clr_acc,
  input  logic [N_CH-1:0] cell_done,
  input  logic            lines_pending,
  output logic            reduce,
  input  logic            reduce_done,
  // regular path
  output logic            rp_start,
  output logic            rp_dir,
  output logic [31:0]     rp_nwords,
  output logic [31:0]     rp_nvm_addr,
  output logic [31:0]     rp_gm_line,
  output logic [CHW-1:0]  rp_ch,
  input  logic            rp_done,
  // status
  output logic            busy,
  output logic            ru_owns,
  output logic            irq
);
  logic [31:0] regs [32];

  typedef enum logic [3:0] {
    C_IDLE, C_MAPW, C_CLR, C_GO, C_WAIT, C_REDW, C_REG, C_FIN
  } cstate_e;
  cstate_e cs;
  logic [31:0] iter, cycles;

  // ---- channel planner and mapper ---------------------------------------------
  logic [NW-1:0] n_power, n_bw, n_plan;
  logic map_start, map_busy, map_done;

  chan_planner #(.N_CH(N_CH)) u_plan (
    .clk, .rst_n,
    .use_power(regs[15][0]), .use_bw(regs[15][1]),
    .p0_mw(regs[9][15:0]), .p1_mw(regs[10][15:0]), .budget_mw(regs[11][15:0]),
    .bw_mbps(regs[12][15:0]), .host_mbps(regs[13][15:0]), .beta_milli(regs[14][15:0]),
    .n_power, .n_bw, .n_sel(n_plan));

  assign n_active = (regs[2] != 0) ? NW'(regs[2]) : n_plan;

  chan_mapper #(.N_CH(N_CH)) u_map (
    .clk, .rst_n, .start(map_start), .n_active, .starts, .owner,
    .busy(map_busy), .done(map_done));

  // ---- configuration outputs ----------------------------------------------------
  assign mode        = mode_e'(regs[1][0]);
  assign app         = app_e'(regs[1][2:1]);
  assign len_bytes   = regs[3];
  assign threshold   = regs[4][7:0];
  assign img_width   = regs[5][15:0];
  assign res_base    = regs[7];
  assign cen_line    = regs[8];
  assign rp_dir      = regs[16][0];
  assign rp_nwords   = regs[17];
  assign rp_nvm_addr = regs[18];
  assign rp_gm_line  = regs[19];
  assign rp_ch       = CHW'(regs[20]);
  assign cen_we      = cpu_we && cpu_addr == 5'd21;
  assign cen_widx    = cpu_wdata[15:8];
  assign cen_wdata   = cpu_wdata[7:0];

  assign busy    = (cs != C_IDLE);
  assign ru_owns = busy;

  always_comb begin
    unique case (cpu_addr)
      5'd0:    cpu_rdata = {16'd0, 8'(n_active), 6'd0, irq, busy};
      5'd22:   cpu_rdata = cycles;
      5'd23:   cpu_rdata = {8'd0, 8'(n_bw), 8'(n_power), 8'(n_plan)};
      default: cpu_rdata = regs[cpu_addr];
    endcase
  end

  logic start_cmd;
  assign start_cmd = cpu_we && cpu_addr == 5'd0 && cpu_wdata[0];

  // ---- register file -------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
      regs[1]  <= 32'(MODE_ISP);
      regs[5]  <= 32'(SOBEL_MAX_W);
      regs[6]  <= 32'd1;
      regs[15] <= 32'd3;
    end else if (cpu_we && cpu_addr != 5'd0 && cpu_addr != 5'd21 && !busy) begin
      regs[cpu_addr] <= cpu_wdata;
    end
  end

  // ---- job sequencer ---------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs        <= C_IDLE;
      iter      <= '0;
      cycles    <= '0;
      irq       <= 1'b0;
      map_start <= 1'b0;
      cell_go   <= 1'b0;
      clr_acc   <= 1'b0;
      reduce    <= 1'b0;
      rp_start  <= 1'b0;
    end else begin
      map_start <= 1'b0;
      cell_go   <= 1'b0;
      clr_acc   <= 1'b0;
      reduce    <= 1'b0;
      rp_start  <= 1'b0;
      if (cpu_we && cpu_addr == 5'd0 && cpu_wdata[1]) irq <= 1'b0;
      if (busy) cycles <= cycles + 1'b1;
      unique case (cs)
        C_IDLE: if (start_cmd) begin
          cycles <= '0;
          irq    <= 1'b0;
          if (mode == MODE_ISP) begin
            map_start <= 1'b1;
            cs        <= C_MAPW;
          end else begin
            rp_start <= 1'b1;
            cs       <= C_REG;
          end
        end
        C_MAPW: if (map_done) begin
          iter    <= '0;
          clr_acc <= 1'b1;
          cs      <= C_CLR;
        end
        C_CLR: begin
          cell_go <= 1'b1;
          cs      <= C_GO;
        end
        C_GO: cs <= C_WAIT;
        C_WAIT: if (((cell_done & starts) == starts) && !lines_pending) begin
          if (app == APP_KMEANS) begin
            reduce <= 1'b1;
            cs     <= C_REDW;
          end else begin
            cs <= C_FIN;
          end
        end
        C_REDW: if (reduce_done) begin
          iter <= iter + 1'b1;
          if (iter + 1 >= regs[6]) cs <= C_FIN;
          else begin
            clr_acc <= 1'b1;
            cs      <= C_CLR;
          end
        end
        C_REG: if (rp_done) cs <= C_FIN;
        C_FIN: begin
          irq <= 1'b1;
          cs  <= C_IDLE;
        end
        default: cs <= C_IDLE;
      endcase
    end
  end

  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n)
    map_start |-> !map_busy);
endmodule
