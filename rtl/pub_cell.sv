// pub_cell: public processing cell, shared by all RISP channels.
//
// It is the coordinator of the reconfigurable unit:
//  * Aggregation: every processing cell offers finished 128-byte result lines;
//    a round-robin arbiter moves one line per cycle into global memory (the
//    on-device DRAM), so no cell is starved.
//  * K-Means reduction: on `reduce` it adds the private per-cluster sums and
//    counts of every enabled cell (one cell per cycle), divides each feature
//    sum by its cluster count (sequential divider, 32 cycles per division; a
//    cluster with no points keeps its centre), stores the new centres in the
//    local memory and writes them as one line to global memory at cen_line.
//    reduce_done pulses when that line is written.
//  * Local memory: the centre table, read by every cell in parallel and
//    written by the embedded CPU (cen_we) when it initialises a job.
// The three roles follow the reference; the round-robin policy, the reduction
// order and the centre line layout (byte k*KM_DIM+d is centre k, feature d)
// are this design's choices.
module pub_cell
  import risp_pkg::*;
#(
  parameter int unsigned N_CH  = N_CH_DEF,
  parameter int unsigned GM_AW = 12,
  localparam int unsigned CHW  = clog2_min1(N_CH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // result lines from the processing cells
  input  logic [N_CH-1:0]       line_valid,
  input  logic [GM_AW-1:0]      line_addr [N_CH],
  input  logic [LINE_W-1:0]     line_data [N_CH],
  input  logic [LINE_BYTES-1:0] line_mask [N_CH],
  output logic [N_CH-1:0]       line_ready,
  // global-memory write port
  output logic                  gm_req,
  output logic [GM_AW-1:0]      gm_addr,
  output logic [LINE_W-1:0]     gm_wdata,
  output logic [LINE_BYTES-1:0] gm_wmask,
  input  logic                  gm_gnt,
  // K-Means reduction
  input  logic [N_CH-1:0]       starts,
  input  logic [KM_SUM_W-1:0]   cell_sums [N_CH][KM_NSUM],
  input  logic                  reduce,
  input  logic [GM_AW-1:0]      cen_line,
  output logic                  reduce_done,
  // local memory: centre table
  input  logic                  cen_we,
  input  logic [$clog2(KM_K*KM_DIM)-1:0] cen_widx,
  input  logic [7:0]            cen_wdata,
  output logic [KM_K*KM_DIM*8-1:0] centers
);
  localparam int unsigned NC = KM_K * KM_DIM;

  // ---------------- reduction state machine ----------------------------------
  typedef enum logic [2:0] {R_IDLE, R_SUM, R_DIV, R_WAIT, R_WRITE} rstate_e;
  rstate_e rstate;
  logic [CHW-1:0] rp;
  logic [KM_SUM_W-1:0] acc [KM_NSUM];
  logic [$clog2(NC)-1:0] di;       // centre element being divided
  logic div_start, div_busy, div_done;
  logic [KM_SUM_W-1:0] div_q;
  logic [KM_SUM_W-1:0] div_num, div_den;

  always_comb begin
    div_num = acc[(int'(di) / KM_DIM) * (KM_DIM + 1) + int'(di) % KM_DIM];
    div_den = acc[(int'(di) / KM_DIM) * (KM_DIM + 1) + KM_DIM];
  end

  udiv_seq #(.W(KM_SUM_W)) u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(div_den),
    .busy(div_busy), .done(div_done), .quot(div_q));

  // ---------------- line arbitration -----------------------------------------
  logic [CHW-1:0] rr_last;
  logic           any_line;
  logic [CHW-1:0] sel;
  always_comb begin
    any_line = 1'b0;
    sel      = '0;
    for (int k = N_CH; k >= 1; k--) begin
      int unsigned p;
      p = (int'(rr_last) + k) % N_CH;
      if (line_valid[p]) begin
        any_line = 1'b1;
        sel      = CHW'(p);
      end
    end
  end

  logic cen_wr_req;
  assign cen_wr_req = (rstate == R_WRITE);

  always_comb begin
    line_ready = '0;
    if (cen_wr_req) begin
      gm_req   = 1'b1;
      gm_addr  = cen_line;
      gm_wdata = LINE_W'(centers);
      gm_wmask = LINE_BYTES'({NC{1'b1}});
    end else begin
      gm_req   = any_line;
      gm_addr  = line_addr[sel];
      gm_wdata = line_data[sel];
      gm_wmask = line_mask[sel];
      line_ready[sel] = any_line && gm_gnt;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr_last <= CHW'(N_CH - 1);
    else if (!cen_wr_req && any_line && gm_gnt) rr_last <= sel;
  end

  // ---------------- reduction and local memory --------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate      <= R_IDLE;
      rp          <= '0;
      di          <= '0;
      div_start   <= 1'b0;
      reduce_done <= 1'b0;
      centers     <= '0;
      for (int i = 0; i < KM_NSUM; i++) acc[i] <= '0;
    end else begin
      div_start   <= 1'b0;
      reduce_done <= 1'b0;
      if (cen_we) centers[cen_widx*8 +: 8] <= cen_wdata;
      unique case (rstate)
        R_IDLE: if (reduce) begin
          for (int i = 0; i < KM_NSUM; i++) acc[i] <= '0;
          rp  <= '0;
          rstate <= R_SUM;
        end
        R_SUM: begin
          if (starts[rp])
            for (int i = 0; i < KM_NSUM; i++) acc[i] <= acc[i] + cell_sums[rp][i];
          if (32'(rp) == N_CH - 1) begin
            di        <= '0;
            rstate    <= R_DIV;
          end
          rp <= rp + 1'b1;
        end
        R_DIV: begin
          div_start <= 1'b1;
          rstate    <= R_WAIT;
        end
        R_WAIT: if (div_done) begin
          if (div_den != 0) centers[di*8 +: 8] <= 8'(div_q);
          if (32'(di) == NC - 1) rstate <= R_WRITE;
          else begin
            di  <= di + 1'b1;
            rstate <= R_DIV;
          end
        end
        R_WRITE: if (gm_gnt) begin
          reduce_done <= 1'b1;
          rstate      <= R_IDLE;
        end
        default: rstate <= R_IDLE;
      endcase
    end
  end

  a_one_ready: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(line_ready));
endmodule
