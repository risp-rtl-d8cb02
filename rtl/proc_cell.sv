// proc_cell: processing cell of one RISP channel.
//
// The cell runs the application the reconfigurable unit is configured for
// (K-Means, Binarization or Sobel; all three kernels are present and `app`
// picks one, standing in for loading that application's image into the cell)
// over the channels of its group. With all cells active a group is just the
// cell's own channel; when fewer cells are enabled, the cell at channel MY_CH
// also takes the following channels up to the next group start (starts[]),
// one after another. For each channel it sends a read command for len_bytes
// bytes to that channel's NVM controller, feeds the returned stream to the
// kernel, waits for the kernel to drain and moves on.
//
// Result bytes are packed into 128-byte global-memory lines. Results of data
// from channel c go to lines res_base + c*LINES_PER_CH + i, whichever cell
// produced them, so the layout does not depend on the grouping. A full line
// moves to a one-line pending buffer that the public processing cell drains
// (line_valid/line_ready); a partial line is flushed with a byte mask when a
// channel ends. If a line fills while the pending buffer is still occupied,
// the kernel pipeline is stalled (kern_en low) for as long as that lasts.
// go starts a pass over the group (one K-Means iteration, or the whole job for
// the other applications); done is high from the end of the pass to the next
// go. The grouping rule follows the reference; line size, result layout and
// handshakes are this design's choices.
module proc_cell
  import risp_pkg::*;
#(
  parameter int unsigned N_CH         = N_CH_DEF,
  parameter int unsigned MY_CH        = 0,
  parameter int unsigned WORDS        = NVM_WORDS_DEF,
  parameter int unsigned LINES_PER_CH = 36,
  parameter int unsigned GM_AW        = 12,
  localparam int unsigned CHW = clog2_min1(N_CH),
  localparam int unsigned AW  = $clog2(WORDS),
  localparam int unsigned LW  = $clog2(WORDS * WORD_BYTES + 1),
  localparam int unsigned XW  = $clog2(SOBEL_MAX_W + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  app_e                 app,
  input  logic                 cell_on,     // this cell is enabled (starts[MY_CH])
  input  logic [N_CH-1:0]      starts,      // group start of every channel
  input  logic                 go,
  output logic                 done,
  input  logic [LW-1:0]        len_bytes,   // bytes per channel
  input  logic [GM_AW-1:0]     res_base,
  input  logic [7:0]           threshold,
  input  logic [XW-1:0]        img_width,
  input  logic [KM_K*KM_DIM*8-1:0] centers,
  input  logic                 clr_acc,
  output logic [KM_SUM_W-1:0]  km_sums [KM_NSUM],
  // NVM controller of the current channel
  output logic [CHW-1:0]       cur_ch,
  output logic                 cmd_valid,
  output logic                 cmd_word,
  output logic [AW-1:0]        cmd_addr,
  output logic [LW-1:0]        cmd_len,
  input  logic                 cmd_ready,
  input  logic                 in_valid,
  input  logic [WORD_W-1:0]    in_data,
  output logic                 in_ready,
  // result lines towards the public processing cell
  output logic                 line_valid,
  output logic [GM_AW-1:0]     line_addr,
  output logic [LINE_W-1:0]    line_data,
  output logic [LINE_BYTES-1:0] line_mask,
  input  logic                 line_ready,
  output logic                 stalled      // kernel pipeline held this cycle
);
  typedef enum logic [2:0] {S_IDLE, S_CMD, S_RUN, S_DRAIN, S_NEXT, S_DONE} state_e;
  state_e state;

  logic [LW-1:0]  bytes_rem;
  logic [LINE_W-1:0] cur_line;
  logic [$clog2(LINE_BYTES)-1:0] cnt;
  logic [GM_AW-1:0] line_idx;
  logic [GM_AW-1:0] region;

  logic kern_en, take;
  logic bin_v, sob_v, km_v;
  logic [7:0] bin_b, sob_b, km_b;
  logic bin_busy, sob_busy, km_busy;
  logic k_out_v, k_busy;
  logic [7:0] k_out_b;
  logic k_clear;

  assign kern_en  = !(line_valid && cnt == $clog2(LINE_BYTES)'(LINE_BYTES - 1));
  assign stalled  = !kern_en && (state == S_RUN || state == S_DRAIN);
  assign in_ready = (state == S_RUN) && kern_en && (bytes_rem != 0);
  assign take     = in_valid && in_ready;
  assign k_clear  = (state == S_CMD);

  assign cmd_valid = (state == S_CMD);
  assign cmd_word  = (app == APP_KMEANS);
  assign cmd_addr  = '0;
  assign cmd_len   = len_bytes;

  pc_binarize u_bin (
    .clk, .rst_n, .en(kern_en), .clear(k_clear), .threshold,
    .in_valid(take && app == APP_BINARIZE), .in_byte(in_data[7:0]),
    .out_valid(bin_v), .out_byte(bin_b), .busy(bin_busy));

  pc_sobel u_sob (
    .clk, .rst_n, .en(kern_en), .clear(k_clear), .width(img_width),
    .in_valid(take && app == APP_SOBEL), .in_byte(in_data[7:0]),
    .out_valid(sob_v), .out_byte(sob_b), .busy(sob_busy));

  pc_kmeans u_km (
    .clk, .rst_n, .en(kern_en), .clr_acc, .centers,
    .in_valid(take && app == APP_KMEANS), .in_point(in_data),
    .out_valid(km_v), .out_byte(km_b), .sums(km_sums), .busy(km_busy));

  always_comb begin
    unique case (app)
      APP_KMEANS:   begin k_out_v = km_v;  k_out_b = km_b;  k_busy = km_busy;  end
      APP_BINARIZE: begin k_out_v = bin_v; k_out_b = bin_b; k_busy = bin_busy; end
      default:      begin k_out_v = sob_v; k_out_b = sob_b; k_busy = sob_busy; end
    endcase
  end

  assign region = res_base + GM_AW'(cur_ch) * GM_AW'(LINES_PER_CH);
  assign done   = (state == S_DONE);

  logic last_in_group;
  assign last_in_group = (32'(cur_ch) == N_CH - 1) || starts[(32'(cur_ch) + 1) % N_CH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cur_ch     <= CHW'(MY_CH);
      bytes_rem  <= '0;
      cur_line   <= '0;
      cnt        <= '0;
      line_idx   <= '0;
      line_valid <= 1'b0;
      line_addr  <= '0;
      line_data  <= '0;
      line_mask  <= '0;
    end else begin
      if (line_valid && line_ready) line_valid <= 1'b0;

      // packing of kernel results
      if (kern_en && k_out_v && (state == S_RUN || state == S_DRAIN)) begin
        cur_line[cnt*8 +: 8] <= k_out_b;
        if (cnt == $clog2(LINE_BYTES)'(LINE_BYTES - 1)) begin
          line_valid <= 1'b1;
          line_addr  <= region + line_idx;
          line_data  <= {k_out_b, cur_line[LINE_W-9:0]};
          line_mask  <= '1;
          line_idx   <= line_idx + 1'b1;
          cnt        <= '0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end

      unique case (state)
        S_IDLE, S_DONE: if (go && cell_on) begin
          cur_ch <= CHW'(MY_CH);
          state  <= S_CMD;
        end
        S_CMD: begin
          bytes_rem <= len_bytes;
          line_idx  <= '0;
          cnt       <= '0;
          if (cmd_ready) state <= S_RUN;
        end
        S_RUN: begin
          if (take)
            bytes_rem <= (app == APP_KMEANS) ?
                         ((bytes_rem > LW'(WORD_BYTES)) ? bytes_rem - LW'(WORD_BYTES) : '0) :
                         bytes_rem - 1'b1;
          if (bytes_rem == 0) state <= S_DRAIN;
        end
        S_DRAIN: if (!k_busy && !(kern_en && k_out_v)) begin
          // flush a partial line once the pending buffer is free
          if (cnt == 0) begin
            state <= S_NEXT;
          end else if (!line_valid || line_ready) begin
            line_valid <= 1'b1;
            line_addr  <= region + line_idx;
            line_data  <= cur_line;
            line_mask  <= LINE_BYTES'((LINE_BYTES+1)'(1) << cnt) - 1'b1;
            cnt        <= '0;
            state      <= S_NEXT;
          end
        end
        S_NEXT: if (!line_valid || line_ready) begin
          if (last_in_group) state <= S_DONE;
          else begin
            cur_ch <= cur_ch + 1'b1;
            state  <= S_CMD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
