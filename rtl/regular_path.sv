// regular_path: data path of the reconfigurable unit in regular mode.
//
// In regular mode the unit does no processing and behaves like the data path
// of an ordinary SSD between the on-device DRAM and the NVM. A transfer moves
// nwords nine-byte NVM words of one channel:
//   dir = 0 (NVM -> DRAM): a word-mode read on the channel's NVM controller;
//           word i is written to byte 0..8 of global-memory line gm_line + i.
//   dir = 1 (DRAM -> NVM): line gm_line + i is read from global memory and its
//           bytes 0..8 are written to NVM word nvm_addr + i.
// start is taken when idle; done pulses at the end. One word per line keeps
// the path simple (this design's choice, the reference gives no format).
module regular_path
  import risp_pkg::*;
#(
  parameter int unsigned WORDS = NVM_WORDS_DEF,
  parameter int unsigned GM_AW = 12,
  localparam int unsigned AW   = $clog2(WORDS),
  localparam int unsigned LW   = $clog2(WORDS * WORD_BYTES + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  dir,
  input  logic [AW:0]           nwords,
  input  logic [AW-1:0]         nvm_addr,
  input  logic [GM_AW-1:0]      gm_line,
  output logic                  busy,
  output logic                  done,
  // NVM controller
  output logic                  cmd_valid,
  output logic                  cmd_write,
  output logic [AW-1:0]         cmd_addr,
  output logic [LW-1:0]         cmd_len,
  input  logic                  cmd_ready,
  input  logic                  in_valid,
  input  logic [WORD_W-1:0]     in_data,
  output logic                  in_ready,
  output logic                  wr_valid,
  output logic [WORD_W-1:0]     wr_data,
  input  logic                  wr_ready,
  // global memory
  output logic                  gm_req,
  output logic                  gm_we,
  output logic [GM_AW-1:0]      gm_addr,
  output logic [LINE_W-1:0]     gm_wdata,
  output logic [LINE_BYTES-1:0] gm_wmask,
  input  logic                  gm_gnt,
  input  logic [LINE_W-1:0]     gm_rdata
);
  typedef enum logic [2:0] {S_IDLE, S_CMD, S_RD, S_GREQ, S_GWAIT, S_PUSH} state_e;
  state_e state;
  logic          dir_q;
  logic [AW:0]   left;
  logic [GM_AW-1:0] line;
  logic [AW-1:0] waddr;
  logic [WORD_W-1:0] wbuf;

  assign busy      = (state != S_IDLE);
  assign cmd_valid = (state == S_CMD);
  assign cmd_write = dir_q;
  assign cmd_addr  = waddr;
  assign cmd_len   = dir_q ? LW'(left) : LW'(32'(left) * WORD_BYTES);

  assign in_ready  = (state == S_RD) && gm_gnt;
  assign wr_valid  = (state == S_PUSH);
  assign wr_data   = wbuf;

  always_comb begin
    gm_req   = (state == S_RD && in_valid) || (state == S_GREQ);
    gm_we    = (state == S_RD);
    gm_addr  = line;
    gm_wdata = LINE_W'(in_data);
    gm_wmask = LINE_BYTES'({WORD_BYTES{1'b1}});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; dir_q <= 1'b0; left <= '0; line <= '0; waddr <= '0;
      wbuf <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          dir_q <= dir;
          left  <= nwords;
          line  <= gm_line;
          waddr <= nvm_addr;
          state <= (nwords == 0) ? S_IDLE : S_CMD;
          done  <= (nwords == 0);
        end
        S_CMD: if (cmd_ready) state <= dir_q ? S_GREQ : S_RD;
        S_RD: if (in_valid && gm_gnt) begin
          line <= line + 1'b1;
          left <= left - 1'b1;
          if (left == 1) begin state <= S_IDLE; done <= 1'b1; end
        end
        S_GREQ: if (gm_gnt) state <= S_GWAIT;
        S_GWAIT: begin
          wbuf  <= gm_rdata[WORD_W-1:0];
          state <= S_PUSH;
        end
        S_PUSH: if (wr_ready) begin
          line <= line + 1'b1;
          left <= left - 1'b1;
          if (left == 1) begin state <= S_IDLE; done <= 1'b1; end
          else state <= S_GREQ;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
