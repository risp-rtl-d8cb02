// nvm_emu: the NVM array of one RISP channel, emulated by an on-chip RAM.
//
// The reference design validates the framework on an FPGA with the NVM and
// on-device DRAM replaced by on-chip RAM; this module is that stand-in. It is
// a simple dual-port RAM of WORDS words of W bits: one synchronous read port
// (data valid the cycle after rd_en) and one write port. Depth and word width
// are this design's choice; flash timing (page reads, program, erase) is not
// modelled here, the channel bandwidth limit lives in the NVM controller.
module nvm_emu #(
  parameter int unsigned W     = risp_pkg::WORD_W,
  parameter int unsigned WORDS = risp_pkg::NVM_WORDS_DEF,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data
);
  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
