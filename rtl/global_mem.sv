// global_mem: the on-device DRAM of the SSD ("global memory"), emulated by an
// on-chip RAM of LINES lines of LINE_BYTES bytes.
//
// Both the host and the reconfigurable unit (RU) can use it, but only one at a
// time: ru_owns selects the owner. While the RU owns it, host requests are
// refused (host_gnt low); while the host owns it, RU requests are refused.
// Each side has one port that either reads a line or writes a line under a
// byte mask; read data of the granted access appears on both rdata outputs
// the next cycle.
// The exclusive ownership follows the reference memory model; the line width
// (128 bytes, close to 15 GB/s at 100 MHz) and depth are this design's choice.
module global_mem #(
  parameter int unsigned LINES = risp_pkg::N_CH_DEF * 36 + 1,
  localparam int unsigned LB   = risp_pkg::LINE_BYTES,
  localparam int unsigned AW   = $clog2(LINES)
) (
  input  logic            clk,
  input  logic            ru_owns,
  // host side
  input  logic            host_req,
  input  logic            host_we,
  input  logic [AW-1:0]   host_addr,
  input  logic [LB*8-1:0] host_wdata,
  input  logic [LB-1:0]   host_wmask,
  output logic            host_gnt,
  output logic [LB*8-1:0] host_rdata,
  // RU side
  input  logic            ru_req,
  input  logic            ru_we,
  input  logic [AW-1:0]   ru_addr,
  input  logic [LB*8-1:0] ru_wdata,
  input  logic [LB-1:0]   ru_wmask,
  output logic            ru_gnt,
  output logic [LB*8-1:0] ru_rdata
);
  logic [LB*8-1:0] mem [LINES];

  logic          req, we;
  logic [AW-1:0] addr;
  logic [LB*8-1:0] wdata;
  logic [LB-1:0] wmask;

  always_comb begin
    host_gnt = host_req && !ru_owns;
    ru_gnt   = ru_req && ru_owns;
    req   = ru_owns ? ru_req   : host_req;
    we    = ru_owns ? ru_we    : host_we;
    addr  = ru_owns ? ru_addr  : host_addr;
    wdata = ru_owns ? ru_wdata : host_wdata;
    wmask = ru_owns ? ru_wmask : host_wmask;
  end

  logic [LB*8-1:0] rdata;
  always_ff @(posedge clk) begin
    if (req && we) begin
      for (int b = 0; b < LB; b++)
        if (wmask[b]) mem[addr][b*8 +: 8] <= wdata[b*8 +: 8];
    end
    if (req && !we) rdata <= mem[addr];
  end
  assign host_rdata = rdata;
  assign ru_rdata   = rdata;
endmodule
