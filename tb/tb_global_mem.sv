// tb_global_mem: self-checking test of the on-device DRAM model.
// Checks exclusive ownership (only the owner's requests are granted and only
// they change memory), masked line writes and one-cycle line reads from both
// the host and the RU side.
module tb_global_mem;
  import risp_pkg::*;
  localparam int unsigned LINES = 40;
  localparam int unsigned AW = $clog2(LINES);
  logic clk = 0;
  always #5 clk = ~clk;
  logic ru_owns, host_req, host_we, host_gnt, ru_req, ru_we, ru_gnt;
  logic [AW-1:0] host_addr, ru_addr;
  logic [LINE_W-1:0] host_wdata, host_rdata, ru_wdata, ru_rdata;
  logic [LINE_BYTES-1:0] host_wmask, ru_wmask;
  global_mem #(.LINES(LINES)) dut (.*);

  logic [LINE_W-1:0] ref_mem [LINES];
  int checks = 0, failures = 0;

  function automatic logic [LINE_W-1:0] rnd_line();
    logic [LINE_W-1:0] l;
    for (int i = 0; i < LINE_W / 32; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  initial begin
    ru_owns = 0; host_req = 0; host_we = 0; ru_req = 0; ru_we = 0;
    host_addr = 0; ru_addr = 0; host_wdata = 0; ru_wdata = 0; host_wmask = 0; ru_wmask = 0;
    // host fills everything
    for (int i = 0; i < LINES; i++) begin
      @(negedge clk); host_req = 1; host_we = 1; host_addr = AW'(i); host_wdata = rnd_line(); host_wmask = '1;
      ref_mem[i] = host_wdata;
      #1; checks++; if (!host_gnt) failures++;
    end
    @(negedge clk); host_req = 0;
    for (int n = 0; n < 400; n++) begin
      bit own, hw, rw;
      logic [LINE_W-1:0] exp_r;
      @(negedge clk);
      own = $urandom_range(1); ru_owns = own;
      host_req = $urandom_range(1); hw = $urandom_range(1); host_we = hw;
      ru_req = $urandom_range(1); rw = $urandom_range(1); ru_we = rw;
      host_addr = AW'($urandom_range(LINES - 1)); ru_addr = AW'($urandom_range(LINES - 1));
      host_wdata = rnd_line(); ru_wdata = rnd_line();
      host_wmask = {$urandom, $urandom, $urandom, $urandom};
      ru_wmask = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (host_gnt !== (host_req && !own) || ru_gnt !== (ru_req && own)) begin
        failures++; $display("grant wrong");
      end
      exp_r = own ? ref_mem[ru_addr] : ref_mem[host_addr];
      if (own && ru_req && rw)
        for (int b = 0; b < LINE_BYTES; b++) if (ru_wmask[b]) ref_mem[ru_addr][b*8 +: 8] = ru_wdata[b*8 +: 8];
      if (!own && host_req && hw)
        for (int b = 0; b < LINE_BYTES; b++) if (host_wmask[b]) ref_mem[host_addr][b*8 +: 8] = host_wdata[b*8 +: 8];
      @(posedge clk); #1;
      if ((own && ru_req && !rw) || (!own && host_req && !hw)) begin
        checks++;
        if ((own ? ru_rdata : host_rdata) !== exp_r) begin failures++; $display("read data wrong"); end
      end
    end
    // final read-back through the host
    @(negedge clk); ru_owns = 0; ru_req = 0;
    for (int i = 0; i < LINES; i++) begin
      @(negedge clk); host_req = 1; host_we = 0; host_addr = AW'(i);
      @(posedge clk); #1;
      checks++;
      if (host_rdata !== ref_mem[i]) begin failures++; $display("line %0d wrong", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
