// tb_regular_path: self-checking test of the regular-mode data path, with an
// NVM controller, an emulated NVM array and the global memory around it.
// The host fills DRAM lines; a DRAM -> NVM transfer copies them into the NVM,
// an NVM -> DRAM transfer copies them back to other lines, and the host
// reads those lines and compares bytes 0..8 with what it wrote (the other
// bytes must stay untouched). The NVM contents are checked directly too.
module tb_regular_path;
  import risp_pkg::*;
  localparam int unsigned WORDS = 64;
  localparam int unsigned AW = $clog2(WORDS);
  localparam int unsigned LW = $clog2(WORDS * WORD_BYTES + 1);
  localparam int unsigned GM_AW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, dir, busy, done;
  logic [AW:0] nwords;
  logic [AW-1:0] nvm_addr;
  logic [GM_AW-1:0] gm_line;
  logic cmd_valid, cmd_write, cmd_ready, in_valid, in_ready, wr_valid, wr_ready;
  logic [AW-1:0] cmd_addr;
  logic [LW-1:0] cmd_len;
  logic [WORD_W-1:0] in_data, wr_data;
  logic gm_req, gm_we, gm_gnt;
  logic [GM_AW-1:0] gm_addr;
  logic [LINE_W-1:0] gm_wdata, gm_rdata;
  logic [LINE_BYTES-1:0] gm_wmask;

  regular_path #(.WORDS(WORDS), .GM_AW(GM_AW)) dut (.*);

  logic rd_en, wr_en, thr_stall;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [WORD_W-1:0] rd_data, nwr_data;
  nvmc #(.WORDS(WORDS)) u_nvmc (.clk, .rst_n, .cmd_valid, .cmd_write, .cmd_word(1'b1), .cmd_addr,
    .cmd_len, .cmd_ready, .out_valid(in_valid), .out_data(in_data), .out_ready(in_ready), .thr_stall,
    .wr_valid, .wr_data, .wr_ready, .nvm_rd_en(rd_en), .nvm_rd_addr(rd_addr), .nvm_rd_data(rd_data),
    .nvm_wr_en(wr_en), .nvm_wr_addr(wr_addr), .nvm_wr_data(nwr_data));
  nvm_emu #(.WORDS(WORDS)) u_nvm (.clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data(nwr_data));

  logic ru_owns, host_req, host_we, host_gnt;
  logic [GM_AW-1:0] host_addr;
  logic [LINE_W-1:0] host_wdata, host_rdata;
  logic [LINE_BYTES-1:0] host_wmask;
  global_mem #(.LINES(200)) u_gm (.clk, .ru_owns, .host_req, .host_we, .host_addr, .host_wdata,
    .host_wmask, .host_gnt, .host_rdata, .ru_req(gm_req), .ru_we(gm_we), .ru_addr(gm_addr),
    .ru_wdata(gm_wdata), .ru_wmask(gm_wmask), .ru_gnt(gm_gnt), .ru_rdata(gm_rdata));

  int checks = 0, failures = 0;
  logic [LINE_W-1:0] src [40];

  task automatic transfer(bit d, int n, int na, int gl);
    int t = 0;
    @(negedge clk); ru_owns = 1; start = 1; dir = d; nwords = (AW+1)'(n); nvm_addr = AW'(na); gm_line = GM_AW'(gl);
    @(negedge clk); start = 0;
    while (!done && t < 5000) begin @(negedge clk); t++; end
    checks++;
    if (!done) begin failures++; $display("transfer timeout"); end
    @(negedge clk); ru_owns = 0;
  endtask

  initial begin
    start = 0; dir = 0; nwords = 0; nvm_addr = 0; gm_line = 0;
    ru_owns = 0; host_req = 0; host_we = 0; host_addr = 0; host_wdata = 0; host_wmask = '1;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      for (int w = 0; w < LINE_W / 32; w++) src[i][w*32 +: 32] = $urandom;
      @(negedge clk); host_req = 1; host_we = 1; host_addr = GM_AW'(10 + i); host_wdata = src[i];
    end
    // pre-fill the destination lines so untouched bytes can be checked
    for (int i = 0; i < 40; i++) begin
      @(negedge clk); host_req = 1; host_we = 1; host_addr = GM_AW'(100 + i); host_wdata = '1;
    end
    @(negedge clk); host_req = 0;
    transfer(1, 40, 5, 10);        // DRAM lines 10.. -> NVM words 5..
    for (int i = 0; i < 40; i++) begin
      checks++;
      if (u_nvm.mem[5 + i] !== src[i][WORD_W-1:0]) begin failures++; $display("nvm word %0d", i); end
    end
    transfer(0, 40, 5, 100);       // NVM words 5.. -> DRAM lines 100..
    for (int i = 0; i < 40; i++) begin
      @(negedge clk); host_req = 1; host_we = 0; host_addr = GM_AW'(100 + i);
      @(posedge clk); #1;
      checks++;
      if (host_rdata !== {{(LINE_W-WORD_W){1'b1}}, src[i][WORD_W-1:0]}) begin failures++; $display("line %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
