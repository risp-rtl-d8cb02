// tb_risp_top_full: one complete job on the RU at its default size (64
// channels of 512 nine-byte words). The channel planner is given the Sobel
// models of the reference example (power 1858 mW + 32 mW per channel under a
// 3 W budget -> 36; 190 MB/s per channel against a 1970 MB/s SATA link with
// beta = 1 -> 10) and must enable 10 cells, on channels 0, 6, 12, 19, ...
// Those 10 cells then run Sobel over 64-pixel-wide tiles on all 64
// channels; every result byte is read back by the host and compared with a
// reference computed here, and the job time is checked against the largest
// group (7 channels x 4608 bytes at one byte per cycle).
module tb_risp_top_full;
  import risp_pkg::*;
  localparam int unsigned N = N_CH_DEF, WORDS = NVM_WORDS_DEF;
  localparam int unsigned LPC = (WORDS * 9 + 127) / 128;
  localparam int unsigned GM_AW = $clog2(N * LPC + 1);
  localparam int unsigned BYTES = WORDS * 9;
  localparam int unsigned W = 64, ROWS = BYTES / W;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cpu_we; logic [4:0] cpu_addr; logic [31:0] cpu_wdata, cpu_rdata;
  logic host_req, host_we, host_gnt, irq, busy;
  logic [GM_AW-1:0] host_addr;
  logic [LINE_W-1:0] host_wdata, host_rdata;
  logic [LINE_BYTES-1:0] host_wmask;
  logic [N-1:0] cell_power_en;
  logic [6:0] n_active;
  logic ev_nvm_bw_stall, ev_cell_stall, ev_group_switch;

  risp_top dut (.*);

  int checks = 0, failures = 0, switches = 0;
  always @(posedge clk) if (rst_n && ev_group_switch) switches++;

  logic [WORD_W-1:0] nvm_ref [N][WORDS];
  event load_ev;
  for (genvar c = 0; c < N; c++) begin : g_ld
    always @(load_ev) for (int w = 0; w < WORDS; w++) dut.g_ch[c].u_nvm.mem[w] = nvm_ref[c][w];
  end
  function automatic byte unsigned nb(int c, int i);
    return nvm_ref[c][i / 9][(i % 9)*8 +: 8];
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic wr(int a, int d);
    @(negedge clk); cpu_we = 1; cpu_addr = 5'(a); cpu_wdata = d;
    @(negedge clk); cpu_we = 0;
  endtask
  task automatic rd(int a, output int d);
    @(negedge clk); cpu_addr = 5'(a); #1; d = cpu_rdata;
  endtask
  task automatic host_read(int line, output logic [LINE_W-1:0] data);
    @(negedge clk); host_req = 1; host_we = 0; host_addr = GM_AW'(line);
    #1; while (!host_gnt) begin @(negedge clk); #1; end
    @(posedge clk); #1; data = host_rdata;
    @(negedge clk); host_req = 0;
  endtask

  initial begin
    int cyc, t, d;
    logic [LINE_W-1:0] l;
    cpu_we = 0; cpu_addr = 0; cpu_wdata = 0;
    host_req = 0; host_we = 0; host_addr = 0; host_wdata = 0; host_wmask = 0;
    for (int c = 0; c < N; c++) for (int w = 0; w < WORDS; w++) nvm_ref[c][w] = {$urandom, $urandom, $urandom};
    repeat (3) @(posedge clk); rst_n = 1;
    -> load_ev;
    wr(9, 1858); wr(10, 32); wr(11, 3000); wr(12, 190); wr(13, 1970); wr(14, 1000); wr(15, 3);
    wr(2, 0); wr(3, BYTES); wr(5, W); wr(7, 0);
    wr(1, 32'(MODE_ISP) | (32'(APP_SOBEL) << 1));
    rd(23, d);
    check(d[7:0] == 10 && d[15:8] == 36 && d[23:16] == 10, $sformatf("planner %h", d));
    wr(0, 1);
    t = 0;
    while (!irq && t < 100000) begin @(negedge clk); t++; end
    check(irq, "job finished");
    rd(22, cyc);
    $display("Sobel on 64 channels with %0d cells: %0d cycles, %0d channel switches", n_active, cyc, switches);
    check(n_active == 10, "10 cells enabled");
    for (int i = 0; i < 10; i++) check(cell_power_en[(i * 64) / 10], "group start enabled");
    check($countones(cell_power_en) == 10, "only 10 cells powered");
    check(switches == 54, "each cell walked its group");
    check(cyc >= 7 * BYTES && cyc <= 7 * BYTES + 7 * 40 + 100, "job time matches the largest group");
    for (int c = 0; c < N; c++) begin
      int bad, i;
      bad = 0; i = 0;
      for (int r = 1; r < ROWS - 1; r++) for (int x = 1; x < W - 1; x++) begin
        int gx, gy, m;
        gx = (nb(c, (r-1)*W+x+1) + 2*nb(c, r*W+x+1) + nb(c, (r+1)*W+x+1))
           - (nb(c, (r-1)*W+x-1) + 2*nb(c, r*W+x-1) + nb(c, (r+1)*W+x-1));
        gy = (nb(c, (r+1)*W+x-1) + 2*nb(c, (r+1)*W+x) + nb(c, (r+1)*W+x+1))
           - (nb(c, (r-1)*W+x-1) + 2*nb(c, (r-1)*W+x) + nb(c, (r-1)*W+x+1));
        m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
        if (i % LINE_BYTES == 0) host_read(c * LPC + i / LINE_BYTES, l);
        if (l[(i % LINE_BYTES)*8 +: 8] != 8'((m > 255) ? 255 : m)) bad++;
        i++;
      end
      check(bad == 0, $sformatf("Sobel channel %0d: %0d wrong", c, bad));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
