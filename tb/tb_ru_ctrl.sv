// tb_ru_ctrl: self-checking test of the RU controller (8 channels).
// The processing cells, public cell and regular path are modelled here by
// their handshakes. Checked: the planner's choice (power model -> 5 cells)
// and a manual override, the channel groups that result, one go per pass,
// one accumulator clear and one reduction per K-Means iteration, waiting for
// every enabled cell and for pending lines, ownership of the global memory
// during a job, the interrupt and its acknowledge, the cycle counter, and a
// regular-mode job.
module tb_ru_ctrl;
  import risp_pkg::*;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cpu_we;
  logic [4:0] cpu_addr;
  logic [31:0] cpu_wdata, cpu_rdata;
  mode_e mode; app_e app;
  logic [31:0] len_bytes, res_base, cen_line, rp_nwords, rp_nvm_addr, rp_gm_line;
  logic [7:0] threshold, cen_widx, cen_wdata;
  logic [15:0] img_width;
  logic cen_we, cell_go, clr_acc, lines_pending, reduce, reduce_done, rp_start, rp_dir, rp_done;
  logic busy, ru_owns, irq;
  logic [N-1:0] starts, cell_done;
  logic [2:0] owner [N];
  logic [3:0] n_active;
  logic [2:0] rp_ch;

  ru_ctrl #(.N_CH(N)) dut (.*);

  int checks = 0, failures = 0;
  int n_go = 0, n_clr = 0, n_red = 0, n_rp = 0, busy_cycles = 0;
  int cell_timer [N];

  // cell models: done some cycles after go, enabled cells only
  always @(posedge clk) begin
    if (rst_n) begin
      if (busy) busy_cycles++;
      if (cell_go) n_go++;
      if (clr_acc) n_clr++;
      if (reduce) n_red++;
      if (rp_start) n_rp++;
    end
    for (int c = 0; c < N; c++) begin
      if (cell_go && starts[c]) begin cell_done[c] <= 0; cell_timer[c] <= 5 + 7 * c; end
      else if (cell_timer[c] > 1) cell_timer[c] <= cell_timer[c] - 1;
      else if (cell_timer[c] == 1) begin cell_done[c] <= 1; cell_timer[c] <= 0; end
    end
  end
  // public cell and regular path models
  always @(posedge clk) begin
    reduce_done <= 0;
    rp_done <= 0;
    if (rst_n && reduce) fork begin repeat (20) @(posedge clk); reduce_done <= 1; end join_none
    if (rst_n && rp_start) fork begin repeat (30) @(posedge clk); rp_done <= 1; end join_none
  end

  task automatic wr(int a, int d);
    @(negedge clk); cpu_we = 1; cpu_addr = 5'(a); cpu_wdata = d;
    @(negedge clk); cpu_we = 0;
  endtask
  task automatic rd(int a, output int d);
    @(negedge clk); cpu_addr = 5'(a); #1; d = cpu_rdata;
  endtask
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic wait_irq(int tmax);
    int t = 0;
    while (!irq && t < tmax) begin
      @(negedge clk); t++;
      if (busy) check(ru_owns, "RU owns memory while busy");
    end
    check(irq, "interrupt raised");
    check(!busy && !ru_owns, "idle and host owns memory after the job");
  endtask

  initial begin
    int d, bc0;
    cpu_we = 0; cpu_addr = 0; cpu_wdata = 0; lines_pending = 0; cell_done = '0;
    for (int c = 0; c < N; c++) cell_timer[c] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // planner: 1000 mW + 100 mW per channel, 1500 mW budget -> 5 cells
    wr(9, 1000); wr(10, 100); wr(11, 1500); wr(15, 1);
    wr(1, 32'(MODE_ISP) | (32'(APP_SOBEL) << 1));
    wr(3, 288);
    rd(23, d); check(d[7:0] == 5, $sformatf("planner gives %0d", d[7:0]));
    bc0 = busy_cycles;
    wr(0, 1);
    // a late pending line delays completion
    fork begin repeat (20) @(negedge clk); lines_pending = 1; repeat (100) @(negedge clk); lines_pending = 0; end join_none
    wr(4, 99);   // ignored while busy
    wait_irq(2000);
    check(n_go == 1 && n_red == 0, "Sobel: one pass, no reduction");
    check(starts == 8'b0101_1011, $sformatf("groups for 5 of 8: %b", starts));
    check(owner[2] == 1 && owner[5] == 4 && owner[7] == 6, "owners for 5 of 8");
    check(busy_cycles - bc0 >= 120, "waited for pending lines");
    rd(22, d); check(d == busy_cycles - bc0, $sformatf("cycle counter %0d vs %0d", d, busy_cycles - bc0));
    rd(4, d); check(d == 0, "register write refused while busy");
    rd(0, d); check(d[1] == 1 && d[15:8] == 5, "status");
    wr(0, 2); check(!irq, "interrupt acknowledged");
    // K-Means, 3 iterations, manual 3 cells
    wr(2, 3); wr(6, 3); wr(1, 32'(MODE_ISP) | (32'(APP_KMEANS) << 1));
    n_go = 0; n_clr = 0; n_red = 0;
    wr(0, 1);
    wait_irq(5000);
    check(n_go == 3 && n_clr == 3 && n_red == 3, $sformatf("K-Means: go %0d clr %0d reduce %0d", n_go, n_clr, n_red));
    check(starts == 8'b0010_0101, $sformatf("groups for 3 of 8: %b", starts));
    wr(0, 2);
    // regular mode
    wr(1, 32'(MODE_REGULAR)); wr(16, 1); wr(17, 12); wr(20, 5);
    n_go = 0;
    wr(0, 1);
    wait_irq(500);
    check(n_rp == 1 && n_go == 0, "regular mode runs the regular path only");
    check(rp_dir == 1 && rp_nwords == 12 && rp_ch == 5, "regular-mode registers");
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
