// tb_chan_planner: self-checking test of the channel planner.
// The Sobel example (1858 mW + 32 mW per channel under 3000 mW -> 36 cells;
// 190 MB/s per channel against 1970 MB/s SATA with beta = 1 -> 10 cells) is
// checked, then random models against a rounding reference computed here,
// with each constraint enabled alone and both together.
module tb_chan_planner;
  import risp_pkg::*;
  localparam int unsigned N = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic use_power, use_bw;
  logic [15:0] p0_mw, p1_mw, budget_mw, bw_mbps, host_mbps, beta_milli;
  logic [6:0] n_power, n_bw, n_sel;
  chan_planner #(.N_CH(N)) dut (.*);
  int checks = 0, failures = 0;

  function automatic int clampn(longint v);
    return (v < 1) ? 1 : (v > N) ? N : int'(v);
  endfunction

  task automatic apply_check();
    longint np, nb, ns;
    // largest n with p0 + p1*n <= budget + p1/2, i.e. round-to-nearest
    np = (budget_mw < p0_mw) ? 0 :
         (p1_mw == 0) ? N : (2 * (longint'(budget_mw) - p0_mw) + p1_mw) / (2 * longint'(p1_mw));
    nb = (bw_mbps == 0) ? N : (2 * longint'(host_mbps) * beta_milli + longint'(bw_mbps) * 1000) / (2000 * longint'(bw_mbps));
    np = use_power ? clampn(np) : N;
    nb = use_bw ? clampn(nb) : N;
    ns = (np < nb) ? np : nb;
    @(negedge clk); @(negedge clk);
    checks += 3;
    if (n_power != np) begin failures++; $display("n_power %0d exp %0d", n_power, np); end
    if (n_bw != nb) begin failures++; $display("n_bw %0d exp %0d", n_bw, nb); end
    if (n_sel != ns) begin failures++; $display("n_sel %0d exp %0d", n_sel, ns); end
  endtask

  initial begin
    use_power = 1; use_bw = 1;
    p0_mw = 1858; p1_mw = 32; budget_mw = 3000; bw_mbps = 190; host_mbps = 1970; beta_milli = 1000;
    repeat (2) @(posedge clk); rst_n = 1;
    apply_check();
    checks += 3;
    if (n_power != 36) failures++;
    if (n_bw != 10) failures++;
    if (n_sel != 10) failures++;
    use_bw = 0; apply_check();
    checks++; if (n_sel != 36) failures++;
    for (int k = 0; k < 300; k++) begin
      use_power = $urandom_range(1); use_bw = $urandom_range(1);
      p0_mw = 16'($urandom_range(0, 4000)); p1_mw = 16'($urandom_range(1, 200));
      budget_mw = 16'($urandom_range(0, 8000)); bw_mbps = 16'($urandom_range(10, 1000));
      host_mbps = 16'($urandom_range(100, 16000)); beta_milli = 16'($urandom_range(1000, 5000));
      apply_check();
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
