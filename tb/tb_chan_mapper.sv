// tb_chan_mapper: self-checking test of the channel-group mapper.
// For many cell counts n (including the 10-of-64 example: groups start at
// 0, 6, 12, ...) the group starts and owners are compared with the rule
// group i = channels floor(i*N/n) .. floor((i+1)*N/n)-1, the number of enabled
// cells must equal n, and the walk must take N_CH cycles.
module tb_chan_mapper;
  import risp_pkg::*;
  localparam int unsigned N = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done;
  logic [6:0] n_active;
  logic [N-1:0] starts;
  logic [5:0] owner [N];
  chan_mapper #(.N_CH(N)) dut (.*);

  int checks = 0, failures = 0;

  task automatic run(int n);
    int nc, cyc = 0, cnt = 0;
    bit exp_s [N];
    int exp_o [N];
    nc = (n == 0) ? 1 : (n > N) ? N : n;
    for (int c = 0; c < N; c++) exp_s[c] = 0;
    for (int i = 0; i < nc; i++) begin
      int s = (i * N) / nc, e = ((i + 1) * N) / nc;
      exp_s[s] = 1;
      for (int c = s; c < e; c++) exp_o[c] = s;
    end
    @(negedge clk); start = 1; n_active = 7'(n);
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != N) begin failures++; $display("n=%0d took %0d cycles", n, cyc); end
    for (int c = 0; c < N; c++) begin
      checks += 2;
      if (starts[c] !== exp_s[c]) begin failures++; $display("n=%0d start[%0d]", n, c); end
      if (int'(owner[c]) != exp_o[c]) begin failures++; $display("n=%0d owner[%0d]=%0d exp %0d", n, c, owner[c], exp_o[c]); end
      cnt += starts[c];
    end
    checks++;
    if (cnt != nc) begin failures++; $display("n=%0d enabled %0d", n, cnt); end
  endtask

  initial begin
    start = 0; n_active = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    run(10);
    checks += 3;
    if (!(starts[0] && starts[6] && starts[12] && !starts[5])) failures++;
    if (owner[5] != 0 || owner[11] != 6) failures++;
    if (owner[63] != 57) failures++;
    run(36); run(64); run(1); run(31); run(51); run(0); run(100);
    for (int k = 0; k < 20; k++) run($urandom_range(1, N));
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
