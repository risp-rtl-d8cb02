// tb_pc_kmeans: self-checking test of the K-Means kernel.
// Random centres and points; every label is compared with a nearest-centre
// search done here (lowest index wins a tie), the 15-cycle latency is checked
// while the pipeline runs without stalls, and after each batch the
// per-cluster feature sums and counts are compared with the expected ones.
// The second batch follows clr_acc and runs with random stalls.
module tb_pc_kmeans;
  import risp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en, clr_acc, in_valid, out_valid, busy;
  logic [KM_K*KM_DIM*8-1:0] centers;
  logic [WORD_W-1:0] in_point;
  logic [7:0] out_byte;
  logic [KM_SUM_W-1:0] sums [KM_NSUM];
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  pc_kmeans dut (.*);

  byte unsigned exp_q[$];
  int           t_q[$];
  int           stall_phase = 0;
  longint       exp_sum [KM_NSUM];
  byte unsigned e;
  int           t;

  function automatic byte unsigned nearest(logic [WORD_W-1:0] p);
    longint best = -1;
    byte unsigned bi = 0;
    for (int k = 0; k < KM_K; k++) begin
      longint d = 0;
      for (int j = 0; j < KM_DIM; j++) begin
        int df = int'(p[j*8 +: 8]) - int'(centers[(k*KM_DIM+j)*8 +: 8]);
        d += df * df;
      end
      if (best < 0 || d < best) begin best = d; bi = 8'(k); end
    end
    return bi;
  endfunction

  always @(posedge clk) if (rst_n && en && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected result"); end
    else begin
      e = exp_q.pop_front();
      t = t_q.pop_front();
      if (out_byte !== e) begin failures++; $display("label %0d exp %0d", out_byte, e); end
      if (!stall_phase) begin
        checks++;
        if (cyc - t != 15) begin failures++; $display("latency %0d", cyc - t); end
      end
    end
  end

  task automatic batch(int n);
    for (int i = 0; i < KM_NSUM; i++) exp_sum[i] = 0;
    for (int i = 0; i < n; i++) begin
      logic [WORD_W-1:0] p;
      byte unsigned l;
      for (int j = 0; j < KM_DIM; j++) p[j*8 +: 8] = 8'($urandom);
      if (i % 7 == 3) p = centers[WORD_W-1:0];             // exactly on centre 0
      if (i % 11 == 5) p = centers[3*WORD_W +: WORD_W];     // exactly on centre 3
      l = nearest(p);
      for (int j = 0; j < KM_DIM; j++) exp_sum[l*(KM_DIM+1)+j] += p[j*8 +: 8];
      exp_sum[l*(KM_DIM+1)+KM_DIM] += 1;
      while ($urandom_range(3) == 0) begin @(negedge clk); in_valid = 0; en = 1; end
      @(negedge clk);
      in_valid = 1; in_point = p; en = 1;
      exp_q.push_back(l); t_q.push_back(cyc);
      if (stall_phase) while ($urandom_range(2) == 0) begin en = 0; @(negedge clk); end
      en = 1;
    end
    @(negedge clk); in_valid = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || busy) begin failures++; $display("labels missing: %0d", exp_q.size()); end
    for (int i = 0; i < KM_NSUM; i++) begin
      checks++;
      if (longint'(sums[i]) != exp_sum[i]) begin failures++; $display("sum[%0d] %0d exp %0d", i, sums[i], exp_sum[i]); end
    end
  endtask

  initial begin
    en = 1; clr_acc = 0; in_valid = 0; in_point = '0;
    for (int i = 0; i < KM_K * KM_DIM; i++) centers[i*8 +: 8] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    batch(150);
    @(negedge clk); clr_acc = 1; @(negedge clk); clr_acc = 0;
    for (int i = 0; i < KM_K * KM_DIM; i++) centers[i*8 +: 8] = 8'($urandom);
    stall_phase = 1;
    batch(150);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
