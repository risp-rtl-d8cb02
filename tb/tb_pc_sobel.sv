// tb_pc_sobel: self-checking test of the Sobel kernel.
// Two random tiles are streamed (16x10 without stalls, then 9x7 with random
// input gaps and pipeline stalls, after a clear). Every |Gx|+|Gy| result is
// compared with a reference computed here, and in the first tile the
// four-cycle latency from the last window pixel to the result is checked.
module tb_pc_sobel;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en, clear, in_valid, out_valid, busy;
  logic [6:0] width;
  logic [7:0] in_byte, out_byte;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  pc_sobel dut (.*);

  byte unsigned img [64][64];
  byte unsigned exp_q[$];
  int           t_q[$];
  int           stall_phase = 0;
  byte unsigned e;
  int           t;

  function automatic byte unsigned ref_sobel(int r, int c);  // centre (r, c)
    int gx, gy, m;
    gx = (img[r-1][c+1] + 2*img[r][c+1] + img[r+1][c+1]) - (img[r-1][c-1] + 2*img[r][c-1] + img[r+1][c-1]);
    gy = (img[r+1][c-1] + 2*img[r+1][c] + img[r+1][c+1]) - (img[r-1][c-1] + 2*img[r-1][c] + img[r-1][c+1]);
    m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return (m > 255) ? 255 : m;
  endfunction

  always @(posedge clk) if (rst_n && en && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected result"); end
    else begin
      e = exp_q.pop_front();
      t = t_q.pop_front();
      if (out_byte !== e) begin failures++; $display("value %0d exp %0d", out_byte, e); end
      if (!stall_phase) begin
        checks++;
        if (cyc - t != 4) begin failures++; $display("latency %0d", cyc - t); end
      end
    end
  end

  task automatic run_tile(int w, int h);
    for (int r = 0; r < h; r++) for (int c = 0; c < w; c++) img[r][c] = 8'($urandom);
    // a few flat and extreme areas so clipping happens
    img[1][1] = 255; img[1][2] = 255; img[2][1] = 0;
    @(negedge clk); width = 7'(w); clear = 1; en = 1; in_valid = 0;
    @(negedge clk); clear = 0;
    for (int r = 0; r < h; r++) for (int c = 0; c < w; c++) begin
      while (stall_phase && $urandom_range(3) == 0) begin @(negedge clk); in_valid = 0; en = 1; end
      @(negedge clk);
      in_valid = 1; in_byte = img[r][c]; en = 1;
      if (r >= 2 && c >= 2) begin exp_q.push_back(ref_sobel(r-1, c-1)); t_q.push_back(cyc); end
      if (stall_phase) while ($urandom_range(2) == 0) begin en = 0; @(negedge clk); end
      en = 1;
    end
    @(negedge clk); in_valid = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || busy) begin failures++; $display("results missing: %0d", exp_q.size()); end
  endtask

  initial begin
    en = 1; clear = 0; in_valid = 0; in_byte = 0; width = 16;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_tile(16, 10);
    stall_phase = 1;
    run_tile(9, 7);
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
