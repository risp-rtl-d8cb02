// tb_pc_binarize: self-checking test of the Binarization kernel.
// Random RGB pixels are fed with random input gaps; phase 1 runs without
// stalls and checks every result and its two-cycle latency, phase 2 adds
// random pipeline stalls (en low) and a threshold change and checks values.
module tb_pc_binarize;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en, clear, in_valid, out_valid, busy;
  logic [7:0] threshold, in_byte, out_byte;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  pc_binarize dut (.*);

  byte unsigned exp_q[$];
  int           t_q[$];
  int           stall_phase = 0;

  function automatic byte unsigned ref_bin(byte unsigned r, g, b, thr);
    int y = (77 * r + 150 * g + 29 * b) >> 8;
    return (y >= thr) ? 1 : 0;
  endfunction

  // checker: results taken when out_valid && en
  byte unsigned e;
  int t;
  always @(posedge clk) if (rst_n && en && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected result"); end
    else begin
      e = exp_q.pop_front();
      t = t_q.pop_front();
      if (out_byte !== e) begin failures++; $display("value %0d exp %0d", out_byte, e); end
      if (!stall_phase) begin
        checks++;
        if (cyc - t != 2) begin failures++; $display("latency %0d", cyc - t); end
      end
    end
  end

  // inputs change on the falling edge; the DUT samples them on the rising edge
  task automatic send_pixel(byte unsigned r, g, b);
    byte unsigned px[3];
    px = '{r, g, b};
    for (int i = 0; i < 3; i++) begin
      while ($urandom_range(3) == 0) begin
        @(negedge clk); in_valid = 0; en = 1;
      end
      @(negedge clk);
      in_valid = 1; in_byte = px[i]; en = 1;
      if (i == 2) begin exp_q.push_back(ref_bin(r, g, b, threshold)); t_q.push_back(cyc); end
      if (stall_phase) begin
        while ($urandom_range(2) == 0) begin
          en = 0;
          @(negedge clk);
        end
        en = 1;
      end
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    en = 1; clear = 0; in_valid = 0; in_byte = 0; threshold = 8'd128;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int n = 0; n < 200; n++) send_pixel(8'($urandom), 8'($urandom), 8'($urandom));
    repeat (5) @(posedge clk);
    stall_phase = 1;
    threshold = 8'd60;
    for (int n = 0; n < 200; n++) send_pixel(8'($urandom), 8'($urandom), 8'($urandom));
    repeat (8) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || busy) begin failures++; $display("results missing: %0d", exp_q.size()); end
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
