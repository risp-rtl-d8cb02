// tb_nvmc: self-checking test of the NVM controller with its emulated array.
// Words are written with a write command, then read back in byte beats and in
// nine-byte word beats, with and without back-pressure. Data and lengths are
// checked, and so is the rate: one byte per cycle in byte mode, and on
// average B_CH_MBPS / F_RU_MHZ = 4 bytes per cycle in word mode, where the
// bandwidth stall must show up.
module tb_nvmc;
  import risp_pkg::*;
  localparam int unsigned WORDS = 64;
  localparam int unsigned AW = $clog2(WORDS);
  localparam int unsigned LW = $clog2(WORDS * WORD_BYTES + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_write, cmd_word, cmd_ready, out_valid, out_ready, thr_stall;
  logic wr_valid, wr_ready;
  logic [AW-1:0] cmd_addr;
  logic [LW-1:0] cmd_len;
  logic [WORD_W-1:0] out_data, wr_data;
  logic nvm_rd_en, nvm_wr_en;
  logic [AW-1:0] nvm_rd_addr, nvm_wr_addr;
  logic [WORD_W-1:0] nvm_rd_data, nvm_wr_data;

  nvmc #(.WORDS(WORDS)) dut (.*);
  nvm_emu #(.WORDS(WORDS)) u_nvm (.clk, .rd_en(nvm_rd_en), .rd_addr(nvm_rd_addr), .rd_data(nvm_rd_data),
    .wr_en(nvm_wr_en), .wr_addr(nvm_wr_addr), .wr_data(nvm_wr_data));

  int checks = 0, failures = 0;
  logic [WORD_W-1:0] ref_mem [WORDS];
  int stalls = 0;
  always @(posedge clk) if (rst_n && thr_stall) stalls++;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic do_cmd(bit wr, bit word, int addr, int len);
    @(negedge clk);
    cmd_valid = 1; cmd_write = wr; cmd_word = word; cmd_addr = AW'(addr); cmd_len = LW'(len);
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic write_words(int addr, int n);
    fork
      do_cmd(1, 1, addr, n);
      begin
        for (int i = 0; i < n; i++) begin
          logic [WORD_W-1:0] w;
          w = {$urandom, $urandom, $urandom};
          ref_mem[addr + i] = w;
          @(negedge clk);
          wr_valid = 1; wr_data = w;
          @(posedge clk);
          while (!wr_ready) @(posedge clk);
        end
        @(negedge clk); wr_valid = 0;
      end
    join
  endtask

  // read len bytes from addr; returns cycles from first to last beat
  task automatic read_check(bit word, int addr, int len, bit bp, output int cycles);
    int got = 0, t0 = -1, t = 0;
    do_cmd(0, word, addr, len);
    while (got < len) begin
      @(negedge clk);
      out_ready = bp ? ($urandom_range(1) == 1) : 1'b1;
      @(posedge clk);
      t++;
      if (out_valid && out_ready) begin
        if (t0 < 0) t0 = t;
        if (word) begin
          int n = (len - got >= 9) ? 9 : len - got;
          logic [WORD_W-1:0] exp_w = ref_mem[addr + got / 9];
          for (int b = 0; b < n; b++)
            check(out_data[b*8 +: 8] == exp_w[b*8 +: 8], "word data");
          got += n;
        end else begin
          check(out_data[7:0] == ref_mem[addr + got / 9][(got % 9)*8 +: 8], "byte data");
          got++;
        end
        cycles = t - t0 + 1;
      end
      if (t > 10000) break;
    end
    check(got == len, "length");
    @(negedge clk); out_ready = 0;
    repeat (3) @(posedge clk);
    check(cmd_ready, "idle after read");
  endtask

  initial begin
    int cy;
    cmd_valid = 0; cmd_write = 0; cmd_word = 0; cmd_addr = 0; cmd_len = 0;
    out_ready = 0; wr_valid = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    write_words(0, WORDS);
    // byte stream: one byte per cycle
    read_check(0, 3, 200, 0, cy);
    check(cy == 200, $sformatf("byte rate: %0d cycles for 200 bytes", cy));
    // word stream: 4 bytes per cycle on average, 40 words = 360 bytes -> ~90 cycles
    stalls = 0;
    read_check(1, 10, 360, 0, cy);
    check(cy >= 86 && cy <= 92, $sformatf("word rate: %0d cycles for 360 bytes", cy));
    check(stalls > 0, "bandwidth stall seen");
    // partial last word, back-pressure
    read_check(1, 0, 100, 1, cy);
    read_check(0, 20, 77, 1, cy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
