// tb_nvm_emu: self-checking test of the emulated NVM array.
// Random writes and reads against a reference array; read data must appear
// exactly one cycle after the read, and a read and write in the same cycle to
// the same word must return the old word.
module tb_nvm_emu;
  import risp_pkg::*;
  localparam int unsigned WORDS = 128;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rd_en, wr_en;
  logic [6:0] rd_addr, wr_addr;
  logic [WORD_W-1:0] rd_data, wr_data;
  nvm_emu #(.WORDS(WORDS)) dut (.*);

  logic [WORD_W-1:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  initial begin
    logic [WORD_W-1:0] exp_d;
    rd_en = 0; wr_en = 0; rd_addr = 0; wr_addr = 0; wr_data = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); wr_en = 1; wr_addr = 7'(i); wr_data = {$urandom, $urandom, $urandom};
      ref_mem[i] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      rd_en = 1; rd_addr = 7'($urandom_range(WORDS - 1));
      exp_d = ref_mem[rd_addr];
      wr_en = ($urandom_range(1) == 1);
      wr_addr = ($urandom_range(3) == 0) ? rd_addr : 7'($urandom_range(WORDS - 1));
      wr_data = {$urandom, $urandom, $urandom};
      if (wr_en) ref_mem[wr_addr] = wr_data;
      @(posedge clk); #1;
      checks++;
      if (rd_data !== exp_d) begin failures++; $display("read %0d mismatch", rd_addr); end
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
