// tb_proc_cell: self-checking test of a processing cell serving a group of
// channels (4 channels; the cell on channel 0 owns channels 0-2, channel 3
// starts the next group and is not touched). Each channel has its own NVM
// controller and emulated NVM array. Binarization, Sobel and K-Means runs are
// checked: result bytes in the per-channel line regions (including the
// masked partial last line), K-Means sums over the whole group, the group
// switch from channel to channel, and a long write-back hold that must stall
// the kernel without losing or duplicating results.
module tb_proc_cell;
  import risp_pkg::*;
  localparam int unsigned N = 4, WORDS = 64, LPC = 5, GM_AW = 6;
  localparam int ROWS = WORDS * 9 / 16;
  localparam int unsigned AW = $clog2(WORDS), LW = $clog2(WORDS * WORD_BYTES + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  app_e app;
  logic go, done, clr_acc, cmd_valid, cmd_word, cmd_ready, in_valid, in_ready;
  logic line_valid, line_ready, stalled;
  logic [N-1:0] starts;
  logic [LW-1:0] len_bytes, cmd_len;
  logic [GM_AW-1:0] res_base, line_addr;
  logic [7:0] threshold;
  logic [6:0] img_width;
  logic [KM_K*KM_DIM*8-1:0] centers;
  logic [KM_SUM_W-1:0] km_sums [KM_NSUM];
  logic [1:0] cur_ch;
  logic [AW-1:0] cmd_addr;
  logic [WORD_W-1:0] in_data;
  logic [LINE_W-1:0] line_data;
  logic [LINE_BYTES-1:0] line_mask;

  proc_cell #(.N_CH(N), .MY_CH(0), .WORDS(WORDS), .LINES_PER_CH(LPC), .GM_AW(GM_AW)) dut (
    .clk, .rst_n, .app, .cell_on(1'b1), .starts, .go, .done, .len_bytes, .res_base, .threshold,
    .img_width, .centers, .clr_acc, .km_sums, .cur_ch, .cmd_valid, .cmd_word, .cmd_addr, .cmd_len,
    .cmd_ready, .in_valid, .in_data, .in_ready, .line_valid, .line_addr, .line_data, .line_mask,
    .line_ready, .stalled);

  // channels
  logic              n_cmd_ready [N], n_out_valid [N];
  logic [WORD_W-1:0] n_out_data [N];
  int                cmds [N];
  for (genvar c = 0; c < N; c++) begin : g_ch
    logic rd_en, wr_en, wr_ready, thr_stall, sel;
    logic [AW-1:0] rd_addr, wr_addr;
    logic [WORD_W-1:0] rd_data, wr_data;
    assign sel = (cur_ch == 2'(c));
    nvmc #(.WORDS(WORDS)) u_nvmc (.clk, .rst_n, .cmd_valid(cmd_valid && sel), .cmd_write(1'b0),
      .cmd_word, .cmd_addr, .cmd_len, .cmd_ready(n_cmd_ready[c]), .out_valid(n_out_valid[c]),
      .out_data(n_out_data[c]), .out_ready(in_ready && sel), .thr_stall, .wr_valid(1'b0),
      .wr_data('0), .wr_ready, .nvm_rd_en(rd_en), .nvm_rd_addr(rd_addr), .nvm_rd_data(rd_data),
      .nvm_wr_en(wr_en), .nvm_wr_addr(wr_addr), .nvm_wr_data(wr_data));
    nvm_emu #(.WORDS(WORDS)) u_nvm (.clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);
    always @(posedge clk) if (rst_n && cmd_valid && sel && n_cmd_ready[c]) cmds[c]++;
  end
  assign cmd_ready = n_cmd_ready[cur_ch];
  assign in_valid  = n_out_valid[cur_ch];
  assign in_data   = n_out_data[cur_ch];

  // line sink
  byte unsigned gm [64][LINE_BYTES];
  bit           written [64][LINE_BYTES];
  int checks = 0, failures = 0, stall_cycles = 0, hold = 0;
  always @(posedge clk) begin
    if (rst_n && stalled) stall_cycles++;
    if (rst_n && line_valid && line_ready)
      for (int b = 0; b < LINE_BYTES; b++) if (line_mask[b]) begin
        if (written[line_addr][b]) begin checks++; failures++; $display("byte written twice"); end
        written[line_addr][b] = 1;
        gm[line_addr][b] = line_data[b*8 +: 8];
      end
  end
  always @(negedge clk) begin
    if (hold > 0) begin hold--; line_ready = 0; end
    else line_ready = ($urandom_range(3) != 0);
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic byte unsigned nvm_byte(int c, int i);
    case (c)
      0: return g_ch[0].u_nvm.mem[i / 9][(i % 9)*8 +: 8];
      1: return g_ch[1].u_nvm.mem[i / 9][(i % 9)*8 +: 8];
      2: return g_ch[2].u_nvm.mem[i / 9][(i % 9)*8 +: 8];
      default: return g_ch[3].u_nvm.mem[i / 9][(i % 9)*8 +: 8];
    endcase
  endfunction

  task automatic run_job(int t_max);
    int t = 0;
    for (int l = 0; l < 64; l++) for (int b = 0; b < LINE_BYTES; b++) written[l][b] = 0;
    for (int c = 0; c < N; c++) cmds[c] = 0;
    @(negedge clk); go = 1; @(negedge clk); go = 0;
    while (!done && t < t_max) begin @(negedge clk); t++; end
    check(done, "job finished");
    check(cmds[0] == 1 && cmds[1] == 1 && cmds[2] == 1 && cmds[3] == 0, "one read per channel of the group");
  endtask

  task automatic expect_bytes(int c, byte unsigned exp [$]);
    int n = exp.size();
    for (int i = 0; i < n; i++) begin
      int l = int'(res_base) + c * LPC + i / LINE_BYTES, b = i % LINE_BYTES;
      check(written[l][b] && gm[l][b] == exp[i], $sformatf("ch %0d result %0d", c, i));
    end
    // nothing beyond the results
    check(!written[int'(res_base) + c * LPC + n / LINE_BYTES][n % LINE_BYTES], "mask of partial line");
  endtask

  initial begin
    byte unsigned exp [$];
    app = APP_BINARIZE; go = 0; clr_acc = 0; starts = 4'b1001; len_bytes = LW'(WORDS * 9);
    res_base = 6'd2; threshold = 8'd100; img_width = 7'd16; centers = '0;
    for (int c = 0; c < N; c++) for (int w = 0; w < WORDS; w++) begin
      case (c)
        0: g_ch[0].u_nvm.mem[w] = {$urandom, $urandom, $urandom};
        1: g_ch[1].u_nvm.mem[w] = {$urandom, $urandom, $urandom};
        2: g_ch[2].u_nvm.mem[w] = {$urandom, $urandom, $urandom};
        default: g_ch[3].u_nvm.mem[w] = {$urandom, $urandom, $urandom};
      endcase
    end
    repeat (2) @(posedge clk); rst_n = 1;

    // ---- Binarization, 576 bytes per channel -> 192 results
    run_job(5000);
    for (int c = 0; c < 3; c++) begin
      exp.delete();
      for (int p = 0; p < WORDS * 3; p++) begin
        int y;
        y = (77 * nvm_byte(c, 3*p) + 150 * nvm_byte(c, 3*p+1) + 29 * nvm_byte(c, 3*p+2)) >> 8;
        exp.push_back((y >= threshold) ? 1 : 0);
      end
      expect_bytes(c, exp);
    end

    // ---- Sobel, 16 x 36 tiles -> 14 x 34 = 476 results, with a long write-back hold
    app = APP_SOBEL;
    fork run_job(10000); begin repeat (150) @(negedge clk); hold = 400; end join
    check(stall_cycles > 0, "write-back stall happened");
    for (int c = 0; c < 3; c++) begin
      exp.delete();
      for (int r = 1; r < ROWS - 1; r++) for (int x = 1; x < 15; x++) begin
        int gx, gy, m;
        gx = (nvm_byte(c, (r-1)*16+x+1) + 2*nvm_byte(c, r*16+x+1) + nvm_byte(c, (r+1)*16+x+1))
           - (nvm_byte(c, (r-1)*16+x-1) + 2*nvm_byte(c, r*16+x-1) + nvm_byte(c, (r+1)*16+x-1));
        gy = (nvm_byte(c, (r+1)*16+x-1) + 2*nvm_byte(c, (r+1)*16+x) + nvm_byte(c, (r+1)*16+x+1))
           - (nvm_byte(c, (r-1)*16+x-1) + 2*nvm_byte(c, (r-1)*16+x) + nvm_byte(c, (r-1)*16+x+1));
        m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
        exp.push_back((m > 255) ? 255 : m);
      end
      expect_bytes(c, exp);
    end

    // ---- K-Means: 64 points per channel, sums over the group
    app = APP_KMEANS;
    for (int i = 0; i < KM_K * KM_DIM; i++) centers[i*8 +: 8] = 8'($urandom);
    @(negedge clk); clr_acc = 1; @(negedge clk); clr_acc = 0;
    run_job(5000);
    begin
      longint es [KM_NSUM];
      for (int i = 0; i < KM_NSUM; i++) es[i] = 0;
      for (int c = 0; c < 3; c++) begin
        exp.delete();
        for (int p = 0; p < WORDS; p++) begin
          longint best; int bi;
          best = -1; bi = 0;
          for (int k = 0; k < KM_K; k++) begin
            longint d; d = 0;
            for (int j = 0; j < KM_DIM; j++) begin
              int df; df = int'(nvm_byte(c, 9*p+j)) - int'(centers[(k*KM_DIM+j)*8 +: 8]);
              d += df * df;
            end
            if (best < 0 || d < best) begin best = d; bi = k; end
          end
          exp.push_back(8'(bi));
          for (int j = 0; j < KM_DIM; j++) es[bi*(KM_DIM+1)+j] += nvm_byte(c, 9*p+j);
          es[bi*(KM_DIM+1)+KM_DIM] += 1;
        end
        expect_bytes(c, exp);
      end
      for (int i = 0; i < KM_NSUM; i++) check(longint'(km_sums[i]) == es[i], $sformatf("sum %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
