// tb_risp_top: end-to-end test of the reconfigurable unit at reduced size
// (8 channels, 64 NVM words of 9 bytes per channel).
// Sequence: (1) regular mode: the host writes DRAM lines and the RU copies
// them into channel 0's NVM, then back into other lines, while a host access
// during the job must be refused; (2) Binarization with 3 of 8 cells chosen
// by the channel planner from the bandwidth model, so cells switch between
// the channels of their group; (3) Sobel on all 8 cells; (4) K-Means, two
// iterations on 4 cells, with the channel bandwidth limiting the 9-byte
// beats. All results are read by the host and compared with references
// computed here; the Binarization job time is compared with the pipelined
// model (group bytes / alpha + overhead). Each mechanism is counted and must
// happen at least once.
module tb_risp_top;
  import risp_pkg::*;
  localparam int unsigned N = 8, WORDS = 64;
  localparam int unsigned LPC = (WORDS * 9 + 127) / 128;
  localparam int unsigned GM_LINES = N * LPC + 1;
  localparam int unsigned GM_AW = $clog2(GM_LINES);
  localparam int unsigned BYTES = WORDS * 9;
  localparam int unsigned W = 16, ROWS = BYTES / W;
  localparam int unsigned REG_WORDS = 32;   // words of channel 0 loaded in regular mode
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cpu_we; logic [4:0] cpu_addr; logic [31:0] cpu_wdata, cpu_rdata;
  logic host_req, host_we, host_gnt, irq, busy;
  logic [GM_AW-1:0] host_addr;
  logic [LINE_W-1:0] host_wdata, host_rdata;
  logic [LINE_BYTES-1:0] host_wmask;
  logic [N-1:0] cell_power_en;
  logic [3:0] n_active;
  logic ev_nvm_bw_stall, ev_cell_stall, ev_group_switch;

  risp_top #(.N_CH(N), .NVM_WORDS(WORDS)) dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int m_regular = 0, m_isp = 0, m_host_refused = 0, m_irq = 0, m_planner_cut = 0;
  int m_group_switch = 0, m_bw_stall = 0, m_reduce = 0, m_app_switch = 0;

  always @(posedge clk) if (rst_n) begin
    if (ev_group_switch) m_group_switch++;
    if (ev_nvm_bw_stall) m_bw_stall++;
    if (dut.reduce) m_reduce++;
    if (host_req && !host_gnt) m_host_refused++;
  end

  // NVM contents: reference copy, loaded into the channels by a back door
  logic [WORD_W-1:0] nvm_ref [N][WORDS];
  event load_ev;
  for (genvar c = 0; c < N; c++) begin : g_ld
    always @(load_ev) for (int w = (c == 0) ? REG_WORDS : 0; w < WORDS; w++) dut.g_ch[c].u_nvm.mem[w] = nvm_ref[c][w];
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
  task automatic host_write(int line, logic [LINE_W-1:0] data);
    @(negedge clk); host_req = 1; host_we = 1; host_addr = GM_AW'(line); host_wdata = data; host_wmask = '1;
    #1; while (!host_gnt) begin @(negedge clk); #1; end
    @(negedge clk); host_req = 0;
  endtask
  task automatic host_read(int line, output logic [LINE_W-1:0] data);
    @(negedge clk); host_req = 1; host_we = 0; host_addr = GM_AW'(line);
    #1; while (!host_gnt) begin @(negedge clk); #1; end
    @(posedge clk); #1; data = host_rdata;
    @(negedge clk); host_req = 0;
  endtask
  task automatic run_job(int tmax, output int cycles);
    int t = 0;
    wr(0, 1);
    while (!irq && t < tmax) begin @(negedge clk); t++; end
    check(irq, "job completes with an interrupt");
    if (irq) m_irq++;
    rd(22, cycles);
    wr(0, 2);
  endtask
  // compare results of channel c with exp
  task automatic check_region(int c, byte unsigned exp [$], string what);
    logic [LINE_W-1:0] l;
    int bad = 0;
    for (int i = 0; i < exp.size(); i++) begin
      if (i % LINE_BYTES == 0) host_read(c * LPC + i / LINE_BYTES, l);
      if (l[(i % LINE_BYTES)*8 +: 8] != exp[i]) bad++;
    end
    check(bad == 0, $sformatf("%s channel %0d: %0d wrong of %0d", what, c, bad, exp.size()));
  endtask

  initial begin
    int cyc;
    byte unsigned exp [$];
    logic [LINE_W-1:0] l;
    cpu_we = 0; cpu_addr = 0; cpu_wdata = 0;
    host_req = 0; host_we = 0; host_addr = 0; host_wdata = 0; host_wmask = 0;
    for (int c = 0; c < N; c++) for (int w = 0; w < WORDS; w++) nvm_ref[c][w] = {$urandom, $urandom, $urandom};
    repeat (3) @(posedge clk); rst_n = 1;

    // ---------- (1) regular mode: DRAM -> NVM channel 0 -> DRAM ----------
    for (int w = 0; w < REG_WORDS; w++) host_write(w, LINE_W'(nvm_ref[0][w]));
    wr(1, 32'(MODE_REGULAR)); wr(16, 1); wr(17, REG_WORDS); wr(18, 0); wr(19, 0); wr(20, 0);
    fork
      run_job(5000, cyc);
      begin repeat (10) @(negedge clk); host_read(0, l); end   // must wait for the job
    join
    m_regular++;
    check(m_host_refused > 0, "host refused while the RU owns the DRAM");
    for (int w = 0; w < REG_WORDS; w++) check(dut.g_ch[0].u_nvm.mem[w] == nvm_ref[0][w], $sformatf("NVM word %0d written in regular mode: %h vs %h", w, dut.g_ch[0].u_nvm.mem[w], nvm_ref[0][w]));
    wr(16, 0); wr(17, 8); wr(19, 3 * LPC);
    run_job(5000, cyc);
    for (int w = 0; w < 8; w++) begin
      host_read(3 * LPC + w, l);
      check(l[WORD_W-1:0] == nvm_ref[0][w], "NVM word read back in regular mode");
    end
    -> load_ev;

    // ---------- (2) Binarization, planner picks 3 cells from the bandwidth model ----------
    // 190 MB/s per channel, host 570 MB/s, beta = 1 -> round(3) = 3
    wr(9, 0); wr(10, 0); wr(11, 0); wr(12, 190); wr(13, 570); wr(14, 1000); wr(15, 2);
    wr(2, 0); wr(3, BYTES); wr(4, 110); wr(7, 0);
    wr(1, 32'(MODE_ISP) | (32'(APP_BINARIZE) << 1));
    m_isp++; m_app_switch++;
    run_job(20000, cyc);
    check(n_active == 3 && cell_power_en == 8'b0010_0101, $sformatf("planner: %0d cells %b", n_active, cell_power_en));
    if (n_active < N) m_planner_cut++;
    // the largest group holds 3 channels: 3 * 576 bytes at alpha = 1
    check(cyc >= 3 * BYTES && cyc <= 3 * BYTES + 200, $sformatf("Binarization job took %0d cycles", cyc));
    for (int c = 0; c < N; c++) begin
      exp.delete();
      for (int p = 0; p < BYTES / 3; p++) begin
        int y;
        y = (77 * nb(c, 3*p) + 150 * nb(c, 3*p+1) + 29 * nb(c, 3*p+2)) >> 8;
        exp.push_back((y >= 110) ? 1 : 0);
      end
      check_region(c, exp, "Binarization");
    end

    // ---------- (3) Sobel on all cells ----------
    wr(15, 0); wr(2, N); wr(5, W);
    wr(1, 32'(MODE_ISP) | (32'(APP_SOBEL) << 1));
    m_app_switch++;
    run_job(20000, cyc);
    check(n_active == N, "Sobel on all cells");
    check(cyc >= BYTES && cyc <= BYTES + 100, $sformatf("Sobel job took %0d cycles", cyc));
    for (int c = 0; c < N; c++) begin
      exp.delete();
      for (int r = 1; r < ROWS - 1; r++) for (int x = 1; x < W - 1; x++) begin
        int gx, gy, m;
        gx = (nb(c, (r-1)*W+x+1) + 2*nb(c, r*W+x+1) + nb(c, (r+1)*W+x+1))
           - (nb(c, (r-1)*W+x-1) + 2*nb(c, r*W+x-1) + nb(c, (r+1)*W+x-1));
        gy = (nb(c, (r+1)*W+x-1) + 2*nb(c, (r+1)*W+x) + nb(c, (r+1)*W+x+1))
           - (nb(c, (r-1)*W+x-1) + 2*nb(c, (r-1)*W+x) + nb(c, (r-1)*W+x+1));
        m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
        exp.push_back((m > 255) ? 255 : m);
      end
      check_region(c, exp, "Sobel");
    end

    // ---------- (4) K-Means, 2 iterations on 4 cells ----------
    begin
      byte unsigned cen [KM_K][KM_DIM];
      byte unsigned lab [N][WORDS];
      for (int k = 0; k < KM_K; k++) for (int d = 0; d < KM_DIM; d++) begin
        cen[k][d] = 8'($urandom);
        wr(21, ((k * KM_DIM + d) << 8) | cen[k][d]);
      end
      wr(2, 4); wr(6, 2); wr(8, N * LPC);
      wr(1, 32'(MODE_ISP) | (32'(APP_KMEANS) << 1));
      m_app_switch++;
      run_job(50000, cyc);
      // reference: two Lloyd iterations with integer means
      for (int it = 0; it < 2; it++) begin
        longint s [KM_K][KM_DIM+1];
        for (int k = 0; k < KM_K; k++) for (int d = 0; d <= KM_DIM; d++) s[k][d] = 0;
        for (int c = 0; c < N; c++) for (int p = 0; p < WORDS; p++) begin
          longint best; int bi;
          best = -1; bi = 0;
          for (int k = 0; k < KM_K; k++) begin
            longint dst; dst = 0;
            for (int d = 0; d < KM_DIM; d++) begin
              int df; df = int'(nb(c, 9*p+d)) - int'(cen[k][d]);
              dst += df * df;
            end
            if (best < 0 || dst < best) begin best = dst; bi = k; end
          end
          lab[c][p] = 8'(bi);
          for (int d = 0; d < KM_DIM; d++) s[bi][d] += nb(c, 9*p+d);
          s[bi][KM_DIM] += 1;
        end
        for (int k = 0; k < KM_K; k++) if (s[k][KM_DIM] != 0)
          for (int d = 0; d < KM_DIM; d++) cen[k][d] = 8'(s[k][d] / s[k][KM_DIM]);
      end
      for (int c = 0; c < N; c++) begin
        exp.delete();
        for (int p = 0; p < WORDS; p++) exp.push_back(lab[c][p]);
        check_region(c, exp, "K-Means labels");
      end
      host_read(N * LPC, l);
      for (int k = 0; k < KM_K; k++) for (int d = 0; d < KM_DIM; d++)
        check(l[(k*KM_DIM+d)*8 +: 8] == cen[k][d], $sformatf("centre %0d,%0d", k, d));
    end

    // ---------- mechanisms ----------
    check(m_regular > 0, "regular mode used");
    check(m_isp > 0, "ISP mode used");
    check(m_host_refused > 0, "host refused during a job");
    check(m_irq >= 5, "interrupts");
    check(m_planner_cut > 0, "planner enabled fewer cells");
    check(m_group_switch > 0, "cells switched channels within a group");
    check(m_bw_stall > 0, "channel bandwidth limited a read");
    check(m_reduce == 2, $sformatf("K-Means reductions: %0d", m_reduce));
    check(m_app_switch >= 3, "application switched");
    $display("mechanisms: regular=%0d isp=%0d host_refused=%0d irq=%0d planner_cut=%0d group_switch=%0d bw_stall=%0d reduce=%0d app_switch=%0d",
             m_regular, m_isp, m_host_refused, m_irq, m_planner_cut, m_group_switch, m_bw_stall, m_reduce, m_app_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
