// tb_pub_cell: self-checking test of the public processing cell (8 channels).
// Part 1: cells offer random result lines while the memory grant is randomly
// withheld; every line must reach global memory exactly once with its data,
// address and mask, and under full contention the arbiter must rotate.
// Part 2: K-Means reduction over the enabled cells' random sums; new centres
// must equal sum/count (old centre kept for an empty cluster), be written to
// cen_line and be visible on `centers`. Centre writes from the CPU are checked.
module tb_pub_cell;
  import risp_pkg::*;
  localparam int unsigned N = 8;
  localparam int unsigned GM_AW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] line_valid, line_ready, starts;
  logic [GM_AW-1:0] line_addr [N];
  logic [LINE_W-1:0] line_data [N];
  logic [LINE_BYTES-1:0] line_mask [N];
  logic gm_req, gm_gnt, reduce, reduce_done, cen_we;
  logic [GM_AW-1:0] gm_addr, cen_line;
  logic [LINE_W-1:0] gm_wdata;
  logic [LINE_BYTES-1:0] gm_wmask;
  logic [KM_SUM_W-1:0] cell_sums [N][KM_NSUM];
  logic [5:0] cen_widx;
  logic [7:0] cen_wdata;
  logic [KM_K*KM_DIM*8-1:0] centers;

  pub_cell #(.N_CH(N), .GM_AW(GM_AW)) dut (.*);

  bit in_reduce = 0;  // during a reduction every memory write is the centre line
  int checks = 0, failures = 0;
  int sent [N], got [N];
  int last_p = -1;
  bit taken [N];

  // memory side: check each granted line against the offering cell
  always @(posedge clk) if (rst_n && gm_req && gm_gnt && !in_reduce) begin
    int p;
    p = -1;
    for (int i = 0; i < N; i++) if (line_ready[i]) p = i;
    checks++;
    if (p < 0 || !line_valid[p]) begin failures++; $display("grant without line"); end
    else begin
      if (gm_addr !== line_addr[p] || gm_wdata !== line_data[p] || gm_wmask !== line_mask[p]) begin
        failures++; $display("line content from %0d wrong", p);
      end
      got[p]++;
      taken[p] = 1;
    end
  end

  initial begin
    logic [7:0] old_c [KM_K*KM_DIM];
    longint acc [KM_NSUM];
    line_valid = '0; starts = '0; reduce = 0; cen_we = 0; cen_widx = 0; cen_wdata = 0;
    gm_gnt = 0; cen_line = 8'd200;
    for (int i = 0; i < N; i++) begin taken[i] = 0; line_addr[i] = 0; line_data[i] = 0; line_mask[i] = 0; sent[i] = 0; got[i] = 0; end
    for (int i = 0; i < N; i++) for (int j = 0; j < KM_NSUM; j++) cell_sums[i][j] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // ---- part 1: random traffic
    for (int cyc = 0; cyc < 800; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        if (taken[i]) begin line_valid[i] = 0; taken[i] = 0; end
        if (!line_valid[i] && $urandom_range(2) == 0) begin
          line_valid[i] = 1; line_addr[i] = GM_AW'($urandom); line_mask[i] = {$urandom, $urandom, $urandom, $urandom};
          for (int w = 0; w < LINE_W / 32; w++) line_data[i][w*32 +: 32] = $urandom;
          sent[i]++;
        end
      end
      gm_gnt = ($urandom_range(3) != 0);
      #1;
    end
    // drain
    @(negedge clk);
    for (int i = 0; i < N; i++) if (taken[i]) begin line_valid[i] = 0; taken[i] = 0; end
    gm_gnt = 1;
    while (line_valid != 0) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) if (taken[i]) begin line_valid[i] = 0; taken[i] = 0; end
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (sent[i] != got[i]) begin failures++; $display("cell %0d sent %0d got %0d", i, sent[i], got[i]); end
    end
    // full contention: grants must visit cells in order
    @(negedge clk); line_valid = '1;
    for (int k = 0; k < 2 * N; k++) begin
      int p;
      p = -1;
      #1; for (int i = 0; i < N; i++) if (line_ready[i]) p = i;
      checks++;
      if (last_p >= 0 && p != (last_p + 1) % N) begin failures++; $display("rotation %0d -> %0d", last_p, p); end
      last_p = p;
      @(negedge clk);
    end
    line_valid = '0;
    for (int i = 0; i < N; i++) taken[i] = 0;
    // ---- part 2: centres from the CPU, then reduction
    for (int i = 0; i < KM_K * KM_DIM; i++) begin
      @(negedge clk); cen_we = 1; cen_widx = 6'(i); cen_wdata = 8'($urandom); old_c[i] = cen_wdata;
    end
    @(negedge clk); cen_we = 0;
    for (int i = 0; i < KM_K * KM_DIM; i++) begin
      checks++; if (centers[i*8 +: 8] !== old_c[i]) begin failures++; $display("centre write %0d", i); end
    end
    starts = 8'b1001_0101;
    for (int j = 0; j < KM_NSUM; j++) acc[j] = 0;
    for (int i = 0; i < N; i++) for (int k = 0; k < KM_K; k++) begin
      int cnt;
      cnt = (k == 2) ? 0 : $urandom_range(0, 50);
      cell_sums[i][k*(KM_DIM+1)+KM_DIM] = cnt;
      for (int d = 0; d < KM_DIM; d++) cell_sums[i][k*(KM_DIM+1)+d] = cnt * $urandom_range(0, 255);
      if (starts[i]) for (int d = 0; d <= KM_DIM; d++) acc[k*(KM_DIM+1)+d] += cell_sums[i][k*(KM_DIM+1)+d];
    end
    in_reduce = 1;
    @(negedge clk); reduce = 1; @(negedge clk); reduce = 0;
    begin
      int t; bit line_seen;
      t = 0; line_seen = 0;
      while (!reduce_done && t < 5000) begin
        @(posedge clk); #1; t++;
        if (gm_req && gm_gnt) begin
          line_seen = 1;
          checks++;
          if (gm_addr != cen_line || gm_wdata[KM_K*KM_DIM*8-1:0] !== centers) begin failures++; $display("centre line wrong"); end
        end
      end
      checks++; if (!line_seen) begin failures++; $display("no centre line"); end
      repeat (2) @(posedge clk); in_reduce = 0;
    end
    for (int k = 0; k < KM_K; k++) for (int d = 0; d < KM_DIM; d++) begin
      longint cnt;
      int e;
      cnt = acc[k*(KM_DIM+1)+KM_DIM];
      e = (cnt == 0) ? old_c[k*KM_DIM+d] : int'(acc[k*(KM_DIM+1)+d] / cnt);
      checks++;
      if (centers[(k*KM_DIM+d)*8 +: 8] != 8'(e)) begin failures++; $display("centre %0d,%0d = %0d exp %0d", k, d, centers[(k*KM_DIM+d)*8 +: 8], e); end
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
