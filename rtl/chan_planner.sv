// chan_planner: chooses how many processing cells to enable.
//
// For an application the embedded CPU supplies two linear models of the
// RISP unit versus the number of enabled channels n:
//   power(n)     = p0_mw + p1_mw * n            [mW]
//   bandwidth(n) = bw_mbps * n                  [MB/s of raw data processed]
// and the constraints: a power budget, and the host-interface bandwidth, which
// results (raw data shrunk by the reduction factor beta, given in thousandths)
// cannot exceed. With both enabled the choice is the smaller of
//   n_power = round((budget_mw - p0_mw) / p1_mw)
//   n_bw    = round(host_mbps * beta / bw_mbps)
// each clamped to 1..N_CH; a disabled constraint counts as N_CH. Rounding to
// the nearest integer reproduces the reference example for Sobel (p0 = 1.858 W,
// p1 = 0.032 W, budget 3 W -> 36; 0.19 GB/s per channel, SATA 1.97 GB/s,
// beta = 1 -> 10). Rounding is evaluated without a divider as the largest n
// with 2*model(n) <= 2*limit + slope, checked for every n in parallel; the
// result is registered one cycle after the inputs.
module chan_planner
  import risp_pkg::*;
#(
  parameter int unsigned N_CH = N_CH_DEF,
  localparam int unsigned NW  = $clog2(N_CH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          use_power,
  input  logic          use_bw,
  input  logic [15:0]   p0_mw,
  input  logic [15:0]   p1_mw,
  input  logic [15:0]   budget_mw,
  input  logic [15:0]   bw_mbps,     // per-channel processing bandwidth
  input  logic [15:0]   host_mbps,
  input  logic [15:0]   beta_milli,
  output logic [NW-1:0] n_power,
  output logic [NW-1:0] n_bw,
  output logic [NW-1:0] n_sel
);
  logic [NW-1:0] np_c, nb_c;

  always_comb begin
    np_c = NW'(1);
    nb_c = NW'(1);
    for (int n = 2; n <= N_CH; n++) begin
      // 2*(p0 + p1*n) <= 2*budget + p1
      if (2 * (33'(p0_mw) + 33'(p1_mw) * 33'(n)) <= 2 * 33'(budget_mw) + 33'(p1_mw))
        np_c = NW'(n);
      // 2*1000*bw*n <= 2*host*beta + 1000*bw
      if (2 * 64'(bw_mbps) * 64'(n) * 1000 <= 2 * 64'(host_mbps) * 64'(beta_milli) + 64'(bw_mbps) * 1000)
        nb_c = NW'(n);
    end
    if (!use_power) np_c = NW'(N_CH);
    if (!use_bw)    nb_c = NW'(N_CH);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_power <= NW'(N_CH);
      n_bw    <= NW'(N_CH);
      n_sel   <= NW'(N_CH);
    end else begin
      n_power <= np_c;
      n_bw    <= nb_c;
      n_sel   <= (np_c < nb_c) ? np_c : nb_c;
    end
  end
endmodule
