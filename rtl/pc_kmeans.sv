// pc_kmeans: K-Means kernel of a processing cell.
//
// Each cycle it can take one point of KM_DIM 8-bit features (nine bytes:
// alpha = 9, as in the reference). The point's squared Euclidean distance to
// each of the KM_K current centres is computed in a pipeline (differences,
// squares, a four-level adder tree, a two-level minimum tree), and the index
// of the nearest centre (lowest index on a tie) leaves as the result byte
// exactly NDELAY_KMEANS = 15 cycles after the point is accepted (the
// reference n_delay; stages beyond the arithmetic are plain delay). At the
// same moment the point is added into the private per-cluster accumulators:
// KM_DIM feature sums and one point count per cluster, flattened in `sums` as
// index k*(KM_DIM+1)+d (d = KM_DIM is the count). clr_acc zeroes them at the
// start of an iteration; the public processing cell reads them at its end.
// All pipeline registers advance only when en is high; a result is taken in a
// cycle where out_valid and en are high. The distance metric, cluster count
// and feature width are this design's choices.
module pc_kmeans
  import risp_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                clr_acc,
  input  logic [KM_K*KM_DIM*8-1:0] centers,  // centre k, feature d at [(k*KM_DIM+d)*8 +: 8]
  input  logic                in_valid,
  input  logic [WORD_W-1:0]   in_point,      // feature d at [d*8 +: 8]
  output logic                out_valid,
  output logic [7:0]          out_byte,      // nearest cluster index
  output logic [KM_SUM_W-1:0] sums [KM_NSUM],
  output logic                busy
);
  localparam int unsigned LAT = NDELAY_KMEANS;

  // point and valid travel along the whole pipeline
  logic              v  [LAT];
  logic [WORD_W-1:0] pt [LAT];

  // arithmetic stages
  logic [7:0]  d1  [KM_K][KM_DIM];   // stage 1: |x - c|
  logic [15:0] q2  [KM_K][KM_DIM];   // stage 2: squares
  logic [17:0] a3  [KM_K][5];        // stage 3: 9 -> 5
  logic [18:0] a4  [KM_K][3];        // stage 4: 5 -> 3
  logic [19:0] a5  [KM_K][2];        // stage 5: 3 -> 2
  logic [20:0] a6  [KM_K];           // stage 6: distance
  logic [20:0] m7_d [2];             // stage 7: pairwise minimum
  logic [1:0]  m7_i [2];
  logic [1:0]  lbl [8:LAT];          // stage 8: label, then delayed

  function automatic logic [7:0] absdiff(logic [7:0] a, logic [7:0] b);
    return (a >= b) ? a - b : b - a;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < LAT; s++) begin v[s] <= 1'b0; pt[s] <= '0; end
      for (int s = 8; s <= LAT; s++) lbl[s] <= '0;
    end else if (en) begin
      v[0]  <= in_valid;
      pt[0] <= in_point;
      for (int s = 1; s < LAT; s++) begin
        v[s]  <= v[s-1];
        pt[s] <= pt[s-1];
      end
      // stage 8: final minimum
      lbl[8] <= (m7_d[1] < m7_d[0]) ? m7_i[1] : m7_i[0];
      for (int s = 9; s <= LAT; s++) lbl[s] <= lbl[s-1];
    end
  end

  // datapath registers need no reset: their values are qualified by v[]
  always_ff @(posedge clk) begin
    if (en) begin
      for (int k = 0; k < KM_K; k++) begin
        for (int d = 0; d < KM_DIM; d++) begin
          d1[k][d] <= absdiff(in_point[d*8 +: 8], centers[(k*KM_DIM+d)*8 +: 8]);
          q2[k][d] <= 16'(d1[k][d]) * 16'(d1[k][d]);
        end
        a3[k][0] <= 18'(q2[k][0]) + 18'(q2[k][1]);
        a3[k][1] <= 18'(q2[k][2]) + 18'(q2[k][3]);
        a3[k][2] <= 18'(q2[k][4]) + 18'(q2[k][5]);
        a3[k][3] <= 18'(q2[k][6]) + 18'(q2[k][7]);
        a3[k][4] <= 18'(q2[k][8]);
        a4[k][0] <= 19'(a3[k][0]) + 19'(a3[k][1]);
        a4[k][1] <= 19'(a3[k][2]) + 19'(a3[k][3]);
        a4[k][2] <= 19'(a3[k][4]);
        a5[k][0] <= 20'(a4[k][0]) + 20'(a4[k][1]);
        a5[k][1] <= 20'(a4[k][2]);
        a6[k]    <= 21'(a5[k][0]) + 21'(a5[k][1]);
      end
      for (int p = 0; p < 2; p++) begin
        m7_d[p] <= (a6[2*p+1] < a6[2*p]) ? a6[2*p+1] : a6[2*p];
        m7_i[p] <= (a6[2*p+1] < a6[2*p]) ? 2'(2*p+1) : 2'(2*p);
      end
    end
  end

  // result and private accumulators
  assign out_valid = v[LAT-1];
  assign out_byte  = 8'(lbl[LAT]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < KM_NSUM; i++) sums[i] <= '0;
    end else if (clr_acc) begin
      for (int i = 0; i < KM_NSUM; i++) sums[i] <= '0;
    end else if (en && out_valid) begin
      for (int d = 0; d < KM_DIM; d++)
        sums[int'(lbl[LAT])*(KM_DIM+1)+d] <= sums[int'(lbl[LAT])*(KM_DIM+1)+d] + KM_SUM_W'(pt[LAT-1][d*8 +: 8]);
      sums[int'(lbl[LAT])*(KM_DIM+1)+KM_DIM] <= sums[int'(lbl[LAT])*(KM_DIM+1)+KM_DIM] + 1'b1;
    end
  end

  always_comb begin
    busy = 1'b0;
    for (int s = 0; s < LAT; s++) busy |= v[s];
  end
endmodule
