// udiv_seq: sequential unsigned divider (restoring, one quotient bit per
// cycle). start loads num/den; done pulses W cycles later with quot = num/den
// (den = 0 gives all ones). Used by the public processing cell to turn
// K-Means cluster sums into means. Interface: start/num/den in, busy, done
// and quot out. The divider is this design's own choice: the reference only
// says that the new cluster centres are computed after each iteration.
module udiv_seq #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] num,
  input  logic [W-1:0] den,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quot
);
  logic [W-1:0] rem, d_q;
  logic [$clog2(W+1)-1:0] cnt;
  logic [W:0] trial;

  assign trial = {rem, quot[W-1]} - {1'b0, d_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem <= '0; d_q <= '0; quot <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rem  <= '0;
        d_q  <= den;
        quot <= num;
        cnt  <= ($clog2(W+1))'(W);
        busy <= 1'b1;
      end else if (busy) begin
        if (!trial[W]) begin
          rem  <= trial[W-1:0];
          quot <= {quot[W-2:0], 1'b1};
        end else begin
          rem  <= {rem[W-2:0], quot[W-1]};
          quot <= {quot[W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
