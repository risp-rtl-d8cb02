// pc_binarize: Binarization kernel of a processing cell.
//
// Input is a byte stream of RGB pixels (R, G, B, one byte per cycle: alpha =
// 1); each pixel becomes one result byte, 1 when its luminance reaches the
// threshold and 0 otherwise, so three input bytes give one output byte (the
// reference reduction factor beta = 3). Luminance is the usual integer
// approximation (77 R + 150 G + 29 B) / 256, three multiplies per pixel.
// Timing: the result of a pixel is valid two cycles after the cycle its blue
// byte is accepted (n_delay = 2, as in the reference). All registers advance
// only when en is high, so the cell can stall the whole pipeline, and a
// result is taken in a cycle where both out_valid and en are high; clear
// restarts the R/G/B phase at the next byte. busy is high while a pixel is in
// the pipeline. The byte order and the luminance weights are this design's
// choice; only the function, alpha, beta and n_delay are from the reference.
module pc_binarize (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       clear,
  input  logic [7:0] threshold,
  input  logic       in_valid,
  input  logic [7:0] in_byte,
  output logic       out_valid,
  output logic [7:0] out_byte,
  output logic       busy
);
  logic [1:0]  phase;      // 0: expecting R, 1: G, 2: B
  logic [7:0]  r_q, g_q;
  logic        s1_v;
  logic [7:0]  s1_y;     // luminance

  logic [15:0] y_full;     // at most 255 * 256, fits 16 bits
  assign y_full = 16'(r_q) * 16'd77 + 16'(g_q) * 16'd150 + 16'(in_byte) * 16'd29;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      r_q       <= '0;
      g_q       <= '0;
      s1_v      <= 1'b0;
      s1_y      <= '0;
      out_valid <= 1'b0;
      out_byte  <= '0;
    end else if (en) begin
      s1_v <= 1'b0;
      if (clear) begin
        phase <= '0;
      end else if (in_valid) begin
        unique case (phase)
          2'd0:    begin r_q <= in_byte; phase <= 2'd1; end
          2'd1:    begin g_q <= in_byte; phase <= 2'd2; end
          default: begin
            s1_y  <= y_full[15:8];
            s1_v  <= 1'b1;
            phase <= 2'd0;
          end
        endcase
      end
      out_valid <= s1_v;
      out_byte  <= {7'd0, s1_y >= threshold};
    end
  end

  assign busy = s1_v || out_valid;
endmodule
