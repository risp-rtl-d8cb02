// pc_sobel: Sobel edge-detection kernel of a processing cell.
//
// Input is a byte stream of 8-bit grey pixels in row order (alpha = 1) of a
// tile `width` pixels wide. Two line buffers hold the previous two rows and a
// 3x3 window slides along the current row. For every pixel at row r >= 2,
// column c >= 2 the kernel emits the gradient magnitude |Gx| + |Gy| (clipped
// to 255) of the window centred at (r-1, c-1); the one-pixel border gets no
// result, so output and input are about the same size (reference beta = 1).
// Timing: a result is valid four cycles after the cycle its last window pixel
// is accepted (n_delay = 4, as in the reference): window update, weighted
// partial sums, differences, magnitude. All registers advance only when en is
// high, and a result is taken in a cycle where out_valid and en are high;
// clear restarts the row/column count for a new tile. The tile layout, border
// handling and |Gx| + |Gy| magnitude are this design's choices.
module pc_sobel
  import risp_pkg::*;
#(
  parameter int unsigned MAX_W = SOBEL_MAX_W,
  localparam int unsigned XW   = $clog2(MAX_W + 1),
  localparam int unsigned IW   = $clog2(MAX_W)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          clear,
  input  logic [XW-1:0] width,     // 3 .. MAX_W
  input  logic          in_valid,
  input  logic [7:0]    in_byte,
  output logic          out_valid,
  output logic [7:0]    out_byte,
  output logic          busy
);
  logic [7:0] lb_prev [MAX_W];   // row r-1
  logic [7:0] lb_prev2 [MAX_W];  // row r-2
  logic [XW-1:0] col;
  logic [15:0]   row;

  // window: w[row][col], row 0 = oldest, col 2 = newest
  logic [7:0] w [3][3];
  logic       s1_v, s2_v, s3_v;
  logic [10:0] gx_p, gx_n, gy_p, gy_n;   // stage 2: weighted sums, <= 4*255
  logic [10:0] ax, ay;                  // stage 3: |Gx|, |Gy|

  always_ff @(posedge clk) begin
    if (en && !clear && in_valid) begin
      lb_prev2[col[IW-1:0]] <= lb_prev[col[IW-1:0]];
      lb_prev[col[IW-1:0]]  <= in_byte;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0; row <= '0;
      s1_v <= 1'b0; s2_v <= 1'b0; s3_v <= 1'b0; out_valid <= 1'b0;
      out_byte <= '0;
      gx_p <= '0; gx_n <= '0; gy_p <= '0; gy_n <= '0; ax <= '0; ay <= '0;
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) w[i][j] <= '0;
    end else if (en) begin
      // stage 1: line buffers and window
      s1_v <= 1'b0;
      if (clear) begin
        col <= '0;
        row <= '0;
      end else if (in_valid) begin
        for (int i = 0; i < 3; i++) begin
          w[i][0] <= w[i][1];
          w[i][1] <= w[i][2];
        end
        w[0][2] <= lb_prev2[col[IW-1:0]];
        w[1][2] <= lb_prev[col[IW-1:0]];
        w[2][2] <= in_byte;
        s1_v <= (row >= 2) && (col >= 2);
        if (col == width - 1'b1) begin
          col <= '0;
          row <= row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
      // stage 2: positive and negative parts of Gx and Gy
      s2_v <= s1_v;
      gx_p <= 11'(w[0][2]) + 11'(w[1][2]) * 2 + 11'(w[2][2]);
      gx_n <= 11'(w[0][0]) + 11'(w[1][0]) * 2 + 11'(w[2][0]);
      gy_p <= 11'(w[2][0]) + 11'(w[2][1]) * 2 + 11'(w[2][2]);
      gy_n <= 11'(w[0][0]) + 11'(w[0][1]) * 2 + 11'(w[0][2]);
      // stage 3: absolute values
      s3_v <= s2_v;
      ax <= (gx_p >= gx_n) ? gx_p - gx_n : gx_n - gx_p;
      ay <= (gy_p >= gy_n) ? gy_p - gy_n : gy_n - gy_p;
      // stage 4: magnitude, clipped
      out_valid <= s3_v;
      out_byte  <= ((ax + ay) > 11'd255) ? 8'd255 : 8'(ax + ay);
    end
  end

  assign busy = s1_v || s2_v || s3_v || out_valid;
endmodule
