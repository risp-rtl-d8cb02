// chan_mapper: assigns the NVM channels to the enabled processing cells.
//
// With n of the N_CH processing cells enabled, the channels are cut into n
// contiguous groups whose sizes differ by at most one: group i holds channels
// floor(i*N/n) .. floor((i+1)*N/n) - 1, and the processing cell on the first
// channel of a group processes the data of all channels in it (for n = 10 of
// 64: cell 0 takes channels 0-5, cell 6 channels 6-11, cell 12 channels 12-18,
// and so on). Channel c belongs to group floor(((c+1)*n - 1) / N); the mapper
// walks the channels once, Bresenham style, keeping that quotient and its
// remainder, so it needs no divider; done pulses N_CH + 1 cycles after the
// cycle `start` is sampled.
// Outputs: starts[c] (c opens a group, i.e. its cell is enabled), owner[c]
// (channel of the cell that serves c) and done. n is clamped to 1..N_CH.
// The grouping rule is the reference's example; the walk is this design's.
module chan_mapper
  import risp_pkg::*;
#(
  parameter int unsigned N_CH = N_CH_DEF,
  localparam int unsigned CHW = clog2_min1(N_CH),
  localparam int unsigned NW  = $clog2(N_CH + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [NW-1:0]   n_active,
  output logic [N_CH-1:0] starts,
  output logic [CHW-1:0]  owner [N_CH],
  output logic            busy,
  output logic            done
);
  logic [NW-1:0]  n_q;
  logic [CHW-1:0] c;       // channel being placed
  logic [NW:0]    r;       // ((c+1)*n - 1) mod N
  logic [CHW-1:0] cur_owner;

  logic [NW-1:0] n_clamped;
  assign n_clamped = (n_active == 0) ? NW'(1) : (n_active > NW'(N_CH)) ? NW'(N_CH) : n_active;

  logic [NW:0] r_next;
  logic        wrap;
  always_comb begin
    r_next = r + (NW+1)'(n_q);
    wrap   = r_next >= (NW+1)'(N_CH);
    if (wrap) r_next = r_next - (NW+1)'(N_CH);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      starts    <= '1;
      for (int i = 0; i < N_CH; i++) owner[i] <= CHW'(i);
      n_q       <= NW'(N_CH);
      c         <= '0;
      r         <= '0;
      cur_owner <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        n_q       <= n_clamped;
        c         <= '0;
        r         <= (NW+1)'(n_clamped) - 1'b1;
        cur_owner <= '0;
        starts    <= '0;
        starts[0] <= 1'b1;
        owner[0]  <= '0;
        busy      <= 1'b1;
      end else if (busy) begin
        if (32'(c) == N_CH - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          c <= c + 1'b1;
          r <= r_next;
          if (wrap) begin
            starts[c + 1'b1] <= 1'b1;
            owner[c + 1'b1]  <= c + 1'b1;
            cur_owner        <= c + 1'b1;
          end else begin
            owner[c + 1'b1]  <= cur_owner;
          end
        end
      end
    end
  end
endmodule
