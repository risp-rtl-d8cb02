// nvmc: NVM controller of one RISP channel.
//
// It executes the read and write commands that the processing cell of its
// channel issues on the channel's NVM array (nvm_emu). A read streams cmd_len
// bytes starting at word cmd_addr, either one byte per beat (alpha = 1 kernels)
// or one nine-byte word per beat (alpha = 9, K-Means, and the regular-mode
// path); byte beats carry the byte in out_data[7:0]. A write stores cmd_len
// words taken from the wr_* handshake. Reads are prefetched through a
// two-word queue so the RAM latency does not cost bandwidth.
//
// The channel's read bandwidth b_ch is enforced with a credit counter: every
// cycle earns B_CH_MBPS credit, and a beat of n bytes spends n * F_RU_MHZ, so
// on average at most B_CH_MBPS / F_RU_MHZ bytes leave per cycle (4 bytes at
// the reference 400 MB/s and 100 MHz). Holding out_valid low for lack of
// credit is the channel-bandwidth stall. The command handshake, the credit
// scheme and the lack of write throttling are this design's choices.
module nvmc
  import risp_pkg::*;
#(
  parameter int unsigned WORDS     = NVM_WORDS_DEF,
  parameter int unsigned B_CH_MBPS = B_CH_MBPS_DEF,
  parameter int unsigned F_RU_MHZ  = F_RU_MHZ_DEF,
  localparam int unsigned AW       = $clog2(WORDS),
  localparam int unsigned LW       = $clog2(WORDS * WORD_BYTES + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // command from the processing cell
  input  logic              cmd_valid,
  input  logic              cmd_write,   // 0: read, 1: write
  input  logic              cmd_word,    // read beats: 0 = one byte, 1 = nine bytes
  input  logic [AW-1:0]     cmd_addr,    // first word
  input  logic [LW-1:0]     cmd_len,     // read: bytes, write: words
  output logic              cmd_ready,   // idle, command accepted when valid
  // read stream
  output logic              out_valid,
  output logic [WORD_W-1:0] out_data,
  input  logic              out_ready,
  output logic              thr_stall,   // a beat was ready but held for bandwidth
  // write stream
  input  logic              wr_valid,
  input  logic [WORD_W-1:0] wr_data,
  output logic              wr_ready,
  // NVM array
  output logic              nvm_rd_en,
  output logic [AW-1:0]     nvm_rd_addr,
  input  logic [WORD_W-1:0] nvm_rd_data,
  output logic              nvm_wr_en,
  output logic [AW-1:0]     nvm_wr_addr,
  output logic [WORD_W-1:0] nvm_wr_data
);
  localparam int unsigned CW    = $clog2(WORD_BYTES * F_RU_MHZ + B_CH_MBPS + 1) + 1;
  localparam int unsigned C_CAP = WORD_BYTES * F_RU_MHZ + B_CH_MBPS;

  typedef enum logic [1:0] {S_IDLE, S_READ, S_WRITE} state_e;
  state_e state;

  logic            word_mode;
  logic [AW-1:0]   fetch_addr;
  logic [LW-1:0]   words_to_fetch;   // words still to request from the RAM
  logic [LW-1:0]   bytes_left;       // bytes still to send
  logic            inflight;         // a RAM read returns this cycle
  logic [WORD_W-1:0] q_data [2];
  logic [1:0]      q_cnt;
  logic            q_rd;             // head index
  logic [3:0]      byte_idx;
  logic [CW-1:0]   credit;

  // ---- beat formation -------------------------------------------------------
  logic [3:0]  beat_bytes;
  logic [CW-1:0] beat_cost;
  logic        have_word, credit_ok, fire, word_done;

  always_comb begin
    if (word_mode) beat_bytes = (bytes_left >= LW'(WORD_BYTES)) ? 4'(WORD_BYTES) : 4'(bytes_left);
    else           beat_bytes = 4'd1;
    beat_cost = CW'(beat_bytes) * CW'(F_RU_MHZ);
    have_word = (state == S_READ) && (q_cnt != 0) && (bytes_left != 0);
    credit_ok = credit >= beat_cost;
    out_valid = have_word && credit_ok;
    thr_stall = have_word && !credit_ok;
    out_data  = word_mode ? q_data[q_rd] : WORD_W'(q_data[q_rd][byte_idx*8 +: 8]);
    fire      = out_valid && out_ready;
    word_done = fire && (word_mode || byte_idx == 4'(WORD_BYTES - 1) || bytes_left == 1);
  end

  // ---- bandwidth credit: earn B_CH_MBPS per cycle, spend per byte sent ------
  logic [CW:0]   credit_sum;
  logic [CW-1:0] credit_next;
  always_comb begin
    credit_sum  = {1'b0, credit} + (CW+1)'(B_CH_MBPS) - (fire ? {1'b0, beat_cost} : '0);
    credit_next = (credit_sum > (CW+1)'(C_CAP)) ? CW'(C_CAP) : CW'(credit_sum);
  end

  // ---- RAM reads: keep at most two words queued or in flight ------------------
  logic issue;
  always_comb begin
    issue       = (state == S_READ) && (words_to_fetch != 0) &&
                  ((2'(q_cnt) + 2'(inflight) - 2'(word_done)) < 2'd2);
    nvm_rd_en   = issue;
    nvm_rd_addr = fetch_addr;
  end

  // ---- writes ----------------------------------------------------------------
  always_comb begin
    wr_ready    = (state == S_WRITE);
    nvm_wr_en   = wr_valid && wr_ready;
    nvm_wr_addr = fetch_addr;
    nvm_wr_data = wr_data;
  end

  assign cmd_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      word_mode      <= 1'b0;
      fetch_addr     <= '0;
      words_to_fetch <= '0;
      bytes_left     <= '0;
      inflight       <= 1'b0;
      q_cnt          <= '0;
      q_rd           <= 1'b0;
      byte_idx       <= '0;
      credit         <= '0;
      q_data[0]      <= '0;
      q_data[1]      <= '0;
    end else begin
      credit <= credit_next;

      inflight <= issue;
      if (issue) begin
        fetch_addr     <= fetch_addr + 1'b1;
        words_to_fetch <= words_to_fetch - 1'b1;
      end
      if (inflight) q_data[q_rd ^ q_cnt[0]] <= nvm_rd_data;
      q_cnt <= q_cnt + 2'(inflight) - 2'(word_done);
      if (word_done) begin
        q_rd     <= ~q_rd;
        byte_idx <= '0;
      end else if (fire) begin
        byte_idx <= byte_idx + 1'b1;
      end
      if (fire) bytes_left <= bytes_left - LW'(beat_bytes);

      unique case (state)
        S_IDLE: if (cmd_valid) begin
          word_mode  <= cmd_word;
          fetch_addr <= cmd_addr;
          q_rd       <= 1'b0;
          q_cnt      <= '0;
          byte_idx   <= '0;
          if (cmd_write) begin
            words_to_fetch <= cmd_len;
            state          <= (cmd_len != 0) ? S_WRITE : S_IDLE;
          end else begin
            bytes_left     <= cmd_len;
            words_to_fetch <= LW'((32'(cmd_len) + WORD_BYTES - 1) / WORD_BYTES);
            state          <= (cmd_len != 0) ? S_READ : S_IDLE;
          end
        end
        S_READ: if (fire && bytes_left == LW'(beat_bytes)) state <= S_IDLE;
        S_WRITE: if (nvm_wr_en) begin
          fetch_addr     <= fetch_addr + 1'b1;
          words_to_fetch <= words_to_fetch - 1'b1;
          if (words_to_fetch == 1) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready && credit_ok |=> out_valid);
endmodule
