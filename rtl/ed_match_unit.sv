// ed_match_unit: first half of a row worker (compare / forward / match cost).
//
// The worker holds one character S[i] for the whole row. A row segment opens
// with a header token on t_in: the unit keeps S[i], the row number and, for a
// tiled segment, the diagonal seed M[i-1][j0-1], and sends a start word to the
// min unit (carrying the left seed M[i][j0-1]). Headers that arrive after its
// own belong to later workers and are forwarded unchanged on t_out. For each
// character T[j] it compares S[i] with T[j], forwards T[j] to the next worker
// and sends the match/substitute cost diag + (S[i] != T[j]) to the min unit.
// The diagonal comes from the min unit (the previous column's top), except for
// the first column of a tiled segment, which uses the seed. In a bypass
// (padding) row, characters are only forwarded.
//
// Timing: one character per cycle when diag, t_in and both outputs allow it;
// outputs are registered (t_out and ms are valid the cycle after the input is
// taken). Following the document: compare, forward T[j], then diag or diag+1
// (Fig. 7 Module 1 and the matching triggered-instruction code). The header
// scheme that delivers S[i] and the seeds is this design's own.
module ed_match_unit
  import ed_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   t_in_valid,
  output logic   t_in_ready,
  input  t_tok_t t_in_data,
  output logic   t_out_valid,
  input  logic   t_out_ready,
  output t_tok_t t_out_data,
  ed_chan_if.snk diag,        // score_t: previous column's top
  ed_chan_if.src ms,          // ms_tok_t to the min unit
  output logic   idle
);
  typedef enum logic {S_IDLE, S_ROW} state_e;
  state_e  state;
  char_t   s_char;
  logic    bypass, use_seed;
  score_t  seed_diag;

  logic   t_free, ms_free;
  logic   take_hdr, fwd_hdr, do_char;
  score_t d_val, cost;
  logic   is_match;

  assign t_free  = !t_out_valid || t_out_ready;
  assign ms_free = !ms.valid;   // internal link: no ready path, avoids a loop

  assign d_val    = use_seed ? seed_diag : diag.data;
  assign is_match = (s_char == t_in_data.ch);
  assign cost     = d_val + (is_match ? score_t'(0) : COST_SUB);

  always_comb begin
    take_hdr = 1'b0;
    fwd_hdr  = 1'b0;
    do_char  = 1'b0;
    if (t_in_valid) begin
      if (state == S_IDLE) begin
        take_hdr = t_in_data.hdr && ms_free;
      end else if (t_in_data.hdr) begin
        fwd_hdr = t_free;
      end else begin
        do_char = t_free && (bypass || (ms_free && (use_seed || diag.valid)));
      end
    end
  end

  // A character token in the idle state is a protocol error; it is dropped.
  assign t_in_ready = take_hdr || fwd_hdr || do_char || (state == S_IDLE && t_in_valid && !t_in_data.hdr);
  assign diag.ready = do_char && !bypass && !use_seed;
  assign idle       = (state == S_IDLE) && !t_out_valid && !ms.valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      s_char      <= '0;
      bypass      <= 1'b0;
      use_seed    <= 1'b0;
      seed_diag   <= '0;
      t_out_valid <= 1'b0;
      t_out_data  <= '0;
      ms.valid    <= 1'b0;
      ms.data     <= '0;
    end else begin
      if (t_out_valid && t_out_ready) t_out_valid <= 1'b0;
      if (ms.valid && ms.ready)       ms.valid    <= 1'b0;

      if (take_hdr) begin
        state     <= S_ROW;
        s_char    <= t_in_data.ch;
        bypass    <= t_in_data.bypass;
        use_seed  <= t_in_data.seeded && !t_in_data.bypass;
        seed_diag <= t_in_data.diag;
        ms.valid  <= 1'b1;
        ms.data   <= '{start: 1'b1, seeded: t_in_data.seeded, bypass: t_in_data.bypass,
                       last: 1'b0, match: 1'b0, row: t_in_data.row, col: t_in_data.col,
                       val: t_in_data.left};
      end

      if (fwd_hdr) begin
        t_out_valid <= 1'b1;
        t_out_data  <= t_in_data;
      end

      if (do_char) begin
        t_out_valid <= 1'b1;
        t_out_data  <= t_in_data;
        use_seed    <= 1'b0;
        if (!bypass) begin
          ms.valid <= 1'b1;
          ms.data  <= '{start: 1'b0, seeded: 1'b0, bypass: 1'b0, last: t_in_data.last,
                        match: is_match, row: '0, col: '0, val: cost};
        end
        if (t_in_data.last) state <= S_IDLE;
      end
    end
  end
endmodule
