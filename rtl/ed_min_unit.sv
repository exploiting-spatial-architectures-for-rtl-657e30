// ed_min_unit: second half of a row worker (delete / insert / minimum).
//
// For each column j it takes top = M[i-1][j] from the previous worker (or the
// feeder) and the match/substitute cost from the match unit, and computes
//   delete = top + 1, insert = left + 1, min2 = min(delete, insert),
//   M[i][j] = min(min2, match/substitute cost).
// The score is sent downstream (it is the next worker's top) and kept as the
// next column's left; top is passed back to the match unit as the next
// column's diagonal; the cell (row, column, score, chosen edit) is sent on
// the path output when path_en is high. A row segment begins with a start
// word from the match unit:
//   - strip mining (not seeded): the first top is column 0, M[i][0] = top + 1,
//     so left and diagonal need no memory reads;
//   - tiling (seeded): left starts at the seed, and the last score of the
//     segment is also sent on the edge output (the tile's right column);
//   - bypass (padding row): each top is passed on unchanged.
// Ties are broken match/substitute first, then delete, then insert.
//
// Timing: one column per cycle when all inputs and outputs allow; outputs are
// registered. Inside a worker a column takes two cycles, since the diagonal
// for column j+1 leaves this unit when column j is done and comes back as a
// cost one cycle later. The data flow follows Fig. 7 Module 2 of the
// document; the column-0 start, seeds and tie-break order are this design's.
module ed_min_unit
  import ed_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      path_en,
  input  logic      top_valid,
  output logic      top_ready,
  input  s_tok_t    top_data,
  ed_chan_if.snk    ms,          // ms_tok_t from the match unit
  ed_chan_if.src    diag,        // score_t to the match unit
  output logic      score_valid,
  input  logic      score_ready,
  output s_tok_t    score_data,
  output logic      path_valid,
  input  logic      path_ready,
  output path_tok_t path_data,
  output logic      edge_valid,
  input  logic      edge_ready,
  output edge_tok_t edge_data,
  output logic      idle
);
  typedef enum logic [1:0] {S_IDLE, S_COL0, S_CELL, S_BYP} state_e;
  state_e state;
  score_t left;
  idx_t   row, col;
  logic   seeded;

  logic sc_free, dg_free, pa_free, ed_free;
  logic take_start, do_col0, do_cell, do_byp;
  score_t del_c, ins_c, min2_c, best;
  path_e  pth;

  assign sc_free = !score_valid || score_ready;
  assign dg_free = !diag.valid;   // internal link: no ready path, avoids a loop
  assign pa_free = !path_valid  || path_ready;
  assign ed_free = !edge_valid  || edge_ready;

  assign del_c  = top_data.score + COST_DEL;
  assign ins_c  = left + COST_INS;
  assign min2_c = min2(del_c, ins_c);

  always_comb begin
    if (ms.data.val <= min2_c) begin
      best = ms.data.val;
      pth  = ms.data.match ? P_MATCH : P_SUB;
    end else if (del_c <= ins_c) begin
      best = del_c;
      pth  = P_DEL;
    end else begin
      best = ins_c;
      pth  = P_INS;
    end
  end

  always_comb begin
    take_start = (state == S_IDLE) && ms.valid && ms.data.start;
    do_col0    = (state == S_COL0) && top_valid && sc_free && (top_data.last || dg_free);
    do_cell    = (state == S_CELL) && top_valid && ms.valid && !ms.data.start && sc_free
                 && (top_data.last || dg_free) && (!path_en || pa_free)
                 && (!(seeded && top_data.last) || ed_free);
    do_byp     = (state == S_BYP) && top_valid && sc_free;
  end

  assign top_ready = do_col0 || do_cell || do_byp;
  assign ms.ready  = take_start || do_cell || ((state == S_IDLE) && ms.valid && !ms.data.start);
  assign idle      = (state == S_IDLE) && !score_valid && !diag.valid && !path_valid && !edge_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      left        <= '0;
      row         <= '0;
      col         <= '0;
      seeded      <= 1'b0;
      score_valid <= 1'b0;
      score_data  <= '0;
      diag.valid  <= 1'b0;
      diag.data   <= '0;
      path_valid  <= 1'b0;
      path_data   <= '0;
      edge_valid  <= 1'b0;
      edge_data   <= '0;
    end else begin
      if (score_valid && score_ready) score_valid <= 1'b0;
      if (diag.valid && diag.ready)   diag.valid  <= 1'b0;
      if (path_valid && path_ready)   path_valid  <= 1'b0;
      if (edge_valid && edge_ready)   edge_valid  <= 1'b0;

      if (take_start) begin
        seeded <= ms.data.seeded;
        row    <= ms.data.row;
        col    <= ms.data.col;
        left   <= ms.data.val;
        state  <= ms.data.bypass ? S_BYP : (ms.data.seeded ? S_CELL : S_COL0);
      end

      if (do_col0) begin
        score_valid <= 1'b1;
        score_data  <= '{last: top_data.last, score: del_c};
        left        <= del_c;
        col         <= col + 1'b1;
        if (!top_data.last) begin
          diag.valid <= 1'b1;
          diag.data  <= top_data.score;
          state      <= S_CELL;
        end else begin
          state      <= S_IDLE;
        end
      end

      if (do_cell) begin
        score_valid <= 1'b1;
        score_data  <= '{last: top_data.last, score: best};
        left        <= best;
        col         <= col + 1'b1;
        if (path_en) begin
          path_valid <= 1'b1;
          path_data  <= '{row: row, col: col, score: best, path: pth};
        end
        if (!top_data.last) begin
          diag.valid <= 1'b1;
          diag.data  <= top_data.score;
        end else begin
          state <= S_IDLE;
          if (seeded) begin
            edge_valid <= 1'b1;
            edge_data  <= '{row: row, score: best};
          end
        end
      end

      if (do_byp) begin
        score_valid <= 1'b1;
        score_data  <= top_data;
        if (top_data.last) state <= S_IDLE;
      end
    end
  end
endmodule
