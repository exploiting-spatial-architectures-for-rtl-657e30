// ed_row_worker: computes one row of the edit-distance cost matrix.
//
// A worker is two units, as in the document's mapping onto two processing
// elements: ed_match_unit (compare S[i] with T[j], forward T[j], match or
// substitute cost from the diagonal) and ed_min_unit (delete and insert cost,
// minimum of three, score and path). They talk over two channels: the
// diagonal (min -> match) and the match/substitute cost (match -> min).
//
// Interface: t_in/t_out carry headers and T[j] (t_tok_t) from the previous
// worker to the next; top_in is the previous worker's score stream and
// score_out this worker's (s_tok_t). path_out gives the score and the edit
// chosen at every cell when path_en is high; edge_out gives the last score of a tiled row
// segment. idle is high when the worker holds no row and no pending output.
//
// Timing: a column every two cycles in steady state; a score leaves one cycle
// after the match unit's cost for that column arrives.
module ed_row_worker
  import ed_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      path_en,
  input  logic      t_in_valid,
  output logic      t_in_ready,
  input  t_tok_t    t_in_data,
  output logic      t_out_valid,
  input  logic      t_out_ready,
  output t_tok_t    t_out_data,
  input  logic      top_valid,
  output logic      top_ready,
  input  s_tok_t    top_data,
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
  ed_chan_if #(.T(score_t))  diag_ch (.clk(clk), .rst_n(rst_n));
  ed_chan_if #(.T(ms_tok_t)) ms_ch   (.clk(clk), .rst_n(rst_n));
  logic idle_m, idle_n;

  ed_match_unit u_match (
    .clk, .rst_n,
    .t_in_valid, .t_in_ready, .t_in_data,
    .t_out_valid, .t_out_ready, .t_out_data,
    .diag(diag_ch.snk), .ms(ms_ch.src), .idle(idle_m)
  );

  ed_min_unit u_min (
    .clk, .rst_n, .path_en,
    .top_valid, .top_ready, .top_data,
    .ms(ms_ch.snk), .diag(diag_ch.src),
    .score_valid, .score_ready, .score_data,
    .path_valid, .path_ready, .path_data,
    .edge_valid, .edge_ready, .edge_data,
    .idle(idle_n)
  );

  assign idle = idle_m && idle_n;
endmodule
