// ed_worker_array: a chain of W row workers computing W consecutive rows.
//
// Worker k takes T[j] and its top values from worker k-1 and passes T[j] and
// its own scores on to worker k+1, so the workers advance as a diagonal wave
// front: while worker k computes M[i][j], worker k+1 computes M[i+1][j-1].
// Only the first worker is fed from outside (t_in, top_in) and only the last
// worker's scores and characters leave the chain (score_out, t_out). Every
// link, including the two inputs, is a buffered channel (ed_fifo, LINK_DEPTH
// entries). Each worker has its own path and edge outputs.
//
// Parameters: W workers (default 14, the worker count of the scratchpad
// strip-mining configuration in the document's results); LINK_DEPTH is this
// design's choice. idle is high when no worker holds work and all links are
// empty.
module ed_worker_array
  import ed_pkg::*;
#(
  parameter int unsigned W          = 14,
  parameter int unsigned LINK_DEPTH = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      path_en,
  input  logic      t_in_valid,
  output logic      t_in_ready,
  input  t_tok_t    t_in_data,
  input  logic      top_valid,
  output logic      top_ready,
  input  s_tok_t    top_data,
  output logic      t_out_valid,
  input  logic      t_out_ready,
  output t_tok_t    t_out_data,
  output logic      score_valid,
  input  logic      score_ready,
  output s_tok_t    score_data,
  output logic      [W-1:0] path_valid,
  input  logic      [W-1:0] path_ready,
  output path_tok_t [W-1:0] path_data,
  output logic      [W-1:0] edge_valid,
  input  logic      [W-1:0] edge_ready,
  output edge_tok_t [W-1:0] edge_data,
  output logic      idle
);
  // Link k feeds worker k; link k is driven by worker k-1 (or the inputs).
  logic   [W-1:0] lt_iv, lt_ir, lt_ov, lt_or;
  t_tok_t [W-1:0] lt_id, lt_od;
  logic   [W-1:0] ls_iv, ls_ir, ls_ov, ls_or;
  s_tok_t [W-1:0] ls_id, ls_od;
  logic   [W-1:0] w_idle;

  // Outputs of each worker before the next link.
  logic   [W-1:0] wt_v, wt_r, ws_v, ws_r;
  t_tok_t [W-1:0] wt_d;
  s_tok_t [W-1:0] ws_d;

  for (genvar k = 0; k < W; k++) begin : g_w
    if (k == 0) begin : g_first
      assign lt_iv[0] = t_in_valid;
      assign lt_id[0] = t_in_data;
      assign ls_iv[0] = top_valid;
      assign ls_id[0] = top_data;
    end else begin : g_next
      assign lt_iv[k]   = wt_v[k-1];
      assign lt_id[k]   = wt_d[k-1];
      assign wt_r[k-1]  = lt_ir[k];
      assign ls_iv[k]   = ws_v[k-1];
      assign ls_id[k]   = ws_d[k-1];
      assign ws_r[k-1]  = ls_ir[k];
    end

    ed_fifo #(.T(t_tok_t), .DEPTH(LINK_DEPTH)) u_tlink (
      .clk, .rst_n,
      .in_valid(lt_iv[k]), .in_ready(lt_ir[k]), .in_data(lt_id[k]),
      .out_valid(lt_ov[k]), .out_ready(lt_or[k]), .out_data(lt_od[k])
    );
    ed_fifo #(.T(s_tok_t), .DEPTH(LINK_DEPTH)) u_slink (
      .clk, .rst_n,
      .in_valid(ls_iv[k]), .in_ready(ls_ir[k]), .in_data(ls_id[k]),
      .out_valid(ls_ov[k]), .out_ready(ls_or[k]), .out_data(ls_od[k])
    );

    ed_row_worker u_worker (
      .clk, .rst_n, .path_en,
      .t_in_valid(lt_ov[k]), .t_in_ready(lt_or[k]), .t_in_data(lt_od[k]),
      .t_out_valid(wt_v[k]), .t_out_ready(wt_r[k]), .t_out_data(wt_d[k]),
      .top_valid(ls_ov[k]), .top_ready(ls_or[k]), .top_data(ls_od[k]),
      .score_valid(ws_v[k]), .score_ready(ws_r[k]), .score_data(ws_d[k]),
      .path_valid(path_valid[k]), .path_ready(path_ready[k]), .path_data(path_data[k]),
      .edge_valid(edge_valid[k]), .edge_ready(edge_ready[k]), .edge_data(edge_data[k]),
      .idle(w_idle[k])
    );
  end

  assign t_in_ready       = lt_ir[0];
  assign top_ready        = ls_ir[0];
  assign t_out_valid      = wt_v[W-1];
  assign t_out_data       = wt_d[W-1];
  assign wt_r[W-1]        = t_out_ready;
  assign score_valid      = ws_v[W-1];
  assign score_data       = ws_d[W-1];
  assign ws_r[W-1]        = score_ready;
  assign idle             = (&w_idle) && !(|lt_ov) && !(|ls_ov);
endmodule
