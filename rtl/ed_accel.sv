// ed_accel: edit-distance accelerator built from a chain of row workers.
//
// Computes the edit distance between S (m characters) and T (n characters)
// with unit insert, delete and substitute costs, keeping only one row of the
// cost matrix (n+1 words) in memory. W row workers each compute one row of a
// strip of W rows; T[j] and each worker's scores flow from worker to worker,
// so inside a strip no cost value touches memory. Three schedules:
//   MODE_STRIP_MEM  strips over all columns, the row between strips in memory;
//   MODE_STRIP_SP   the same, the row between strips in the scratchpad
//                   (needs n+1 <= SP_WORDS);
//   MODE_TILED      column strips of width tile_d (tile_d <= SP_WORDS/2):
//                   the row and the tile's slice of T stay in the scratchpad,
//                   each tile's right column goes to a column array in memory.
// With path_en set every worker also reports each cell it computes on
// path_valid/path_data[k] (row, column, score, edit); these outputs must be
// drained. Storing that stream gives the full O(mn) score and path matrices,
// which is the document's naive schedule (strip mining with every cell kept).
//
// Memory interface: one in-order word port. A request is taken when
// mem_req_valid and mem_req_ready are high; a read returns its word on
// mem_rsp_valid/mem_rsp_data some cycles later, in request order, and must
// always be accepted. Characters are one per word. Before start the host
// fills S at s_base, T at t_base, the cost row row_base[j] = M[0][j], and for
// tiling column array 0 with col_base0[i] = M[i][0]; col_base1 is scratch.
// done rises when the result is in memory: M[m][n] is also on score.
//
// Parts: ed_controller (schedule), ed_feeder (reads into the first worker),
// ed_worker_array (the chain), ed_sink (stores the last worker's output),
// ed_scratchpad, ed_mem_arbiter. Defaults follow the document where it gives
// numbers (14 workers, 8 KB scratchpad, 32-bit scores); port formats, buffer
// depths and memory ordering are this design's choices.
module ed_accel
  import ed_pkg::*;
#(
  parameter int unsigned W           = 14,
  parameter int unsigned SP_WORDS    = 2048,
  parameter int unsigned LINK_DEPTH  = 2,
  parameter int unsigned OUTSTANDING = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  // host registers
  input  logic      start,
  input  mode_e     mode,
  input  logic      path_en,
  input  idx_t      m,
  input  idx_t      n,
  input  idx_t      tile_d,
  input  addr_t     s_base,
  input  addr_t     t_base,
  input  addr_t     row_base,
  input  addr_t     col_base0,
  input  addr_t     col_base1,
  output logic      busy,
  output logic      done,
  output logic      cfg_error,
  output score_t    score,
  // memory port
  output logic      mem_req_valid,
  input  logic      mem_req_ready,
  output logic      mem_req_we,
  output addr_t     mem_req_addr,
  output score_t    mem_req_wdata,
  input  logic      mem_rsp_valid,
  input  score_t    mem_rsp_data,
  // per-worker path outputs
  output logic      [W-1:0] path_valid,
  input  logic      [W-1:0] path_ready,
  output path_tok_t [W-1:0] path_data
);
  localparam int unsigned SPW = $clog2(SP_WORDS);
  localparam int unsigned NREQ = W + 3;   // sink, corner, W edges, feeder read

  // controller <-> feeder / sink
  logic      fr_valid, fr_ready;
  feed_req_t fr_data;
  logic      seg_start, sink_to_mem, sink_t_store, seg_done, array_idle, feeder_idle;
  addr_t     sink_mem_base, col_out_base;

  // feeder -> array
  logic   ft_valid, ft_ready, fs_valid, fs_ready;
  t_tok_t ft_data;
  s_tok_t fs_data;
  // array -> sink
  logic   at_valid, at_ready, as_valid, as_ready;
  t_tok_t at_data;
  s_tok_t as_data;
  logic      [W-1:0] e_valid, e_ready;
  edge_tok_t [W-1:0] e_data;

  // scratchpad
  logic           sp_we, sp_re, sp_rvalid;
  logic [SPW-1:0] sp_waddr, sp_raddr;
  score_t         sp_wdata, sp_rdata;

  // arbiter requesters
  logic   [NREQ-1:0] rq_valid, rq_ready, rq_we;
  addr_t  [NREQ-1:0] rq_addr;
  score_t [NREQ-1:0] rq_wdata;
  logic   corner_valid, corner_ready;
  score_t corner_data;

  ed_controller #(.W(W), .SP_WORDS(SP_WORDS)) u_ctrl (
    .clk, .rst_n, .start, .mode, .m, .n, .tile_d, .s_base, .t_base, .row_base,
    .col_base0, .col_base1, .busy, .done, .cfg_error,
    .req_valid(fr_valid), .req_ready(fr_ready), .req_data(fr_data),
    .seg_start, .sink_to_mem, .sink_mem_base, .sink_t_store, .col_out_base,
    .seg_done, .array_idle, .feeder_idle
  );

  ed_feeder #(.SP_WORDS(SP_WORDS), .OUTSTANDING(OUTSTANDING)) u_feed (
    .clk, .rst_n,
    .req_valid(fr_valid), .req_ready(fr_ready), .req_data(fr_data),
    .mem_valid(rq_valid[NREQ-1]), .mem_ready(rq_ready[NREQ-1]), .mem_addr(rq_addr[NREQ-1]),
    .mem_rvalid(mem_rsp_valid), .mem_rdata(mem_rsp_data),
    .sp_re, .sp_raddr, .sp_rvalid, .sp_rdata,
    .t_out_valid(ft_valid), .t_out_ready(ft_ready), .t_out_data(ft_data),
    .top_out_valid(fs_valid), .top_out_ready(fs_ready), .top_out_data(fs_data),
    .corner_valid, .corner_ready, .corner_data,
    .idle(feeder_idle)
  );
  assign rq_we[NREQ-1]    = 1'b0;
  assign rq_wdata[NREQ-1] = '0;

  ed_worker_array #(.W(W), .LINK_DEPTH(LINK_DEPTH)) u_array (
    .clk, .rst_n, .path_en,
    .t_in_valid(ft_valid), .t_in_ready(ft_ready), .t_in_data(ft_data),
    .top_valid(fs_valid), .top_ready(fs_ready), .top_data(fs_data),
    .t_out_valid(at_valid), .t_out_ready(at_ready), .t_out_data(at_data),
    .score_valid(as_valid), .score_ready(as_ready), .score_data(as_data),
    .path_valid, .path_ready, .path_data,
    .edge_valid(e_valid), .edge_ready(e_ready), .edge_data(e_data),
    .idle(array_idle)
  );

  ed_sink #(.SP_WORDS(SP_WORDS)) u_sink (
    .clk, .rst_n, .seg_start, .to_mem(sink_to_mem), .mem_base(sink_mem_base),
    .sp_base('0), .t_store(sink_t_store), .t_base(SPW'(SP_WORDS / 2)),
    .score_valid(as_valid), .score_ready(as_ready), .score_data(as_data),
    .t_valid(at_valid), .t_ready(at_ready), .t_data(at_data),
    .mem_valid(rq_valid[0]), .mem_ready(rq_ready[0]), .mem_addr(rq_addr[0]), .mem_wdata(rq_wdata[0]),
    .sp_we, .sp_waddr, .sp_wdata,
    .seg_done, .final_score(score)
  );
  assign rq_we[0] = 1'b1;

  // corner word: col_out[0]
  assign rq_valid[1]  = corner_valid;
  assign corner_ready = rq_ready[1];
  assign rq_we[1]     = 1'b1;
  assign rq_addr[1]   = col_out_base;
  assign rq_wdata[1]  = corner_data;

  // tile edges: col_out[row]
  for (genvar k = 0; k < W; k++) begin : g_edge
    assign rq_valid[2+k] = e_valid[k];
    assign e_ready[k]    = rq_ready[2+k];
    assign rq_we[2+k]    = 1'b1;
    assign rq_addr[2+k]  = col_out_base + addr_t'(e_data[k].row);
    assign rq_wdata[2+k] = e_data[k].score;
  end

  ed_scratchpad #(.WORDS(SP_WORDS)) u_sp (
    .clk, .rst_n, .we(sp_we), .waddr(sp_waddr), .wdata(sp_wdata),
    .re(sp_re), .raddr(sp_raddr), .rvalid(sp_rvalid), .rdata(sp_rdata)
  );

  ed_mem_arbiter #(.N(NREQ)) u_arb (
    .req_valid(rq_valid), .req_ready(rq_ready), .req_we(rq_we), .req_addr(rq_addr),
    .req_wdata(rq_wdata),
    .mem_valid(mem_req_valid), .mem_ready(mem_req_ready), .mem_we(mem_req_we),
    .mem_addr(mem_req_addr), .mem_wdata(mem_req_wdata)
  );
endmodule
