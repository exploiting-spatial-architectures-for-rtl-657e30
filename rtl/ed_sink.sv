// ed_sink: stores what leaves the last row worker of the chain.
//
// This is the de-multiplexer at the tail of the worker chain. Each score of
// the last worker's row segment goes either to memory (word address
// mem_base + k for the k-th score of the segment) or to the scratchpad (word
// sp_base + k), as the controller selects for the current segment. Characters
// T[j] leaving the last worker are written to the scratchpad at t_base + k
// when t_store is set (tiling keeps the tile's slice of T on chip) and are
// dropped otherwise. Score writes take the scratchpad write port first; a
// character waits a cycle if both want it.
//
// seg_done goes high once both the last score and the last character of the
// segment have been stored (a memory write counts as stored once the memory
// port has accepted it) and stays high until seg_start. final_score holds the
// last score of the most recent segment: after the final segment this is the
// edit distance M[m][n]. Configuration must stay steady during a segment.
module ed_sink
  import ed_pkg::*;
#(
  parameter int unsigned SP_WORDS = 2048
) (
  input  logic      clk,
  input  logic      rst_n,
  // configuration for the current segment
  input  logic      seg_start,
  input  logic      to_mem,
  input  addr_t     mem_base,
  input  logic [$clog2(SP_WORDS)-1:0] sp_base,
  input  logic      t_store,
  input  logic [$clog2(SP_WORDS)-1:0] t_base,
  // from the last worker
  input  logic      score_valid,
  output logic      score_ready,
  input  s_tok_t    score_data,
  input  logic      t_valid,
  output logic      t_ready,
  input  t_tok_t    t_data,
  // memory write port (to the arbiter)
  output logic      mem_valid,
  input  logic      mem_ready,
  output addr_t     mem_addr,
  output score_t    mem_wdata,
  // scratchpad write port
  output logic                        sp_we,
  output logic [$clog2(SP_WORDS)-1:0] sp_waddr,
  output score_t                      sp_wdata,
  output logic      seg_done,
  output score_t    final_score
);
  localparam int unsigned SPW = $clog2(SP_WORDS);

  idx_t s_idx, t_idx;
  logic s_done, t_done;
  logic s_go, t_go, s_to_sp;

  assign s_to_sp   = score_valid && !s_done && !to_mem;
  assign mem_valid = score_valid && !s_done && to_mem;
  assign mem_addr  = mem_base + addr_t'(s_idx);
  assign mem_wdata = score_data.score;
  assign s_go      = score_valid && !s_done && (to_mem ? mem_ready : 1'b1);
  assign score_ready = s_go;

  assign t_go    = t_valid && !t_done && !(t_store && s_to_sp);
  assign t_ready = t_go;

  always_comb begin
    sp_we    = 1'b0;
    sp_waddr = '0;
    sp_wdata = '0;
    if (s_to_sp) begin
      sp_we    = 1'b1;
      sp_waddr = sp_base + SPW'(s_idx);
      sp_wdata = score_data.score;
    end else if (t_go && t_store && !t_data.hdr) begin
      sp_we    = 1'b1;
      sp_waddr = t_base + SPW'(t_idx);
      sp_wdata = score_t'(t_data.ch);
    end
  end

  assign seg_done = s_done && t_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_idx       <= '0;
      t_idx       <= '0;
      s_done      <= 1'b0;
      t_done      <= 1'b0;
      final_score <= '0;
    end else if (seg_start) begin
      s_idx  <= '0;
      t_idx  <= '0;
      s_done <= 1'b0;
      t_done <= 1'b0;
    end else begin
      if (s_go) begin
        s_idx <= s_idx + 1'b1;
        if (score_data.last) begin
          s_done      <= 1'b1;
          final_score <= score_data.score;
        end
      end
      if (t_go && !t_data.hdr) begin
        t_idx <= t_idx + 1'b1;
        if (t_data.last) t_done <= 1'b1;
      end
    end
  end
endmodule
