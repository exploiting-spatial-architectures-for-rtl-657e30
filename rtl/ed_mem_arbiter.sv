// ed_mem_arbiter: merges N requesters onto the single memory request port.
//
// Each requester offers {we, addr, wdata} with valid/ready. Fixed priority:
// requester 0 wins, then 1, and so on. The accelerator puts its writes (final
// row scores, tile edge columns, the corner word) ahead of the feeder's reads,
// so writes always drain and a later read of the same word, issued after
// them, sees the new value on an in-order memory. The ready of the winner is
// the memory's ready; no state is kept, so a grant may change every cycle.
// The memory port itself and its ordering are this design's choices: the
// document's fabric reaches memory through a cache hierarchy.
module ed_mem_arbiter
  import ed_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic             [N-1:0] req_valid,
  output logic             [N-1:0] req_ready,
  input  logic             [N-1:0] req_we,
  input  addr_t            [N-1:0] req_addr,
  input  score_t           [N-1:0] req_wdata,
  output logic                     mem_valid,
  input  logic                     mem_ready,
  output logic                     mem_we,
  output addr_t                    mem_addr,
  output score_t                   mem_wdata
);
  always_comb begin
    mem_valid = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = '0;
    req_ready = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (req_valid[i] && !mem_valid) begin
        mem_valid    = 1'b1;
        mem_we       = req_we[i];
        mem_addr     = req_addr[i];
        mem_wdata    = req_wdata[i];
        req_ready[i] = mem_ready;
      end
    end
  end
endmodule
