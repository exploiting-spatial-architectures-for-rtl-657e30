// ed_scratchpad: on-fabric scratchpad memory for intermediate cost rows.
//
// WORDS x 32-bit array with one write port and one read port. A read returns
// its word on rdata with rvalid one cycle after re (synchronous read). A read
// and a write to the same word in the same cycle return the old word.
// Default size 2048 words = 8 KB, the scratchpad capacity of one block of the
// fabric in the document. The document spreads it over the processing
// elements; here it is one array, which is this design's choice.
module ed_scratchpad
  import ed_pkg::*;
#(
  parameter int unsigned WORDS = 2048
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  score_t                   wdata,
  input  logic                     re,
  input  logic [$clog2(WORDS)-1:0] raddr,
  output logic                     rvalid,
  output score_t                   rdata
);
  score_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rvalid <= 1'b0;
    else        rvalid <= re;
  end
endmodule
