// ed_fifo: buffered point-to-point channel (PE-to-PE link).
//
// A DEPTH-entry first-in first-out queue with valid/ready on both sides. The
// output is taken from storage, so a token written in one cycle can be read
// in the next (one cycle link latency, as on the mesh the design targets).
// in_ready is high whenever an entry is free; it does not depend on
// out_ready, so ready never ripples combinationally along a chain of links. The depth is this design's choice: the
// channel buffering of the original processing elements is not specified.
module ed_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                  mem [DEPTH];
  logic [AW-1:0]     wr_ptr, rd_ptr;
  logic [AW:0]       count;
  logic              do_wr, do_rd;

  assign out_valid = (count != 0);
  assign out_data  = mem[rd_ptr];
  assign do_rd     = out_valid && out_ready;
  assign in_ready  = (count < (AW+1)'(DEPTH));
  assign do_wr     = in_valid && in_ready;

  function automatic logic [AW-1:0] bump(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= bump(wr_ptr);
      if (do_rd) rd_ptr <= bump(rd_ptr);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= in_data;
  end
endmodule
