// ed_mem_model: behavioural in-order word memory for simulation only.
//
// Stands in for the cache hierarchy and DRAM the accelerator reaches. A
// request is accepted when req_valid and req_ready are high; req_ready drops
// at random when STALL_PCT is above 0. Writes update the array at once; reads
// sample it at acceptance, so a read issued after a write sees the new word,
// and return in order LAT cycles later on rsp_valid/rsp_data. The array is
// public (mem) so a testbench can load and inspect it directly.
module ed_mem_model #(
  parameter int unsigned WORDS     = 16384,
  parameter int unsigned LAT       = 4,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic        req_we,
  input  logic [31:0] req_addr,
  input  logic [31:0] req_wdata,
  output logic        rsp_valid,
  output logic [31:0] rsp_data
);
  logic [31:0] mem [WORDS];
  logic [31:0] pipe_d [LAT];
  logic        pipe_v [LAT];
  int unsigned reads, writes, stalls;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) req_ready <= 1'b1;
    else        req_ready <= (STALL_PCT == 0) || (($urandom % 100) >= STALL_PCT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) begin pipe_v[i] <= 1'b0; pipe_d[i] <= '0; end
      reads <= 0; writes <= 0; stalls <= 0;
    end else begin
      pipe_v[0] <= 1'b0;
      if (req_valid && !req_ready) stalls <= stalls + 1;
      if (req_valid && req_ready) begin
        if (req_addr >= WORDS) $error("memory access out of range: %0d", req_addr);
        else if (req_we) begin
          mem[req_addr] <= req_wdata;
          writes <= writes + 1;
        end else begin
          pipe_v[0] <= 1'b1;
          pipe_d[0] <= mem[req_addr];
          reads <= reads + 1;
        end
      end
      for (int i = 1; i < LAT; i++) begin
        pipe_v[i] <= pipe_v[i-1];
        pipe_d[i] <= pipe_d[i-1];
      end
    end
  end

  assign rsp_valid = pipe_v[LAT-1];
  assign rsp_data  = pipe_d[LAT-1];
endmodule
