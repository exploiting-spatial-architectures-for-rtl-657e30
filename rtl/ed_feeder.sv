// ed_feeder: feeds the first row worker from memory and the scratchpad.
//
// This is the multiplexer at the head of the worker chain. The controller
// hands it a stream of read requests, each tagged with what the word is for
// (feed_req_t). The feeder sends each request to memory (through the arbiter)
// or to the scratchpad, or completes it at once (SRC_NONE), and remembers the
// tag in an in-order queue. Returned words wait in one queue per source; the
// feeder takes them in request order and turns them into tokens:
//   K_LEFT, K_DIAG  keep the seeds for the next header;
//   K_S             sends a header with S[i] (and the seeds) on t_out;
//   K_BYP           sends a bypass header (row past the end of S);
//   K_T             sends T[j] on t_out;
//   K_TOP           sends the top value on top_out, and for a corner request
//                   also offers it on corner_* (written to the column array).
// At most OUTSTANDING requests are in flight, so the return queues never
// overflow and the memory response port needs no ready.
//
// Timing: one request issued and one token delivered per cycle at best;
// scratchpad words return after one cycle, memory words after the memory's
// latency. The in-order tagging scheme is this design's own.
module ed_feeder
  import ed_pkg::*;
#(
  parameter int unsigned SP_WORDS    = 2048,
  parameter int unsigned OUTSTANDING = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  // requests from the controller
  input  logic      req_valid,
  output logic      req_ready,
  input  feed_req_t req_data,
  // memory read port (to the arbiter) and returned data
  output logic      mem_valid,
  input  logic      mem_ready,
  output addr_t     mem_addr,
  input  logic      mem_rvalid,
  input  score_t    mem_rdata,
  // scratchpad read port
  output logic                        sp_re,
  output logic [$clog2(SP_WORDS)-1:0] sp_raddr,
  input  logic                        sp_rvalid,
  input  score_t                      sp_rdata,
  // to the first worker
  output logic      t_out_valid,
  input  logic      t_out_ready,
  output t_tok_t    t_out_data,
  output logic      top_out_valid,
  input  logic      top_out_ready,
  output s_tok_t    top_out_data,
  // corner word
  output logic      corner_valid,
  input  logic      corner_ready,
  output score_t    corner_data,
  output logic      idle
);
  // in-order tag queue
  logic      tag_iv, tag_ir, tag_ov, tag_or;
  feed_req_t tag_od;
  // return queues
  logic      mq_ov, mq_or, mq_ir, sq_ov, sq_or, sq_ir;
  score_t    mq_od, sq_od;

  logic issue;
  assign mem_addr  = req_data.addr;
  assign mem_valid = req_valid && tag_ir && (req_data.src == SRC_MEM);
  assign issue     = req_valid && tag_ir && ((req_data.src != SRC_MEM) || mem_ready);
  assign req_ready = issue;
  assign tag_iv    = issue;
  assign sp_re     = issue && (req_data.src == SRC_SP);
  assign sp_raddr  = req_data.addr[$clog2(SP_WORDS)-1:0];

  ed_fifo #(.T(feed_req_t), .DEPTH(OUTSTANDING)) u_tags (
    .clk, .rst_n, .in_valid(tag_iv), .in_ready(tag_ir), .in_data(req_data),
    .out_valid(tag_ov), .out_ready(tag_or), .out_data(tag_od));
  ed_fifo #(.T(score_t), .DEPTH(OUTSTANDING)) u_memq (
    .clk, .rst_n, .in_valid(mem_rvalid), .in_ready(mq_ir), .in_data(mem_rdata),
    .out_valid(mq_ov), .out_ready(mq_or), .out_data(mq_od));
  ed_fifo #(.T(score_t), .DEPTH(OUTSTANDING)) u_spq (
    .clk, .rst_n, .in_valid(sp_rvalid), .in_ready(sq_ir), .in_data(sp_rdata),
    .out_valid(sq_ov), .out_ready(sq_or), .out_data(sq_od));

  // head of the tag queue and its data
  logic   have;
  score_t word;
  always_comb begin
    unique case (tag_od.src)
      SRC_MEM: begin have = mq_ov; word = mq_od; end
      SRC_SP:  begin have = sq_ov; word = sq_od; end
      default: begin have = 1'b1;  word = '0;    end
    endcase
  end

  logic t_free, top_free, c_free, go;
  assign t_free   = !t_out_valid   || t_out_ready;
  assign top_free = !top_out_valid || top_out_ready;
  assign c_free   = !corner_valid  || corner_ready;

  always_comb begin
    go = 1'b0;
    if (tag_ov && have) begin
      unique case (tag_od.kind)
        K_LEFT, K_DIAG:  go = 1'b1;
        K_S, K_BYP, K_T: go = t_free;
        K_TOP:           go = top_free && (!tag_od.corner || c_free);
        default:         go = 1'b1;
      endcase
    end
  end

  assign tag_or = go;
  assign mq_or  = go && (tag_od.src == SRC_MEM);
  assign sq_or  = go && (tag_od.src == SRC_SP);
  assign idle   = !tag_ov && !t_out_valid && !top_out_valid && !corner_valid;

  score_t hdr_left, hdr_diag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hdr_left      <= '0;
      hdr_diag      <= '0;
      t_out_valid   <= 1'b0;
      t_out_data    <= '0;
      top_out_valid <= 1'b0;
      top_out_data  <= '0;
      corner_valid  <= 1'b0;
      corner_data   <= '0;
    end else begin
      if (t_out_valid && t_out_ready)     t_out_valid   <= 1'b0;
      if (top_out_valid && top_out_ready) top_out_valid <= 1'b0;
      if (corner_valid && corner_ready)   corner_valid  <= 1'b0;
      if (go) begin
        unique case (tag_od.kind)
          K_LEFT: hdr_left <= word;
          K_DIAG: hdr_diag <= word;
          K_S, K_BYP: begin
            t_out_valid <= 1'b1;
            t_out_data  <= '{hdr: 1'b1, last: 1'b0, seeded: tag_od.seeded,
                             bypass: (tag_od.kind == K_BYP), ch: word[CHAR_W-1:0],
                             row: tag_od.row, col: tag_od.col, left: hdr_left, diag: hdr_diag};
          end
          K_T: begin
            t_out_valid <= 1'b1;
            t_out_data  <= '{hdr: 1'b0, last: tag_od.last, seeded: 1'b0, bypass: 1'b0,
                             ch: word[CHAR_W-1:0], row: '0, col: '0, left: '0, diag: '0};
          end
          K_TOP: begin
            top_out_valid <= 1'b1;
            top_out_data  <= '{last: tag_od.last, score: word};
            if (tag_od.corner) begin
              corner_valid <= 1'b1;
              corner_data  <= word;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // The return queues are sized to the tag queue, so they always have room.
  a_mq_room: assert property (@(posedge clk) disable iff (!rst_n) mem_rvalid |-> mq_ir);
  a_sq_room: assert property (@(posedge clk) disable iff (!rst_n) sp_rvalid  |-> sq_ir);
endmodule
