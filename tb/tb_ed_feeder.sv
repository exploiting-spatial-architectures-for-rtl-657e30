// tb_ed_feeder: the feeder against a memory model and a scratchpad.
//
// Memory (latency 3, random stalls) holds word a at address 100+a; the
// scratchpad holds 500+a at a. One request list exercises every kind and
// source: seeds and S for a seeded header, a bypass header, T and tops from
// both memory and scratchpad, and a corner top. The tokens on t_out, top_out
// and corner must match the list, in order, under random back-pressure, with
// at most OUTSTANDING requests in flight.
module tb_ed_feeder;
  import ed_pkg::*;
  localparam int SPW = 64, OUT = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, mem_valid, mem_ready, mem_rvalid, sp_re, sp_rvalid;
  feed_req_t req_data;
  addr_t mem_addr;
  score_t mem_rdata, sp_rdata;
  logic [5:0] sp_raddr;
  logic t_out_valid, t_out_ready, top_out_valid, top_out_ready, corner_valid, corner_ready, idle;
  t_tok_t t_out_data;
  s_tok_t top_out_data;
  score_t corner_data;

  ed_feeder #(.SP_WORDS(SPW), .OUTSTANDING(OUT)) dut (.*);
  ed_mem_model #(.WORDS(256), .LAT(3), .STALL_PCT(30)) u_mem (
    .clk, .rst_n, .req_valid(mem_valid), .req_ready(mem_ready), .req_we(1'b0), .req_addr(mem_addr),
    .req_wdata('0), .rsp_valid(mem_rvalid), .rsp_data(mem_rdata));
  logic sp_we;
  logic [5:0] sp_waddr;
  score_t sp_wdata;
  ed_scratchpad #(.WORDS(SPW)) u_sp (.clk, .rst_n, .we(sp_we), .waddr(sp_waddr), .wdata(sp_wdata),
    .re(sp_re), .raddr(sp_raddr), .rvalid(sp_rvalid), .rdata(sp_rdata));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  feed_req_t rq[$];
  t_tok_t texp[$];
  s_tok_t sexp[$];
  score_t cexp[$];
  int inflight = 0, max_inflight = 0;

  function automatic feed_req_t r(src_e src, kind_e k, int a, bit last = 0, bit corner = 0,
                                  bit seeded = 0, int row = 0, int col = 0);
    return '{src: src, kind: k, last: last, corner: corner, seeded: seeded, row: idx_t'(row),
             col: idx_t'(col), addr: addr_t'(a)};
  endfunction
  function automatic score_t mv(int a); return score_t'(100 + a); endfunction
  function automatic score_t sv(int a); return score_t'(500 + a); endfunction

  bit acc = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      if (acc) void'(rq.pop_front());
      if (!(req_valid && !acc)) begin
        req_valid = (rq.size() > 0) && ($urandom % 100 < 80);
        if (rq.size() > 0) req_data = rq[0];
      end
      t_out_ready   = $urandom % 100 < 50;
      top_out_ready = $urandom % 100 < 50;
      corner_ready  = $urandom % 100 < 50;
      #1;
      acc = req_valid && req_ready;
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      inflight <= inflight + int'(req_valid && req_ready) - int'(dut.tag_ov && dut.tag_or);
      if (inflight > max_inflight) max_inflight <= inflight;
      if (t_out_valid && t_out_ready) begin
        check(texp.size() > 0 && t_out_data == texp[0], $sformatf("t_out %p", t_out_data));
        if (texp.size() > 0) void'(texp.pop_front());
      end
      if (top_out_valid && top_out_ready) begin
        check(sexp.size() > 0 && top_out_data == sexp[0], $sformatf("top_out %p", top_out_data));
        if (sexp.size() > 0) void'(sexp.pop_front());
      end
      if (corner_valid && corner_ready) begin
        check(cexp.size() > 0 && corner_data == cexp[0], "corner");
        if (cexp.size() > 0) void'(cexp.pop_front());
      end
    end
  end

  initial begin
    req_valid = 0; req_data = '0; t_out_ready = 0; top_out_ready = 0; corner_ready = 0;
    sp_we = 0; sp_waddr = 0; sp_wdata = 0;
    for (int a = 0; a < 256; a++) u_mem.mem[a] = mv(a);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int a = 0; a < SPW; a++) begin sp_we = 1; sp_waddr = 6'(a); sp_wdata = sv(a); @(negedge clk); end
    sp_we = 0;
    for (int rep = 0; rep < 20; rep++) begin
      // seeded header
      rq.push_back(r(SRC_MEM, K_LEFT, 10 + rep));
      rq.push_back(r(SRC_MEM, K_DIAG, 11 + rep));
      rq.push_back(r(SRC_MEM, K_S, 12 + rep, 0, 0, 1, 5 + rep, 7));
      texp.push_back('{hdr: 1, last: 0, seeded: 1, bypass: 0, ch: 8'(mv(12 + rep)), row: idx_t'(5 + rep), col: 7,
                       left: mv(10 + rep), diag: mv(11 + rep)});
      // bypass header (keeps the last seeds, which are don't-care)
      rq.push_back(r(SRC_NONE, K_BYP, 0, 0, 0, 0, 6 + rep, 7));
      texp.push_back('{hdr: 1, last: 0, seeded: 0, bypass: 1, ch: 0, row: idx_t'(6 + rep), col: 7,
                       left: mv(10 + rep), diag: mv(11 + rep)});
      for (int j = 0; j < 6; j++) begin
        src_e ts, ps;
        ts = (j % 2) ? SRC_SP : SRC_MEM;
        ps = (j % 3) ? SRC_MEM : SRC_SP;
        rq.push_back(r(ts, K_T, j + rep, j == 5));
        texp.push_back('{hdr: 0, last: (j == 5), seeded: 0, bypass: 0,
                         ch: 8'((ts == SRC_SP) ? sv(j + rep) : mv(j + rep)), row: 0, col: 0, left: 0, diag: 0});
        rq.push_back(r(ps, K_TOP, 30 + j, j == 5, j == 5));
        sexp.push_back('{last: (j == 5), score: (ps == SRC_SP) ? sv(30 + j) : mv(30 + j)});
        if (j == 5) cexp.push_back((ps == SRC_SP) ? sv(30 + j) : mv(30 + j));
      end
    end
    for (int c = 0; c < 20000 && (texp.size() > 0 || sexp.size() > 0 || cexp.size() > 0); c++) @(negedge clk);
    repeat (3) @(negedge clk);
    check(texp.size() == 0 && sexp.size() == 0 && cexp.size() == 0, "tokens missing");
    check(max_inflight <= OUT && max_inflight > 1, $sformatf("in flight up to %0d", max_inflight));
    check(idle, "feeder not idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
