// tb_ed_controller: the schedule, checked request by request.
//
// The testbench plays the feeder (random ready) and the sink (seg_done some
// cycles after the last top of a segment; array and feeder idle flags held
// low for a while first). For each run it writes out, with its own loops,
// the list of requests the document's schedule calls for and compares every
// request the controller issues with it, together with the sink setting
// (memory or scratchpad, base address, character store) at every segment
// start and the column array base. Runs: strip mining with memory and with
// scratchpad (m not a multiple of W, so bypass headers appear), tiling with
// a narrow last column strip, and a refused configuration.
module tb_ed_controller;
  import ed_pkg::*;
  localparam int W = 3, SPW = 64;
  localparam addr_t SB = 1000, TB = 2000, RB = 3000, C0 = 4000, C1 = 5000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done, cfg_error, req_valid, req_ready, seg_start, sink_to_mem, sink_t_store;
  logic seg_done, array_idle, feeder_idle;
  mode_e mode;
  idx_t m, n, tile_d;
  feed_req_t req_data;
  addr_t sink_mem_base, col_out_base;
  ed_controller #(.W(W), .SP_WORDS(SPW)) dut (
    .clk, .rst_n, .start, .mode, .m, .n, .tile_d, .s_base(SB), .t_base(TB), .row_base(RB),
    .col_base0(C0), .col_base1(C1), .busy, .done, .cfg_error, .req_valid, .req_ready, .req_data,
    .seg_start, .sink_to_mem, .sink_mem_base, .sink_t_store, .col_out_base,
    .seg_done, .array_idle, .feeder_idle);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  feed_req_t exp_q[$];
  logic exp_tomem[$]; addr_t exp_base[$], exp_cob[$];
  int segs_seen;

  function automatic feed_req_t rq(src_e s, kind_e k, addr_t a, bit last = 0, bit corner = 0,
                                   bit seeded = 0, int row = 0, int col = 0);
    return '{src: s, kind: k, last: last, corner: corner, seeded: seeded, row: idx_t'(row), col: idx_t'(col), addr: a};
  endfunction

  task automatic expect_run(mode_e md, int mm, int nn, int d);
    int nseg = (mm + W - 1) / W;
    int ncs = (md == MODE_TILED) ? (nn + d - 1) / d : 1;
    for (int c = 0; c < ncs; c++) begin
      int j0, je;
      addr_t cin;
      j0 = (md == MODE_TILED) ? 1 + c * d : 0;
      je = (md == MODE_TILED) ? ((j0 + d - 1 > nn) ? nn : j0 + d - 1) : nn;
      cin = (c % 2) ? C1 : C0;
      for (int s = 0; s < nseg; s++) begin
        exp_tomem.push_back(md == MODE_STRIP_MEM || s == nseg - 1);
        exp_base.push_back(RB + addr_t'(j0));
        exp_cob.push_back((c % 2) ? C0 : C1);
        for (int k = 0; k < W; k++) begin
          int i = 1 + s * W + k;
          if (i > mm) exp_q.push_back(rq(SRC_NONE, K_BYP, 0, 0, 0, 0, i, j0));
          else begin
            if (md == MODE_TILED) begin
              exp_q.push_back(rq(SRC_MEM, K_LEFT, cin + addr_t'(i)));
              exp_q.push_back(rq(SRC_MEM, K_DIAG, cin + addr_t'(i - 1)));
            end
            exp_q.push_back(rq(SRC_MEM, K_S, SB + addr_t'(i - 1), 0, 0, md == MODE_TILED, i, j0));
          end
        end
        for (int j = j0; j <= je; j++) begin
          if (j > 0) begin
            if (md == MODE_TILED && s > 0) exp_q.push_back(rq(SRC_SP, K_T, addr_t'(SPW / 2 + j - j0), j == je));
            else                           exp_q.push_back(rq(SRC_MEM, K_T, TB + addr_t'(j - 1), j == je));
          end
          if (s == 0 || md == MODE_STRIP_MEM) exp_q.push_back(rq(SRC_MEM, K_TOP, RB + addr_t'(j), j == je, md == MODE_TILED && s == 0 && j == je));
          else exp_q.push_back(rq(SRC_SP, K_TOP, (md == MODE_TILED) ? addr_t'(j - j0) : addr_t'(j), j == je));
        end
      end
    end
  endtask

  // feeder and sink stand-ins
  int since_last = -1;
  always @(negedge clk) begin
    req_ready = $urandom % 100 < 70;
    if (since_last >= 0) since_last++;
    if (since_last > 4) seg_done = 1;
    array_idle  = since_last > 2;
    feeder_idle = since_last > 3;
  end
  always @(posedge clk) begin
    if (rst_n) begin
      if (seg_start) begin
        segs_seen++;
        seg_done <= 0;
        since_last <= -1;
        check(exp_tomem.size() > 0 && sink_to_mem == exp_tomem[0] && sink_mem_base == exp_base[0]
              && sink_t_store == (mode == MODE_TILED) && col_out_base == exp_cob[0],
              $sformatf("sink setting at segment %0d", segs_seen));
        if (exp_tomem.size() > 0) begin void'(exp_tomem.pop_front()); void'(exp_base.pop_front()); void'(exp_cob.pop_front()); end
      end
      if (req_valid && req_ready) begin
        feed_req_t e, g;
        g = req_data;
        if (exp_q.size() == 0) check(0, "request beyond the schedule");
        else begin
          e = exp_q.pop_front();
          if (!(g.kind inside {K_S, K_BYP})) begin g.row = 0; g.col = 0; end
          if (g.kind == K_BYP) g.addr = 0;
          check(g == e, $sformatf("request %p, expected %p", g, e));
          if (g.kind == K_TOP && g.last) since_last <= 0;
        end
      end
    end
  end

  task automatic run(mode_e md, int mm, int nn, int d);
    expect_run(md, mm, nn, d);
    @(negedge clk);
    mode = md; m = idx_t'(mm); n = idx_t'(nn); tile_d = idx_t'(d); start = 1;
    @(negedge clk); start = 0;
    check(busy, "not busy after start");
    for (int c = 0; c < 20000 && !done; c++) @(negedge clk);
    check(done && !busy && !cfg_error, "run did not finish");
    check(exp_q.size() == 0 && exp_tomem.size() == 0, $sformatf("%0d requests never issued", exp_q.size()));
    exp_q.delete(); exp_tomem.delete(); exp_base.delete(); exp_cob.delete();
  endtask

  initial begin
    start = 0; mode = MODE_STRIP_MEM; m = 0; n = 0; tile_d = 0; seg_done = 0;
    req_ready = 0; array_idle = 1; feeder_idle = 1; segs_seen = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    run(MODE_STRIP_MEM, 7, 5, 0);
    run(MODE_STRIP_SP, 6, 9, 0);
    run(MODE_TILED, 8, 11, 4);
    run(MODE_TILED, 3, 2, 5);
    check(segs_seen == 3 + 2 + 9 + 1, $sformatf("%0d segments", segs_seen));
    // refused: tile wider than half the scratchpad
    @(negedge clk);
    mode = MODE_TILED; m = 4; n = 100; tile_d = idx_t'(SPW / 2 + 1); start = 1;
    @(negedge clk); start = 0;
    check(done && cfg_error && !busy, "oversized tile not refused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
