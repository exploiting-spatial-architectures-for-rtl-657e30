// tb_ed_min_unit: the delete / insert / minimum unit on its own.
//
// The testbench plays the match unit (start words and costs), the previous
// worker (tops) and every consumer, with random valid/ready. Hand-worked
// segments:
//   strip row 2: tops 1,0,1, costs 1(match),2 -> scores 2,1,2, diagonals 1,0,
//     paths (2,1) match, (2,2) substitute;
//   tiled row 4 from column 5, left seed 3: tops 5,2, costs 6,4 -> scores 4,3,
//     diagonal 5, paths (4,5) insert, (4,6) delete, edge (4,3);
//   bypass row: tops 7,8 pass through;
//   40 random strip, tiled and bypass segments of 1 to 8 columns, with the
//     expected outputs worked out from the recurrence and the tie order;
//   strip row with path_en low: tops 3,4, cost 3 -> scores 4,3, no path.
module tb_ed_min_unit;
  import ed_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic path_en, top_valid, top_ready, score_valid, score_ready, path_valid, path_ready;
  logic edge_valid, edge_ready, idle;
  s_tok_t top_data, score_data;
  path_tok_t path_data;
  edge_tok_t edge_data;
  ed_chan_if #(.T(ms_tok_t)) ms (.clk, .rst_n);
  ed_chan_if #(.T(score_t))  diag (.clk, .rst_n);

  ed_min_unit dut (.clk, .rst_n, .path_en, .top_valid, .top_ready, .top_data,
                   .ms(ms.snk), .diag(diag.src), .score_valid, .score_ready, .score_data,
                   .path_valid, .path_ready, .path_data, .edge_valid, .edge_ready, .edge_data, .idle);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  ms_tok_t mq[$];
  s_tok_t tq[$], sexp[$];
  score_t dexp[$];
  path_tok_t pexp[$];
  edge_tok_t eexp[$];

  function automatic ms_tok_t sw(bit seeded, bit byp, int row, int col, int left);
    return '{start: 1, seeded: seeded, bypass: byp, last: 0, match: 0, row: idx_t'(row), col: idx_t'(col), val: score_t'(left)};
  endfunction
  function automatic ms_tok_t cw(int v, bit mt, bit last);
    return '{start: 0, seeded: 0, bypass: 0, last: last, match: mt, row: 0, col: 0, val: score_t'(v)};
  endfunction
  function automatic s_tok_t st(int v, bit last);
    return '{last: last, score: score_t'(v)};
  endfunction
  function automatic path_tok_t pt(int r, int c, int v, path_e p);
    return '{row: idx_t'(r), col: idx_t'(c), score: score_t'(v), path: p};
  endfunction

  // One random segment: strip (from column 0), tiled (seeded) or bypass,
  // with its expected scores, diagonals, cells and edge.
  function automatic void add_random_segment(int g);
    int kind, len, row, c0, left, top, cost, del, ins, best;
    bit mt, last;
    path_e p;
    kind = g % 3;
    len  = 1 + int'($urandom % 8);
    row  = 1 + int'($urandom % 100);
    c0   = (kind == 1) ? 1 + int'($urandom % 100) : 0;
    left = int'($urandom % 60);
    mq.push_back(sw(kind == 1, kind == 2, row, c0, (kind == 1) ? left : 0));
    for (int k = 0; k < len; k++) begin
      top  = int'($urandom % 60);
      last = (k == len - 1);
      tq.push_back(st(top, last));
      if (kind == 2) begin
        sexp.push_back(st(top, last));
      end else if (kind == 0 && k == 0) begin
        left = top + 1;
        sexp.push_back(st(left, last));
        if (!last) dexp.push_back(top);
      end else begin
        mt   = 1'($urandom % 2);
        cost = int'($urandom % 60);
        mq.push_back(cw(cost, mt, last));
        del = top + 1;
        ins = left + 1;
        if (cost <= del && cost <= ins) begin best = cost; p = mt ? P_MATCH : P_SUB; end
        else if (del <= ins)            begin best = del;  p = P_DEL; end
        else                            begin best = ins;  p = P_INS; end
        sexp.push_back(st(best, last));
        pexp.push_back(pt(row, c0 + k, best, p));
        if (!last) dexp.push_back(top);
        if (last && kind == 1) eexp.push_back('{row: idx_t'(row), score: score_t'(best)});
        left = best;
      end
    end
  endfunction

  bit m_acc = 0, t_acc = 0;
  bit gate = 0;    // segment 4 waits until path_en is low
  always @(negedge clk) begin
    if (rst_n) begin
      if (m_acc) void'(mq.pop_front());
      if (t_acc) void'(tq.pop_front());
      if (!(ms.valid && !m_acc)) begin
        ms.valid = (mq.size() > 0) && ($urandom % 100 < 70) && !(gate && mq.size() <= 2 && path_en);
        if (mq.size() > 0) ms.data = mq[0];
      end
      if (!(top_valid && !t_acc)) begin
        top_valid = (tq.size() > 0) && ($urandom % 100 < 70) && !(gate && tq.size() <= 2 && path_en);
        if (tq.size() > 0) top_data = tq[0];
      end
      score_ready = $urandom % 100 < 60;
      diag.ready  = $urandom % 100 < 60;
      path_ready  = $urandom % 100 < 60;
      edge_ready  = $urandom % 100 < 60;
      #1;
      m_acc = ms.valid && ms.ready;
      t_acc = top_valid && top_ready;
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (score_valid && score_ready) begin
        check(sexp.size() > 0 && score_data == sexp[0], $sformatf("score %p", score_data));
        if (sexp.size() > 0) void'(sexp.pop_front());
      end
      if (diag.valid && diag.ready) begin
        check(dexp.size() > 0 && diag.data == dexp[0], $sformatf("diag %0d", diag.data));
        if (dexp.size() > 0) void'(dexp.pop_front());
      end
      if (path_valid && path_ready) begin
        check(pexp.size() > 0 && path_data == pexp[0], $sformatf("path %p", path_data));
        if (pexp.size() > 0) void'(pexp.pop_front());
      end
      if (edge_valid && edge_ready) begin
        check(eexp.size() > 0 && edge_data == eexp[0], $sformatf("edge %p", edge_data));
        if (eexp.size() > 0) void'(eexp.pop_front());
      end
    end
  end

  initial begin
    path_en = 1; ms.valid = 0; ms.data = '0; top_valid = 0; top_data = '0;
    score_ready = 0; diag.ready = 0; path_ready = 0; edge_ready = 0;
    // segment 1
    mq.push_back(sw(0, 0, 2, 0, 0)); mq.push_back(cw(1, 1, 0)); mq.push_back(cw(2, 0, 1));
    tq.push_back(st(1, 0)); tq.push_back(st(0, 0)); tq.push_back(st(1, 1));
    sexp.push_back(st(2, 0)); sexp.push_back(st(1, 0)); sexp.push_back(st(2, 1));
    dexp.push_back(1); dexp.push_back(0);
    pexp.push_back(pt(2, 1, 1, P_MATCH)); pexp.push_back(pt(2, 2, 2, P_SUB));
    // segment 2
    mq.push_back(sw(1, 0, 4, 5, 3)); mq.push_back(cw(6, 0, 0)); mq.push_back(cw(4, 0, 1));
    tq.push_back(st(5, 0)); tq.push_back(st(2, 1));
    sexp.push_back(st(4, 0)); sexp.push_back(st(3, 1));
    dexp.push_back(5);
    pexp.push_back(pt(4, 5, 4, P_INS)); pexp.push_back(pt(4, 6, 3, P_DEL));
    eexp.push_back('{row: 4, score: 3});
    // segment 3
    mq.push_back(sw(0, 1, 9, 0, 0));
    tq.push_back(st(7, 0)); tq.push_back(st(8, 1));
    sexp.push_back(st(7, 0)); sexp.push_back(st(8, 1));
    // random segments checked against the recurrence
    for (int g = 0; g < 40; g++) add_random_segment(g);
    // segment 4 (path_en low)
    mq.push_back(sw(0, 0, 3, 0, 0)); mq.push_back(cw(3, 0, 1));
    tq.push_back(st(3, 0)); tq.push_back(st(4, 1));
    sexp.push_back(st(4, 0)); sexp.push_back(st(3, 1));
    dexp.push_back(3);
    gate = 1;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int c = 0; c < 20000 && mq.size() > 2; c++) @(negedge clk);
    for (int c = 0; c < 500 && !idle; c++) @(negedge clk);
    path_en = 0;
    for (int c = 0; c < 500 && (sexp.size() > 0 || dexp.size() > 0); c++) @(negedge clk);
    repeat (4) @(negedge clk);
    check(sexp.size() == 0 && dexp.size() == 0 && pexp.size() == 0 && eexp.size() == 0,
          $sformatf("outputs missing: %0d scores %0d diags %0d paths %0d edges", sexp.size(), dexp.size(), pexp.size(), eexp.size()));
    check(idle, "unit not idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
