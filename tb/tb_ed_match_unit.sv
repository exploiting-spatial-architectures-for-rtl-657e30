// tb_ed_match_unit: the compare / forward / match-cost unit on its own.
//
// The testbench plays the min unit (diagonal supplier, cost consumer) and the
// next worker (t_out consumer), all with random valid/ready. Three segments:
//   strip row, S='A', T="ABAB", diagonals 10,20,30,40 -> costs 10,21,30,41,
//     with one extra header in the stream that must be forwarded;
//   seeded row, S='C', seed diagonal 7, T="CA", next diagonal 9 -> 7,10;
//   bypass row: characters only forwarded, no costs.
// Start words, costs, match flags and the forwarded tokens are compared with
// lists written out here by hand. Then 40 random strip, seeded and bypass
// segments, with headers for later workers mixed in, are checked against the
// cost diag + (S[i] != T[j]) worked out by the testbench.
module tb_ed_match_unit;
  import ed_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic t_in_valid, t_in_ready, t_out_valid, t_out_ready, idle;
  t_tok_t t_in_data, t_out_data;
  ed_chan_if #(.T(score_t))  diag (.clk, .rst_n);
  ed_chan_if #(.T(ms_tok_t)) ms   (.clk, .rst_n);

  ed_match_unit dut (.clk, .rst_n, .t_in_valid, .t_in_ready, .t_in_data,
                     .t_out_valid, .t_out_ready, .t_out_data,
                     .diag(diag.snk), .ms(ms.src), .idle);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  function automatic t_tok_t hdr(byte c, int row, int col, bit seeded, bit byp, int left, int dg);
    return '{hdr: 1, last: 0, seeded: seeded, bypass: byp, ch: c, row: idx_t'(row), col: idx_t'(col),
             left: score_t'(left), diag: score_t'(dg)};
  endfunction
  function automatic t_tok_t chr(byte c, bit last);
    return '{hdr: 0, last: last, seeded: 0, bypass: 0, ch: c, row: 0, col: 0, left: 0, diag: 0};
  endfunction

  t_tok_t tin[$], texp[$];
  score_t dq[$];
  ms_tok_t mexp[$];
  int ms_seen = 0, t_seen = 0;

  // drivers: inputs change at the falling edge; whether a token was taken is
  // sampled just before the rising edge.
  bit t_acc = 0, d_acc = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      if (t_acc) void'(tin.pop_front());
      if (d_acc) void'(dq.pop_front());
      if (!(t_in_valid && !t_acc)) begin
        t_in_valid = (tin.size() > 0) && ($urandom % 100 < 70);
        if (tin.size() > 0) t_in_data = tin[0];
      end
      if (!(diag.valid && !d_acc)) begin
        diag.valid = (dq.size() > 0) && ($urandom % 100 < 70);
        if (dq.size() > 0) diag.data = dq[0];
      end
      t_out_ready = ($urandom % 100 < 60);
      ms.ready    = ($urandom % 100 < 60);
      #1;
      t_acc = t_in_valid && t_in_ready;
      d_acc = diag.valid && diag.ready;
    end
  end
  // monitors
  always @(posedge clk) begin
    if (rst_n && t_out_valid && t_out_ready) begin
      t_seen++;
      check(texp.size() > 0 && t_out_data == texp[0], $sformatf("t_out token %0d wrong", t_seen));
      if (texp.size() > 0) void'(texp.pop_front());
    end
    if (rst_n && ms.valid && ms.ready) begin
      ms_seen++;
      check(mexp.size() > 0 && ms.data == mexp[0], $sformatf("ms token %0d wrong: %p, expected %p", ms_seen, ms.data, mexp[0]));
      if (mexp.size() > 0) void'(mexp.pop_front());
    end
  end

  function automatic ms_tok_t sw(bit seeded, bit byp, int row, int col, int left);
    return '{start: 1, seeded: seeded, bypass: byp, last: 0, match: 0, row: idx_t'(row), col: idx_t'(col), val: score_t'(left)};
  endfunction
  function automatic ms_tok_t cw(int v, bit mt, bit last);
    return '{start: 0, seeded: 0, bypass: 0, last: last, match: mt, row: 0, col: 0, val: score_t'(v)};
  endfunction

  // One random segment: strip, seeded or bypass row of 1 to 8 characters
  // over "ACGT", preceded by 0 to 2 headers for later workers.
  function automatic void add_random_segment(int g);
    string abc = "ACGT";
    int kind, len, row, col, left, dg, nfwd;
    byte sc, tc;
    bit last, mt;
    kind = g % 3;
    len  = 1 + int'($urandom % 8);
    row  = 1 + int'($urandom % 100);
    col  = (kind == 1) ? 1 + int'($urandom % 100) : 0;
    left = int'($urandom % 50);
    dg   = int'($urandom % 50);
    sc   = abc[$urandom % 4];
    nfwd = int'($urandom % 3);
    tin.push_back(hdr(sc, row, col, kind == 1, kind == 2, left, dg));
    mexp.push_back(sw(kind == 1, kind == 2, row, col, left));
    for (int h = 0; h < nfwd; h++) begin
      t_tok_t x;
      x = hdr(abc[$urandom % 4], row + h + 1, col, kind == 1, 1'($urandom % 2), int'($urandom % 50), int'($urandom % 50));
      tin.push_back(x);
      texp.push_back(x);
    end
    for (int k = 0; k < len; k++) begin
      tc   = abc[$urandom % 4];
      last = (k == len - 1);
      tin.push_back(chr(tc, last));
      texp.push_back(chr(tc, last));
      if (kind != 2) begin
        if (!(kind == 1 && k == 0)) begin
          dg = int'($urandom % 50);
          dq.push_back(score_t'(dg));
        end
        mt = (sc == tc);
        mexp.push_back(cw(dg + (mt ? 0 : 1), mt, last));
      end
    end
  endfunction

  initial begin
    t_in_valid = 0; t_in_data = '0; diag.valid = 0; diag.data = 0; t_out_ready = 0; ms.ready = 0;
    // segment 1: strip row
    tin.push_back(hdr("A", 5, 0, 0, 0, 0, 0));
    tin.push_back(hdr("G", 6, 0, 0, 0, 0, 0));   // next worker's header
    tin.push_back(chr("A", 0)); tin.push_back(chr("B", 0));
    tin.push_back(chr("A", 0)); tin.push_back(chr("B", 1));
    dq = '{10, 20, 30, 40};
    texp.push_back(hdr("G", 6, 0, 0, 0, 0, 0));
    texp.push_back(chr("A", 0)); texp.push_back(chr("B", 0));
    texp.push_back(chr("A", 0)); texp.push_back(chr("B", 1));
    mexp.push_back(sw(0, 0, 5, 0, 0));
    mexp.push_back(cw(10, 1, 0)); mexp.push_back(cw(21, 0, 0));
    mexp.push_back(cw(30, 1, 0)); mexp.push_back(cw(41, 0, 1));
    // segment 2: seeded row
    tin.push_back(hdr("C", 7, 4, 1, 0, 33, 7));
    tin.push_back(chr("C", 0)); tin.push_back(chr("A", 1));
    dq.push_back(9);
    texp.push_back(chr("C", 0)); texp.push_back(chr("A", 1));
    mexp.push_back(sw(1, 0, 7, 4, 33));
    mexp.push_back(cw(7, 1, 0)); mexp.push_back(cw(10, 0, 1));
    // segment 3: bypass row
    tin.push_back(hdr(0, 9, 0, 0, 1, 0, 0));
    tin.push_back(chr("T", 0)); tin.push_back(chr("T", 1));
    texp.push_back(chr("T", 0)); texp.push_back(chr("T", 1));
    mexp.push_back(sw(0, 1, 9, 0, 0));
    // random segments
    for (int g = 0; g < 40; g++) add_random_segment(g);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int c = 0; c < 20000 && (texp.size() > 0 || mexp.size() > 0); c++) @(negedge clk);
    repeat (4) @(negedge clk);
    check(texp.size() == 0, "t_out tokens missing");
    check(mexp.size() == 0, "cost tokens missing");
    check(dq.size() == 0, "diagonals not all used");
    check(idle, "unit not idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
