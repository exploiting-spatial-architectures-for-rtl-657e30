// tb_ed_sink: the last-worker sink, three segments.
//   1. scores to memory at base 40 (random memory ready), characters dropped;
//   2. scores to the scratchpad at base 0, characters stored at 32 onward
//      (score writes win the scratchpad port when both arrive together);
//   3. scores to the scratchpad at base 5, characters not stored.
// Every memory and scratchpad write is compared with the expected address
// and data; seg_done must rise only after the last score and the last
// character, and final_score must hold the last score of the segment.
module tb_ed_sink;
  import ed_pkg::*;
  localparam int SPW = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic seg_start, to_mem, t_store, score_valid, score_ready, t_valid, t_ready;
  logic mem_valid, mem_ready, sp_we, seg_done;
  addr_t mem_base, mem_addr;
  logic [5:0] sp_base, t_base, sp_waddr;
  s_tok_t score_data;
  t_tok_t t_data;
  score_t mem_wdata, sp_wdata, final_score;
  ed_sink #(.SP_WORDS(SPW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  s_tok_t sq[$];
  t_tok_t tq[$];
  addr_t  mexp_a[$];  score_t mexp_d[$];
  int     spexp_a[$]; score_t spexp_d[$];
  bit s_acc = 0, t_acc = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      if (s_acc) void'(sq.pop_front());
      if (t_acc) void'(tq.pop_front());
      if (!(score_valid && !s_acc)) begin
        score_valid = (sq.size() > 0) && ($urandom % 100 < 70);
        if (sq.size() > 0) score_data = sq[0];
      end
      if (!(t_valid && !t_acc)) begin
        t_valid = (tq.size() > 0) && ($urandom % 100 < 70);
        if (tq.size() > 0) t_data = tq[0];
      end
      mem_ready = $urandom % 100 < 60;
      #1;
      s_acc = score_valid && score_ready;
      t_acc = t_valid && t_ready;
    end
  end
  always @(posedge clk) begin
    if (rst_n) begin
      if (mem_valid && mem_ready) begin
        check(mexp_a.size() > 0 && mem_addr == mexp_a[0] && mem_wdata == mexp_d[0],
              $sformatf("memory write %0d <- %0d", mem_addr, mem_wdata));
        if (mexp_a.size() > 0) begin void'(mexp_a.pop_front()); void'(mexp_d.pop_front()); end
      end
      if (sp_we) begin
        int idx;
        idx = -1;
        foreach (spexp_a[q]) if (idx < 0 && spexp_a[q] == int'(sp_waddr)) idx = q;
        check(idx >= 0 && spexp_d[idx] == sp_wdata, $sformatf("scratchpad write %0d <- %0d (exp %0d)", sp_waddr, sp_wdata, idx >= 0 ? spexp_d[idx] : -1));
        if (idx >= 0) begin spexp_a.delete(idx); spexp_d.delete(idx); end
      end
    end
  end

  task automatic segment(bit tm, int mb, int sb, bit ts, int tb, int len);
    @(negedge clk);
    to_mem = tm; mem_base = addr_t'(mb); sp_base = 6'(sb); t_store = ts; t_base = 6'(tb);
    seg_start = 1; @(negedge clk); seg_start = 0;
    check(!seg_done, "seg_done not cleared by seg_start");
    for (int k = 0; k < len; k++) begin
      score_t v = score_t'($urandom % 1000);
      byte unsigned c = 8'($urandom);
      sq.push_back('{last: (k == len - 1), score: v});
      tq.push_back('{hdr: 0, last: (k == len - 1), seeded: 0, bypass: 0, ch: c, row: 0, col: 0, left: 0, diag: 0});
      if (tm) begin mexp_a.push_back(addr_t'(mb + k)); mexp_d.push_back(v); end
      else begin spexp_a.push_back(sb + k); spexp_d.push_back(v); end
      if (ts) begin spexp_a.push_back(tb + k); spexp_d.push_back(score_t'(c)); end
    end
    while (sq.size() > 0 || tq.size() > 0) begin
      if (sq.size() > 1 || tq.size() > 1) check(!seg_done, "seg_done before the segment was stored");
      @(negedge clk);
    end
    repeat (2) @(negedge clk);
    check(seg_done, "seg_done missing");
    check(mexp_a.size() == 0 && spexp_a.size() == 0, "writes missing");
  endtask

  initial begin
    seg_start = 0; to_mem = 0; mem_base = 0; sp_base = 0; t_store = 0; t_base = 0;
    score_valid = 0; t_valid = 0; score_data = '0; t_data = '0; mem_ready = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    segment(1, 40, 0, 0, 0, 12);
    segment(0, 0, 0, 1, 32, 20);
    segment(0, 0, 5, 0, 0, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // final_score must follow the last score of each segment
  score_t last_v;
  always @(posedge clk) if (rst_n && score_valid && score_ready && score_data.last) last_v <= score_data.score;
  always @(posedge seg_done) begin
    #1; check(final_score == last_v, "final_score is not the last score");
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
