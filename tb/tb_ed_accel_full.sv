// tb_ed_accel_full: the accelerator at its default size on the document's
// problem size (S and T of 1024 characters), one run per schedule.
//
// Same checks as tb_ed_accel (score, final row, last column, every path
// token), with no memory or path back-pressure so that the rate can be
// measured. The runs are the document's Table II cases at 14 workers:
// scratchpad strip mining with and without paths, memory strip mining and
// tiling (D = 512) score only. Each run must reach at least the cells per
// cycle the document reports for the same schedule on one block of its
// fabric (Table II): the dedicated worker does a column every two cycles,
// well above that.
// Memory traffic is counted per run and compared with the counts the
// schedules imply, the exact form of the document's estimates
// (K = ceil(m/W) strips, C = ceil(n/D) column strips):
//   strip through memory      reads m + K(2n+1),  writes K(n+1)
//                             (document: 3(m/w)n + m operations)
//   strip through scratchpad  reads m + Kn + n+1, writes n+1
//                             (document: (m/w)n + 2n + m)
//   tiled                     reads 3mC + 2n,     writes mC + C + n
//                             (document: 4n(m/D) + 3n; the C corner copies
//                             are this design's)
module tb_ed_accel_full;
  import ed_pkg::*;

  localparam int unsigned W         = 14;     // ed_accel default
  localparam int unsigned SP_WORDS  = 2048;   // ed_accel default
  localparam int unsigned STALL_PCT = 0;
  localparam int unsigned PATH_PCT  = 100;
  localparam int unsigned LEN       = 1024;
  localparam int unsigned WATCHDOG  = 3_000_000;
  localparam addr_t S_BASE = 0, T_BASE = 2048, ROW_BASE = 4096, C0_BASE = 6144, C1_BASE = 8192;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, path_en, busy, done, cfg_error;
  mode_e mode;
  idx_t m, n, tile_d;
  score_t score;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid;
  addr_t mem_req_addr;
  score_t mem_req_wdata, mem_rsp_data;
  logic [W-1:0] path_valid, path_ready;
  path_tok_t [W-1:0] path_data;

  ed_accel dut (
    .clk, .rst_n, .start, .mode, .path_en, .m, .n, .tile_d,
    .s_base(S_BASE), .t_base(T_BASE), .row_base(ROW_BASE), .col_base0(C0_BASE), .col_base1(C1_BASE),
    .busy, .done, .cfg_error, .score,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_rsp_valid, .mem_rsp_data,
    .path_valid, .path_ready, .path_data
  );

  ed_mem_model #(.WORDS(10240), .LAT(4), .STALL_PCT(STALL_PCT)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata), .rsp_valid(mem_rsp_valid),
    .rsp_data(mem_rsp_data)
  );

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- reference model ----------------
  byte unsigned S[], T[];
  int refm[];           // (m+1) x (n+1)
  bit seen[];
  int paths_seen;
  int cm, cn;

  function automatic int at(int i, int j);
    return refm[i*(cn+1)+j];
  endfunction

  function automatic void build_ref();
    refm = new[(cm+1)*(cn+1)];
    seen = new[(cm+1)*(cn+1)];
    for (int j = 0; j <= cn; j++) refm[j] = j;
    for (int i = 1; i <= cm; i++) begin
      refm[i*(cn+1)] = i;
      for (int j = 1; j <= cn; j++) begin
        int ms, dl, in, b;
        ms = at(i-1, j-1) + ((S[i-1] == T[j-1]) ? 0 : 1);
        dl = at(i-1, j) + 1;
        in = at(i, j-1) + 1;
        b = ms; if (dl < b) b = dl; if (in < b) b = in;
        refm[i*(cn+1)+j] = b;
      end
    end
  endfunction

  function automatic path_e ref_path(int i, int j);
    int ms, dl, in, m2;
    ms = at(i-1, j-1) + ((S[i-1] == T[j-1]) ? 0 : 1);
    dl = at(i-1, j) + 1;
    in = at(i, j-1) + 1;
    m2 = (dl < in) ? dl : in;
    if (ms <= m2) return (S[i-1] == T[j-1]) ? P_MATCH : P_SUB;
    if (dl <= in) return P_DEL;
    return P_INS;
  endfunction

  // ---------------- path outputs ----------------
  always @(posedge clk) begin
    for (int k = 0; k < W; k++) path_ready[k] <= (($urandom % 100) < PATH_PCT);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < W; k++) begin
        if (path_valid[k] && path_ready[k]) begin
          int i, j;
          i = int'(path_data[k].row);
          j = int'(path_data[k].col);
          if (i < 1 || i > cm || j < 1 || j > cn) begin
            check(0, $sformatf("path for cell (%0d,%0d) out of range", i, j));
          end else begin
            check(!seen[i*(cn+1)+j], $sformatf("path (%0d,%0d) twice", i, j));
            seen[i*(cn+1)+j] = 1'b1;
            paths_seen++;
            check(path_data[k].path == ref_path(i, j),
                  $sformatf("path (%0d,%0d) = %0d, expected %0d", i, j, path_data[k].path, ref_path(i, j)));
            check(int'(path_data[k].score) == at(i, j),
                  $sformatf("cell score (%0d,%0d) = %0d, expected %0d", i, j, path_data[k].score, at(i, j)));
            check(int'(k) == (i - 1) % int'(W), $sformatf("path (%0d,%0d) from worker %0d", i, j, k));
          end
        end
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_seg[3], n_byp, n_seeded, n_sp_rd, n_sp_wr, n_corner, n_edge, n_mem_stall, n_path_stall;
  int n_next_strip, n_next_colstrip, n_refused;
  int n_mem_rd, n_mem_wr;

  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.seg_start) begin
        n_seg[dut.u_ctrl.r_mode]++;
        if (!dut.u_ctrl.first_seg) n_next_strip++;
        if (dut.u_ctrl.r_mode == MODE_TILED && dut.u_ctrl.j0 > 1) n_next_colstrip++;
      end
      if (dut.fr_valid && dut.fr_ready && dut.fr_data.kind == K_BYP) n_byp++;
      if (dut.fr_valid && dut.fr_ready && dut.fr_data.kind == K_S && dut.fr_data.seeded) n_seeded++;
      if (dut.sp_re) n_sp_rd++;
      if (dut.sp_we) n_sp_wr++;
      if (dut.corner_valid && dut.corner_ready) n_corner++;
      n_edge += $countones(dut.e_valid & dut.e_ready);
      if (mem_req_valid && !mem_req_ready) n_mem_stall++;
      if (mem_req_valid && mem_req_ready) begin
        if (mem_req_we) n_mem_wr++;
        else            n_mem_rd++;
      end
      if (|(path_valid & ~path_ready)) n_path_stall++;
    end
  end

  // ---------------- one run ----------------
  task automatic run(mode_e md, string s, string t, int d, bit pen, output int cycles);
    int t0;
    cm = s.len(); cn = t.len();
    S = new[cm]; T = new[cn];
    for (int i = 0; i < cm; i++) S[i] = s[i];
    for (int j = 0; j < cn; j++) T[j] = t[j];
    build_ref();
    paths_seen = 0;
    for (int i = 0; i < cm; i++) u_mem.mem[S_BASE + i] = 32'(S[i]);
    for (int j = 0; j < cn; j++) u_mem.mem[T_BASE + j] = 32'(T[j]);
    for (int j = 0; j <= cn; j++) u_mem.mem[ROW_BASE + j] = 32'(j);
    for (int i = 0; i <= cm; i++) begin
      u_mem.mem[C0_BASE + i] = 32'(i);
      u_mem.mem[C1_BASE + i] = 32'hdead_beef;
    end
    @(negedge clk);
    n_mem_rd = 0; n_mem_wr = 0;
    mode = md; m = idx_t'(cm); n = idx_t'(cn); tile_d = idx_t'(d); path_en = pen;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = cyc;
    while (!done) @(negedge clk);
    repeat (3) @(negedge clk);   // let the last path tokens drain
    cycles = cyc - t0;
    check(!cfg_error, "unexpected cfg_error");
    check(int'(score) == at(cm, cn),
          $sformatf("mode %0d m=%0d n=%0d d=%0d: score %0d, expected %0d", md, cm, cn, d, score, at(cm, cn)));
    // Tiling computes columns 1..n only: row_base[0] keeps M[0][0].
    for (int j = (md == MODE_TILED) ? 1 : 0; j <= cn; j++)
      check(int'(u_mem.mem[ROW_BASE + j]) == at(cm, j),
            $sformatf("final row [%0d] = %0d, expected %0d", j, u_mem.mem[ROW_BASE + j], at(cm, j)));
    if (md == MODE_TILED) begin
      int nstrips;
      addr_t cb;
      nstrips = (cn + d - 1) / d;
      cb = (nstrips % 2 == 1) ? C1_BASE : C0_BASE;
      for (int i = 0; i <= cm; i++)
        check(int'(u_mem.mem[cb + i]) == at(i, cn),
              $sformatf("last column [%0d] = %0d, expected %0d", i, u_mem.mem[cb + i], at(i, cn)));
    end
    if (pen) check(paths_seen == cm * cn, $sformatf("%0d paths, expected %0d", paths_seen, cm * cn));
    else     check(paths_seen == 0, "paths sent with path_en low");
    begin
      int k, c, exp_rd, exp_wr;
      k = (cm + int'(W) - 1) / int'(W);
      c = (md == MODE_TILED) ? (cn + d - 1) / d : 1;
      case (md)
        MODE_STRIP_MEM: begin exp_rd = cm + k * (2 * cn + 1);     exp_wr = k * (cn + 1); end
        MODE_STRIP_SP:  begin exp_rd = cm + k * cn + cn + 1;      exp_wr = cn + 1;       end
        default:        begin exp_rd = 3 * cm * c + 2 * cn;       exp_wr = cm * c + c + cn; end
      endcase
      $display("mode %0d memory traffic: %0d reads, %0d writes (expected %0d, %0d)",
               md, n_mem_rd, n_mem_wr, exp_rd, exp_wr);
      check(n_mem_rd == exp_rd, $sformatf("mode %0d: %0d memory reads, expected %0d", md, n_mem_rd, exp_rd));
      check(n_mem_wr == exp_wr, $sformatf("mode %0d: %0d memory writes, expected %0d", md, n_mem_wr, exp_wr));
    end
  endtask

  function automatic string rand_str(int len);
    string r = "";
    string abc = "ACGT";
    for (int i = 0; i < len; i++) begin
      int c = int'($urandom % 4);
      r = {r, abc.substr(c, c)};
    end
    return r;
  endfunction

  int cyc_run;
  real rate;
  initial begin
    string s, t;
    start = 0; mode = MODE_STRIP_SP; m = 0; n = 0; tile_d = 0; path_en = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    s = rand_str(LEN);
    t = rand_str(LEN);

    // Score and path, strip mining with scratchpad (document: 1.53 cells/cycle).
    run(MODE_STRIP_SP, s, t, 0, 1'b1, cyc_run);
    rate = real'(LEN * LEN) / real'(cyc_run);
    $display("strip-scratchpad, score+path: %0d cycles, %0.2f cells/cycle", cyc_run, rate);
    check(rate >= 1.53, "strip-scratchpad slower than 1.53 cells/cycle");

    // Score only, strip mining with scratchpad (document: 1.80 cells/cycle).
    run(MODE_STRIP_SP, s, t, 0, 1'b0, cyc_run);
    rate = real'(LEN * LEN) / real'(cyc_run);
    $display("strip-scratchpad, score only: %0d cycles, %0.2f cells/cycle", cyc_run, rate);
    check(rate >= 1.80, "strip-scratchpad slower than 1.80 cells/cycle");

    // Score only, strip mining with memory (document: 2.14 cells/cycle).
    run(MODE_STRIP_MEM, s, t, 0, 1'b0, cyc_run);
    rate = real'(LEN * LEN) / real'(cyc_run);
    $display("strip-memory, score only: %0d cycles, %0.2f cells/cycle", cyc_run, rate);
    check(rate >= 2.14, "strip-memory slower than 2.14 cells/cycle");

    // Score only, tiled with the widest tile min(SP/2, n/2) = 512 (document: 1.88 cells/cycle).
    run(MODE_TILED, s, t, LEN / 2, 1'b0, cyc_run);
    rate = real'(LEN * LEN) / real'(cyc_run);
    $display("tiled D=%0d, score only: %0d cycles, %0.2f cells/cycle", LEN / 2, cyc_run, rate);
    check(rate >= 1.88, "tiled slower than 1.88 cells/cycle");

    $display("mechanisms: segs mem/sp/tiled=%0d/%0d/%0d bypass=%0d seeded=%0d sp_rd=%0d sp_wr=%0d corner=%0d edge=%0d",
             n_seg[0], n_seg[1], n_seg[2], n_byp, n_seeded, n_sp_rd, n_sp_wr, n_corner, n_edge);
    check(n_byp > 0, "no bypass row (1024 is not a multiple of 14)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
