// tb_ed_worker_array: a chain of W=3 row workers fed directly.
//
// S and T are random over a 4-letter alphabet; the expected cost matrix is
// computed here. Three segments go through the chain with random valid/ready:
//   rows 1-3, strip mining from column 0 (tops are row 0);
//   rows 4-5 plus one bypass row (m = 5), tops are row 3 as the last worker
//     produced it;
//   rows 1-3 as one tile, columns 4..n, seeded from column 3.
// The last worker's scores must equal the expected last row of each segment,
// every path token must be right and come from the worker of its row, the
// tile must give one edge per row with M[i][n], and T must leave the chain
// unchanged.
module tb_ed_worker_array;
  import ed_pkg::*;
  localparam int W = 3;
  localparam int M = 5, N = 9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic path_en, t_in_valid, t_in_ready, top_valid, top_ready, t_out_valid, t_out_ready;
  logic score_valid, score_ready, idle;
  t_tok_t t_in_data, t_out_data;
  s_tok_t top_data, score_data;
  logic [W-1:0] path_valid, path_ready, edge_valid, edge_ready;
  path_tok_t [W-1:0] path_data;
  edge_tok_t [W-1:0] edge_data;

  ed_worker_array #(.W(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  byte S[M+1], T[N+1];
  int R[M+1][N+1];
  function automatic path_e ref_path(int i, int j);
    int ms, dl, in, m2;
    ms = R[i-1][j-1] + ((S[i] == T[j]) ? 0 : 1);
    dl = R[i-1][j] + 1; in = R[i][j-1] + 1;
    m2 = (dl < in) ? dl : in;
    if (ms <= m2) return (S[i] == T[j]) ? P_MATCH : P_SUB;
    if (dl <= in) return P_DEL;
    return P_INS;
  endfunction

  t_tok_t tq[$];
  s_tok_t sq[$], sexp[$];
  byte texp[$];
  int paths = 0, edges = 0;
  int exp_paths = 0;
  bit tile_seg = 0;

  bit t_acc = 0, s_acc = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      if (t_acc) void'(tq.pop_front());
      if (s_acc) void'(sq.pop_front());
      if (!(t_in_valid && !t_acc)) begin
        t_in_valid = (tq.size() > 0) && ($urandom % 100 < 80);
        if (tq.size() > 0) t_in_data = tq[0];
      end
      if (!(top_valid && !s_acc)) begin
        top_valid = (sq.size() > 0) && ($urandom % 100 < 80);
        if (sq.size() > 0) top_data = sq[0];
      end
      t_out_ready = $urandom % 100 < 70;
      score_ready = $urandom % 100 < 70;
      path_ready  = W'($urandom);
      edge_ready  = W'($urandom);
      #1;
      t_acc = t_in_valid && t_in_ready;
      s_acc = top_valid && top_ready;
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (score_valid && score_ready) begin
        check(sexp.size() > 0 && score_data == sexp[0], $sformatf("last worker score %p", score_data));
        if (sexp.size() > 0) void'(sexp.pop_front());
      end
      if (t_out_valid && t_out_ready) begin
        check(!t_out_data.hdr && texp.size() > 0 && t_out_data.ch == texp[0], "T leaving the chain wrong");
        if (texp.size() > 0) void'(texp.pop_front());
      end
      for (int k = 0; k < W; k++) begin
        if (path_valid[k] && path_ready[k]) begin
          int i, j;
          i = path_data[k].row; j = path_data[k].col;
          paths++;
          check(i >= 1 && i <= M && j >= 1 && j <= N && path_data[k].path == ref_path(i, j),
                $sformatf("path (%0d,%0d)", i, j));
          check(i >= 1 && i <= M && j >= 1 && j <= N && int'(path_data[k].score) == R[i][j],
                $sformatf("cell score (%0d,%0d)", i, j));
          check((i - 1) % W == k, "path from the wrong worker");
        end
        if (edge_valid[k] && edge_ready[k]) begin
          int i;
          i = edge_data[k].row;
          edges++;
          check(tile_seg && i >= 1 && i <= W && edge_data[k].score == score_t'(R[i][N]),
                $sformatf("edge row %0d = %0d", i, edge_data[k].score));
        end
      end
    end
  end

  function automatic t_tok_t hdr(int i, int col, bit seeded, bit byp, int left, int dg);
    return '{hdr: 1, last: 0, seeded: seeded, bypass: byp, ch: byp ? 8'd0 : S[i], row: idx_t'(i),
             col: idx_t'(col), left: score_t'(left), diag: score_t'(dg)};
  endfunction

  task automatic wait_drain();
    for (int c = 0; c < 3000 && (sexp.size() > 0 || texp.size() > 0 || !idle); c++) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    string abc = "ACGT";
    path_en = 1; t_in_valid = 0; top_valid = 0; t_in_data = '0; top_data = '0;
    t_out_ready = 0; score_ready = 0; path_ready = 0; edge_ready = 0;
    for (int i = 1; i <= M; i++) S[i] = abc[$urandom % 4];
    for (int j = 1; j <= N; j++) T[j] = abc[$urandom % 4];
    for (int j = 0; j <= N; j++) R[0][j] = j;
    for (int i = 1; i <= M; i++) begin
      R[i][0] = i;
      for (int j = 1; j <= N; j++) begin
        int b;
        b = R[i-1][j-1] + ((S[i] == T[j]) ? 0 : 1);
        if (R[i-1][j] + 1 < b) b = R[i-1][j] + 1;
        if (R[i][j-1] + 1 < b) b = R[i][j-1] + 1;
        R[i][j] = b;
      end
    end
    repeat (2) @(negedge clk); rst_n = 1;

    // segment 1: rows 1..3 from column 0
    for (int k = 0; k < W; k++) tq.push_back(hdr(1 + k, 0, 0, 0, 0, 0));
    sq.push_back('{last: 0, score: score_t'(R[0][0])});
    for (int j = 1; j <= N; j++) begin
      tq.push_back('{hdr: 0, last: (j == N), seeded: 0, bypass: 0, ch: T[j], row: 0, col: 0, left: 0, diag: 0});
      sq.push_back('{last: (j == N), score: score_t'(R[0][j])});
      texp.push_back(T[j]);
    end
    for (int j = 0; j <= N; j++) sexp.push_back('{last: (j == N), score: score_t'(R[3][j])});
    wait_drain();
    check(sexp.size() == 0, "segment 1 incomplete");

    // segment 2: rows 4..5 and a bypass row
    tq.push_back(hdr(4, 0, 0, 0, 0, 0)); tq.push_back(hdr(5, 0, 0, 0, 0, 0)); tq.push_back(hdr(6, 0, 0, 1, 0, 0));
    sq.push_back('{last: 0, score: score_t'(R[3][0])});
    for (int j = 1; j <= N; j++) begin
      tq.push_back('{hdr: 0, last: (j == N), seeded: 0, bypass: 0, ch: T[j], row: 0, col: 0, left: 0, diag: 0});
      sq.push_back('{last: (j == N), score: score_t'(R[3][j])});
      texp.push_back(T[j]);
    end
    for (int j = 0; j <= N; j++) sexp.push_back('{last: (j == N), score: score_t'(R[5][j])});
    wait_drain();
    check(sexp.size() == 0, "segment 2 incomplete");
    check(paths == M * N, $sformatf("%0d paths, expected %0d", paths, M * N));

    // segment 3: tile rows 1..3, columns 4..N, seeded from column 3
    tile_seg = 1;
    path_en = 0;
    for (int k = 0; k < W; k++) tq.push_back(hdr(1 + k, 4, 1, 0, R[1+k][3], R[k][3]));
    for (int j = 4; j <= N; j++) begin
      tq.push_back('{hdr: 0, last: (j == N), seeded: 0, bypass: 0, ch: T[j], row: 0, col: 0, left: 0, diag: 0});
      sq.push_back('{last: (j == N), score: score_t'(R[0][j])});
      texp.push_back(T[j]);
      sexp.push_back('{last: (j == N), score: score_t'(R[3][j])});
    end
    wait_drain();
    check(sexp.size() == 0, "segment 3 incomplete");
    check(edges == W, $sformatf("%0d edges, expected %0d", edges, W));
    check(paths == M * N, "paths sent with path_en low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
