// tb_ed_fifo: random traffic through a 3-entry channel buffer.
// Checks order and contents against a queue model, that in_ready is low
// exactly when the buffer holds DEPTH tokens, and that a token written in
// one cycle is readable in the next (one cycle link latency).
module tb_ed_fifo;
  localparam int DEPTH = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [7:0] in_data, out_data;
  ed_fifo #(.T(logic [7:0]), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  byte unsigned q[$];
  int sent = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  initial begin
    in_valid = 0; in_data = 0; out_ready = 0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    // latency: write one token, it is visible the next cycle
    in_valid = 1; in_data = 8'h5a; @(negedge clk); in_valid = 0;
    check(out_valid && out_data == 8'h5a, "token not visible one cycle after write");
    out_ready = 1; @(negedge clk); out_ready = 0;
    check(!out_valid, "buffer not empty after read");
    for (int c = 0; c < 3000; c++) begin
      in_valid  = ($urandom % 100) < 60;
      in_data   = 8'($urandom);
      out_ready = ($urandom % 100) < (c < 1500 ? 40 : 80);
      #1;
      check(in_ready == (q.size() < DEPTH), "in_ready does not match occupancy");
      check(out_valid == (q.size() > 0), "out_valid does not match occupancy");
      if (out_valid && q.size() > 0) check(out_data == q[0], "wrong token order/content");
      @(posedge clk);
      if (out_valid && out_ready && q.size() > 0) void'(q.pop_front());
      if (in_valid && in_ready) begin q.push_back(in_data); sent++; end
      @(negedge clk);
    end
    check(sent > 1000, "too little traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
