// tb_ed_scratchpad: writes and reads against a model array.
// Checks the one-cycle read latency (rvalid), read data, and that a read and
// a write to the same word in one cycle return the old word.
module tb_ed_scratchpad;
  import ed_pkg::*;
  localparam int WORDS = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we, re, rvalid;
  logic [5:0] waddr, raddr;
  score_t wdata, rdata;
  ed_scratchpad #(.WORDS(WORDS)) dut (.*);
  int checks = 0, failures = 0;
  score_t model [WORDS];
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask
  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < WORDS; i++) begin
      we = 1; waddr = 6'(i); wdata = $urandom; model[i] = wdata; @(negedge clk);
    end
    we = 0;
    for (int c = 0; c < 2000; c++) begin
      score_t exp;
      re = ($urandom % 2); raddr = 6'($urandom); we = ($urandom % 2);
      if (c % 7 == 0) waddr = raddr; else waddr = 6'($urandom);
      wdata = $urandom;
      exp = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      check(rvalid == re, "rvalid is not re delayed by one cycle");
      if (re) check(rdata == exp, $sformatf("read %0d gave %h, expected %h", raddr, rdata, exp));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
