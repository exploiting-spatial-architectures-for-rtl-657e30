// tb_ed_mem_arbiter: random requests from 4 requesters.
// Checks that the lowest-numbered valid requester is granted, its fields
// reach the memory port, only the winner sees ready, and ready follows the
// memory's ready.
module tb_ed_mem_arbiter;
  import ed_pkg::*;
  localparam int N = 4;
  logic [N-1:0] req_valid, req_ready, req_we;
  addr_t [N-1:0] req_addr;
  score_t [N-1:0] req_wdata;
  logic mem_valid, mem_ready, mem_we;
  addr_t mem_addr;
  score_t mem_wdata;
  ed_mem_arbiter #(.N(N)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask
  initial begin
    for (int c = 0; c < 2000; c++) begin
      int win;
      req_valid = N'($urandom); mem_ready = 1'($urandom);
      for (int i = 0; i < N; i++) begin
        req_we[i] = 1'($urandom); req_addr[i] = $urandom; req_wdata[i] = $urandom;
      end
      #1;
      win = -1;
      for (int i = N - 1; i >= 0; i--) if (req_valid[i]) win = i;
      check(mem_valid == (win >= 0), "mem_valid wrong");
      if (win >= 0) begin
        check(mem_addr == req_addr[win] && mem_we == req_we[win] && mem_wdata == req_wdata[win],
              "winner's request not on the memory port");
        check(req_ready == (mem_ready ? N'(1) << win : '0), "ready not given to the winner only");
      end else check(req_ready == '0, "ready with no request");
      #4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
