// tb_rref_accel_data_reg_top: self-checking test of the single-register data port.
//
// The G register is external: a valid write must raise g_qe with g_q = wdata in the
// same cycle, a valid read must raise g_re and return g_d as read data in the same
// cycle, and nothing may be strobed when valid is low. ready is always high, error
// always low. Random accesses with random g_d are checked every cycle.
module tb_rref_accel_data_reg_top;
  import less_bus_pkg::*;

  logic clk = 0, rst_n = 0;
  reg_req_t req = '0;
  reg_rsp_t rsp;
  logic [31:0] g_q, g_d = '0;
  logic g_qe, g_re;
  int checks = 0, failures = 0;

  rref_accel_data_reg_top dut (.clk_i(clk), .rst_ni(rst_n), .reg_req_i(req), .reg_rsp_o(rsp),
    .g_q, .g_qe, .g_re, .g_d);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      req.valid = $urandom_range(1, 0);
      req.write = $urandom_range(1, 0);
      req.addr  = 32'h0;
      req.wdata = $urandom();
      req.wstrb = 4'hF;
      g_d = $urandom();
      #1;
      check(rsp.ready === 1'b1 && rsp.error === 1'b0, "ready/error");
      check(g_qe === (req.valid && req.write), "write strobe");
      check(g_re === (req.valid && !req.write), "read strobe");
      if (g_qe) check(g_q === req.wdata, "write data");
      if (g_re) check(rsp.rdata === g_d, "read data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
