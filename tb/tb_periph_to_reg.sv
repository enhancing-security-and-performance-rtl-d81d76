// tb_periph_to_reg: self-checking test of the OBI-to-register bridge.
//
// A register-side responder model answers reads with a value derived from the
// address and randomly drops ready. Random OBI requests are applied. The test
// checks that the request fields pass through unchanged in the same cycle, that
// gnt_o and valid_o are high exactly when req and ready are both high, and that on
// the cycle after a granted read rdata_o holds the responder's data (a granted write
// leaves it unchanged).
module tb_periph_to_reg;
  import less_bus_pkg::*;

  logic clk = 0, rst_n = 0;
  obi_req_t req = '0;
  reg_req_t preq;
  reg_rsp_t prsp;
  logic gnt, valid;
  logic [31:0] rdata, exp_rdata = '0;
  int checks = 0, failures = 0, grants = 0, stalls = 0;

  periph_to_reg dut (.clk_i(clk), .rst_ni(rst_n), .slave_req_i(req), .gnt_o(gnt), .rdata_o(rdata),
    .valid_o(valid), .periph_req_o(preq), .periph_rsp_i(prsp));

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
    prsp = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      check(rdata === exp_rdata, $sformatf("rdata %08h expected %08h", rdata, exp_rdata));
      req.req   = $urandom_range(1, 0);
      req.we    = $urandom_range(1, 0);
      req.be    = 4'($urandom());
      req.addr  = $urandom();
      req.wdata = $urandom();
      prsp.ready = ($urandom_range(3, 0) != 0);
      prsp.rdata = req.addr ^ 32'h5A5A_0F0F;
      prsp.error = 1'b0;
      #1;
      check(preq.addr === req.addr && preq.write === req.we && preq.wdata === req.wdata &&
            preq.wstrb === req.be && preq.valid === req.req, "request pass-through");
      check(gnt === (req.req && prsp.ready), "gnt");
      check(valid === gnt, "valid");
      if (gnt) grants++;
      if (req.req && !prsp.ready) stalls++;
      if (gnt && !req.we) exp_rdata = prsp.rdata;
    end
    check(grants > 0 && stalls > 0, "coverage of grants and stalls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
