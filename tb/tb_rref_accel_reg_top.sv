// tb_rref_accel_reg_top: self-checking test of the control/status register file.
//
// Issues random register-interface accesses (valid, write, offset from the five
// defined offsets plus undefined ones) while hw2reg carries random core status.
// Same-cycle checks: ready always high; error exactly for valid accesses to an
// undefined offset; read data of WAS_PIVOT, IS_PIVOT, STATUS (bit 0 error, 1 compute
// done, 2 G out done, 3 WAS out done, 4 IS out done) and PIVOT_REUSE_LIMIT; read
// strobes for WAS/IS; write strobe and data for WAS; START and START_READBACK as
// one-cycle pulses from CTRL bits 0 and 1. The limit written at 0x10 must appear on
// reg2hw.pivot_reuse_limit from the next cycle on.
module tb_rref_accel_reg_top;
  import less_bus_pkg::*;

  logic clk = 0, rst_n = 0;
  reg_req_t req = '0;
  reg_rsp_t rsp;
  rref_reg2hw_t r2h;
  rref_hw2reg_t h2r = '0;
  logic [31:0] limit_m = '0;
  int checks = 0, failures = 0, starts = 0, readbacks = 0, errs = 0;

  rref_accel_reg_top dut (.clk_i(clk), .rst_ni(rst_n), .reg_req_i(req), .reg_rsp_o(rsp),
    .reg2hw(r2h), .hw2reg(h2r));

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
    logic [7:0] offs[7] = '{8'h00, 8'h04, 8'h08, 8'h0C, 8'h10, 8'h14, 8'h40};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      logic [7:0] o;
      bit known, rd, wr;
      @(negedge clk);
      check(r2h.pivot_reuse_limit === limit_m, "limit register");
      o = offs[$urandom_range(6, 0)];
      req.addr  = {24'h0, o};
      req.valid = ($urandom_range(3, 0) != 0);
      req.write = $urandom_range(1, 0);
      req.wdata = $urandom();
      req.wstrb = 4'hF;
      h2r = rref_hw2reg_t'({$urandom(), $urandom(), 5'($urandom())});
      #1;
      known = (o <= 8'h10);
      rd = req.valid && !req.write;
      wr = req.valid && req.write;
      check(rsp.ready === 1'b1, "ready");
      check(rsp.error === (req.valid && !known), $sformatf("error at offset %0h", o));
      if (rsp.error) errs++;
      if (rd) begin
        logic [31:0] e;
        case (o)
          8'h00: e = h2r.was_pivot_d;
          8'h04: e = h2r.is_pivot_d;
          8'h0C: e = {27'd0, h2r.is_out_done, h2r.was_out_done, h2r.g_out_done, h2r.compute_done, h2r.error};
          8'h10: e = limit_m;
          default: e = 32'd0;
        endcase
        check(rsp.rdata === e, $sformatf("read offset %0h got %08h expected %08h", o, rsp.rdata, e));
      end
      check(r2h.was_pivot_re === (rd && o == 8'h00), "was read strobe");
      check(r2h.is_pivot_re === (rd && o == 8'h04), "is read strobe");
      check(r2h.was_pivot_qe === (wr && o == 8'h00), "was write strobe");
      if (r2h.was_pivot_qe) check(r2h.was_pivot_q === req.wdata, "was write data");
      check(r2h.start === (wr && o == 8'h08 && req.wdata[0]), "start pulse");
      check(r2h.start_readback === (wr && o == 8'h08 && req.wdata[1]), "start_readback pulse");
      if (r2h.start) starts++;
      if (r2h.start_readback) readbacks++;
      if (wr && o == 8'h10) limit_m = req.wdata;
    end
    check(starts > 0 && readbacks > 0 && errs > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
