// tb_less_workloads: one LESS-like RREF call at the matrix sizes of security levels
// 3 (K=200, N=400) and 5 (K=274, N=548), each on a less_top built for that size.
//
// The level-1 size (126 x 252) is the default build and is covered by
// tb_less_top_full. Here two wrappers run side by side, each driven through its
// register and DMA ports by less_top_driver with one systematic matrix under a
// random monomial map and unlimited pivot reuse (the situation of a LESS signing
// call). Every output word, the error status and the exact compute cycle count are
// checked against the reference model; pivot reuse must have occurred at both sizes.
module tb_less_workloads;
  import less_bus_pkg::*;
  import rref_ref_pkg::*;

  logic clk = 0;
  logic rst3, rst5;
  reg_req_t rq3, rq5;
  reg_rsp_t rs3, rs5;
  obi_req_t oq3, oq5;
  obi_resp_t os3, os5;
  logic [3:0] in3, in5;
  int c3, c5, f3, f5, u0, u1, u2, u3, u4, u5, u6, u7;
  bit d3, d5;
  stats_t s3, s5;

  always #5 clk = ~clk;

  less_top #(.K(200), .N(400)) dut3 (.clk_i(clk), .rst_ni(rst3), .reg_req_i(rq3), .reg_rsp_o(rs3),
    .slave_req_i(oq3), .slave_rsp_o(os3), .intr_o(in3));
  less_top #(.K(274), .N(548)) dut5 (.clk_i(clk), .rst_ni(rst5), .reg_req_i(rq5), .reg_rsp_o(rs5),
    .slave_req_i(oq5), .slave_rsp_o(os5), .intr_o(in5));

  less_top_driver #(.K(200), .N(400), .RUNS(1), .KIND_MASK(1), .REPORT(1)) drv3 (.clk, .rst_n(rst3), .reg_req(rq3),
    .reg_rsp(rs3), .obi_req(oq3), .obi_rsp(os3), .intr(in3), .checks(c3), .failures(f3), .finished(d3),
    .stats(s3), .b2b_dma_words(u0), .gap_dma_words(u1), .reg_errors(u2), .intr_seen(u3));
  less_top_driver #(.K(274), .N(548), .RUNS(1), .KIND_MASK(1), .REPORT(1)) drv5 (.clk, .rst_n(rst5), .reg_req(rq5),
    .reg_rsp(rs5), .obi_req(oq5), .obi_rsp(os5), .intr(in5), .checks(c5), .failures(f5), .finished(d5),
    .stats(s5), .b2b_dma_words(u4), .gap_dma_words(u5), .reg_errors(u6), .intr_seen(u7));

  initial begin
    #1_000_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c3 + c5, f3 + f5 + 1);
    $finish;
  end

  initial begin
    wait (d3 && d5);
    $display("level 3: reused %0d of 200 pivots, %0d preprocessing swaps", s3.reuses, s3.pre_swaps);
    $display("level 5: reused %0d of 274 pivots, %0d preprocessing swaps", s5.reuses, s5.pre_swaps);
    $display("TB_RESULT checks=%0d failures=%0d", c3 + c5 + 2,
             f3 + f5 + int'(s3.reuses == 0) + int'(s5.reuses == 0));
    $finish;
  end
endmodule
