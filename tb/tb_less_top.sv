// tb_less_top: end-to-end test of the accelerator wrapper at a reduced size.
//
// less_top is built for a 6 x 13 matrix (partial last word in every row) so that
// many complete operations fit in a short simulation; less_top_driver acts as the
// host processor on the register port and as the DMA engine on the OBI data port,
// and checks every result against the reference model, including exact compute
// cycle counts and the one-word-per-cycle readback rate. At the end the counts of
// every mechanism are printed and any that never happened is a failure:
// preprocessing swaps, pivot-search swaps, pivot reuse, column skips, scaled and
// eliminated pivots, no-pivot errors, back-to-back and gapped DMA transfers,
// register error answers, and each of the four interrupt lines.
module tb_less_top;
  import less_bus_pkg::*;
  import rref_ref_pkg::*;

  logic clk = 0, rst_n;
  reg_req_t reg_req;
  reg_rsp_t reg_rsp;
  obi_req_t obi_req;
  obi_resp_t obi_rsp;
  logic [3:0] intr;
  int checks, failures, b2b, gap, regerr, intr_seen;
  bit finished;
  stats_t st;

  always #5 clk = ~clk;

  less_top #(.K(6), .N(13)) dut (.clk_i(clk), .rst_ni(rst_n), .reg_req_i(reg_req), .reg_rsp_o(reg_rsp),
    .slave_req_i(obi_req), .slave_rsp_o(obi_rsp), .intr_o(intr));

  less_top_driver #(.K(6), .N(13), .RUNS(40)) drv (.clk, .rst_n, .reg_req, .reg_rsp, .obi_req, .obi_rsp,
    .intr, .checks, .failures, .finished, .stats(st), .b2b_dma_words(b2b), .gap_dma_words(gap),
    .reg_errors(regerr), .intr_seen);

  initial begin
    #50_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  int extra_checks = 0, extra_fail = 0;
  task automatic need(input int count, input string what);
    extra_checks++;
    $display("  %-28s %0d", what, count);
    if (count == 0) begin extra_fail++; $display("FAIL mechanism never exercised: %s", what); end
  endtask

  initial begin
    wait (finished);
    $display("mechanisms:");
    need(st.pre_swaps, "preprocessing swaps");
    need(st.search_swaps, "pivot-search swaps");
    need(st.reuses, "reused pivots");
    need(st.col_skips, "column skips");
    need(st.scaled_rows, "scaled+eliminated pivots");
    need(st.errors, "no-pivot errors");
    need(b2b, "back-to-back DMA words");
    need(gap, "gapped DMA words");
    need(regerr, "register error answers");
    for (int i = 0; i < 4; i++) need(intr_seen >> i & 1, $sformatf("interrupt line %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_fail);
    $finish;
  end
endmodule
