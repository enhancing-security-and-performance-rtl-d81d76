// tb_less_top_full: full-size end-to-end test of less_top at its default size
// (K = 126, N = 252, the LESS security level 1 generator matrix).
//
// The wrapper is instantiated with its default parameters. less_top_driver runs
// two complete operations through the register and DMA ports: a LESS-like input
// (systematic matrix under a random monomial map, was_pivot marking the moved pivot
// columns, unlimited pivot reuse) and a random dense matrix (reuse limit drawn at
// random). Every output word, the error status, the exact compute cycle count and
// the one-word-per-cycle DMA readback are checked against the reference model;
// pivot reuse and full scaling/elimination must both have occurred.
module tb_less_top_full;
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
  longint t_start;

  always #5 clk = ~clk;

  less_top dut (.clk_i(clk), .rst_ni(rst_n), .reg_req_i(reg_req), .reg_rsp_o(reg_rsp),
    .slave_req_i(obi_req), .slave_rsp_o(obi_rsp), .intr_o(intr));

  less_top_driver #(.K(126), .N(252), .RUNS(2), .KIND_MASK(3), .REPORT(1)) drv (.clk, .rst_n, .reg_req, .reg_rsp,
    .obi_req, .obi_rsp, .intr, .checks, .failures, .finished, .stats(st), .b2b_dma_words(b2b),
    .gap_dma_words(gap), .reg_errors(regerr), .intr_seen);

  initial begin
    #400_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int c, f;
    wait (finished);
    c = checks + 2;
    f = failures + int'(st.reuses == 0) + int'(st.scaled_rows == 0);
    $display("reused pivots %0d, scaled+eliminated pivots %0d, preprocessing swaps %0d, search swaps %0d",
             st.reuses, st.scaled_rows, st.pre_swaps, st.search_swaps);
    $display("simulated cycles %0d", drv.cyc);
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
