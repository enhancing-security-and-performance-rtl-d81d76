// tb_rref_accel_synth: self-checking test of the RREF accelerator core.
//
// Runs three core instances of different shapes side by side, each driven by
// rref_core_harness against the software reference model:
//   K=4,  N=8   (rows a whole number of words, one pivot word)
//   K=6,  N=13  (partial last word in every row, odd element count)
//   K=5,  N=37  (two was/is pivot words, partial last word)
// Results, error behaviour and the exact cycle count of every computation are
// checked; the mechanism counters (preprocessing swaps, pivot-search swaps, pivot
// reuse, column skips, scaled pivots, errors) must all be non-zero.
module tb_rref_accel_synth;
  import rref_ref_pkg::*;

  logic clk = 0;
  int c0, c1, c2, f0, f1, f2;
  bit d0, d1, d2;
  stats_t s0, s1, s2;
  int checks, failures;

  always #5 clk = ~clk;

  rref_core_harness #(.K(4), .N(8),  .RUNS(40)) h0 (.clk, .checks(c0), .failures(f0), .finished(d0), .stats(s0));
  rref_core_harness #(.K(6), .N(13), .RUNS(40)) h1 (.clk, .checks(c1), .failures(f1), .finished(d1), .stats(s1));
  rref_core_harness #(.K(5), .N(37), .RUNS(30)) h2 (.clk, .checks(c2), .failures(f2), .finished(d2), .stats(s2));

  initial begin
    #20_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  task automatic need(input int count, input string what);
    checks++;
    $display("  %-26s %0d", what, count);
    if (count == 0) begin failures++; $display("FAIL mechanism never exercised: %s", what); end
  endtask

  initial begin
    wait (d0 && d1 && d2);
    checks = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    $display("mechanisms:");
    need(s0.pre_swaps + s1.pre_swaps + s2.pre_swaps, "preprocessing swaps");
    need(s0.search_swaps + s1.search_swaps + s2.search_swaps, "pivot-search swaps");
    need(s0.reuses + s1.reuses + s2.reuses, "reused pivots");
    need(s0.col_skips + s1.col_skips + s2.col_skips, "column skips");
    need(s0.scaled_rows + s1.scaled_rows + s2.scaled_rows, "scaled+eliminated pivots");
    need(s0.errors + s1.errors + s2.errors, "no-pivot errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
