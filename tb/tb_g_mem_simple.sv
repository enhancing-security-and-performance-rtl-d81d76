// tb_g_mem_simple: self-checking test of one byte-wide synchronous RAM bank.
//
// Runs random reads and writes (including same-address read-during-write) against
// an associative-array model at a small depth (37). The bank is read-first with one
// cycle of read latency: the data for the address presented before a clock edge is
// valid after that edge, and a write in that same cycle is not yet visible. Writes to
// addresses at or beyond DEPTH must be ignored and such reads return 0.
module tb_g_mem_simple;
  localparam int DEPTH = 37;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [7:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  byte unsigned model[int];

  g_mem_simple #(.DEPTH(DEPTH)) dut (.clk_i(clk), .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int a;
    byte unsigned expect_q;
    bit expect_valid = 0;
    // initialise every word
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; addr = AW'(i); wdata = 8'(i * 7); model[i] = byte'(i * 7);
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (expect_valid) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          if (failures < 10) $display("FAIL read got %0h expected %0h", rdata, expect_q);
        end
      end
      a = $urandom_range((1 << AW) - 1, 0);
      addr = AW'(a);
      we = $urandom_range(1, 0);
      wdata = 8'($urandom());
      expect_q = (a < DEPTH) ? model[a] : 8'h00;
      expect_valid = 1;
      if (we && a < DEPTH) model[a] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
