// tb_g_mem: self-checking test of the banked, unaligned-access matrix memory.
//
// Uses a small 5 x 7 matrix (35 bytes, not a multiple of four, so the masking of
// the last word is exercised). A byte-array model tracks the contents. Random
// accesses at any byte address, aligned or not, are issued one per cycle with a
// random write enable and byte strobes; a read of address A must return bytes
// A..A+3 (bytes at or past the end as 0) exactly one cycle later, and a write in the
// same cycle must not yet be visible (read-first). The rate check is implicit: one
// access is issued every cycle with no stall and every answer is checked at
// latency 1. Counts of unaligned and word-crossing accesses are reported and must
// be non-zero.
module tb_g_mem;
  localparam int K = 5, N = 7, E = K * N;
  localparam int AW = $clog2(E + 4);

  logic clk = 0, g_we = 0;
  logic [3:0] g_wstrb = '0;
  logic [AW-1:0] g_addr = '0;
  logic [31:0] g_data_in = '0, g_data_out;
  int checks = 0, failures = 0, unaligned = 0, crossing = 0, tail = 0;
  byte unsigned model[E];

  g_mem #(.K(K), .N(N)) dut (.clk_i(clk), .g_we, .g_wstrb, .g_addr, .g_data_in, .g_data_out);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic logic [31:0] model_read(input int a);
    logic [31:0] w;
    for (int j = 0; j < 4; j++) w[8*j +: 8] = (a + j < E) ? model[a + j] : 8'h00;
    return w;
  endfunction

  initial begin
    logic [31:0] exp_w;
    bit pending = 0;
    // fill the matrix with aligned full-word writes
    for (int a = 0; a < E; a += 4) begin
      @(negedge clk);
      g_we = 1; g_wstrb = 4'hF; g_addr = AW'(a); g_data_in = $urandom();
      for (int j = 0; j < 4; j++) if (a + j < E) model[a + j] = g_data_in[8*j +: 8];
    end
    @(negedge clk); g_we = 0;
    for (int n = 0; n < 5000; n++) begin
      int a;
      @(negedge clk);
      if (pending) begin
        checks++;
        if (g_data_out !== exp_w) begin
          failures++;
          if (failures < 10) $display("FAIL read got %08h expected %08h", g_data_out, exp_w);
        end
      end
      a = $urandom_range(E - 1, 0);
      g_addr = AW'(a);
      g_we = ($urandom_range(2, 0) == 0);
      g_wstrb = 4'($urandom());
      g_data_in = $urandom();
      exp_w = model_read(a);
      pending = 1;
      if (a[1:0] != 0) unaligned++;
      if (a[1:0] != 0 && (a >> 2) != ((a + 3) >> 2) && a + 3 < E) crossing++;
      if (a + 3 >= E) tail++;
      if (g_we)
        for (int j = 0; j < 4; j++) if (g_wstrb[j] && a + j < E) model[a + j] = g_data_in[8*j +: 8];
    end
    checks++;
    if (unaligned == 0 || crossing == 0 || tail == 0) begin
      failures++;
      $display("FAIL coverage unaligned=%0d crossing=%0d tail=%0d", unaligned, crossing, tail);
    end
    $display("accesses: unaligned=%0d word-crossing=%0d at-end=%0d", unaligned, crossing, tail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
