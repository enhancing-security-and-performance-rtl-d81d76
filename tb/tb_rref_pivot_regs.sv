// tb_rref_pivot_regs: self-checking test of the was_pivot / is_pivot flag registers.
//
// N = 40, so two 32-bit words of which the second is only partly used. Random
// cycles mix word writes, single-bit clears, single-bit sets and the synchronous
// clear; a bit-array model applies them in the order the registers do (word write,
// then bit clear, so a clear wins over a write of the same bit). Every cycle the
// bit read port and both word read ports are compared with the model; bits past N
// must read 0 and out-of-range indices must be ignored.
module tb_rref_pivot_regs;
  localparam int N = 40, PW = (N + 31) / 32;
  localparam int IW = $clog2(N), WW = (PW > 1) ? $clog2(PW) : 1;

  logic clk = 0, rst_n = 0, clear = 0;
  logic was_wr_en = 0, was_clr_en = 0, is_set_en = 0;
  logic [WW-1:0] was_wr_word = '0, was_rd_word = '0, is_rd_word = '0;
  logic [31:0] was_wr_data = '0, was_word, is_word;
  logic [IW-1:0] was_clr_idx = '0, is_set_idx = '0, was_rd_idx = '0;
  logic was_bit;
  bit was_m[N], is_m[N];
  int checks = 0, failures = 0;

  rref_pivot_regs #(.N(N)) dut (.clk_i(clk), .rst_ni(rst_n), .clear, .was_wr_en, .was_wr_word,
    .was_wr_data, .was_clr_en, .was_clr_idx, .is_set_en, .is_set_idx, .was_rd_idx, .was_bit,
    .was_rd_word, .was_word, .is_rd_word, .is_word);

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
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // check outputs for the present state
      was_rd_idx  = IW'($urandom_range((1 << IW) - 1, 0));
      was_rd_word = WW'($urandom_range(PW - 1, 0));
      is_rd_word  = WW'($urandom_range(PW - 1, 0));
      #1;
      check(was_bit === ((was_rd_idx < N) ? was_m[was_rd_idx] : 1'b0), "was_bit");
      for (int j = 0; j < 32; j++) begin
        int i1, i2;
        i1 = 32 * was_rd_word + j;
        i2 = 32 * is_rd_word + j;
        check(was_word[j] === ((i1 < N) ? was_m[i1] : 1'b0), $sformatf("was_word bit %0d", i1));
        check(is_word[j] === ((i2 < N) ? is_m[i2] : 1'b0), $sformatf("is_word bit %0d", i2));
      end
      // drive the next operation
      clear       = ($urandom_range(60, 0) == 0);
      was_wr_en   = ($urandom_range(3, 0) == 0);
      was_wr_word = WW'($urandom_range(PW - 1, 0));
      was_wr_data = $urandom();
      was_clr_en  = $urandom_range(1, 0);
      was_clr_idx = IW'($urandom_range((1 << IW) - 1, 0));
      is_set_en   = ($urandom_range(2, 0) == 0);
      is_set_idx  = IW'($urandom_range((1 << IW) - 1, 0));
      if (clear) begin
        foreach (was_m[i]) begin was_m[i] = 0; is_m[i] = 0; end
      end else begin
        if (was_wr_en)
          for (int j = 0; j < 32; j++) if (32 * was_wr_word + j < N) was_m[32 * was_wr_word + j] = was_wr_data[j];
        if (was_clr_en && was_clr_idx < N) was_m[was_clr_idx] = 0;
        if (is_set_en && is_set_idx < N) is_m[is_set_idx] = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
