// tb_rref_row_op_regs: self-checking test of the row-operation holding registers.
//
// Each cycle random load enables and data are applied; a model keeps the five
// registers (row buffers A and B, the reduce-row value buffer, the scaling factor
// and the elimination multiplier). After each clock edge the outputs must equal the
// model: a register changes exactly one cycle after its load enable and otherwise
// holds. Reset must clear all of them.
module tb_rref_row_op_regs;
  import rref_accel_synth_pkg::*;

  logic clk = 0, rst_n = 0;
  logic ld_a = 0, ld_b = 0, ld_val = 0, ld_scale = 0, ld_mult = 0;
  word_t word_in = '0, a_q, b_q, v_q;
  fq_elem_t scale_in = '0, mult_in = '0, s_q, m_q;
  word_t ma = '0, mb = '0, mv = '0;
  fq_elem_t ms = '0, mm = '0;
  int checks = 0, failures = 0;

  rref_row_op_regs dut (.clk_i(clk), .rst_ni(rst_n), .ld_a, .ld_b, .ld_val, .word_in, .ld_scale,
    .scale_in, .ld_mult, .mult_in, .row_buffer_a(a_q), .row_buffer_b(b_q),
    .reduce_row_value_buffer(v_q), .scaling_factor(s_q), .reduce_multiplier(m_q));

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if ({a_q, b_q, v_q, s_q, m_q} !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++;
      if (a_q !== ma || b_q !== mb || v_q !== mv || s_q !== ms || m_q !== mm) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d", n);
      end
      {ld_a, ld_b, ld_val, ld_scale, ld_mult} = 5'($urandom());
      word_in  = $urandom();
      scale_in = fq_elem_t'($urandom_range(126, 0));
      mult_in  = fq_elem_t'($urandom_range(126, 0));
      if (ld_a) ma = word_in;
      if (ld_b) mb = word_in;
      if (ld_val) mv = word_in;
      if (ld_scale) ms = scale_in;
      if (ld_mult) mm = mult_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
