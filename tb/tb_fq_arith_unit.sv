// tb_fq_arith_unit: self-checking test of the four-lane GF(127) datapath.
//
// Exhaustively sweeps scalar x element for the multiplier and elimination lanes
// (every lane sees every pair, with a random x operand), checks the inverse output
// for every field element and that inv(a)*a = 1, and finally applies random
// 8-bit out-of-field patterns only to confirm the outputs stay inside the field.
// Reference arithmetic is plain % 127. The unit is combinational, so each vector
// is checked one time step after it is applied.
module tb_fq_arith_unit;
  import rref_accel_synth_pkg::*;

  fq_elem_t scalar, inv_in, inv_out;
  word_t    x_word, y_word, mul_word, elim_word;
  int checks = 0, failures = 0;

  fq_arith_unit dut (.scalar, .x_word, .y_word, .inv_in, .mul_word, .elim_word, .inv_out);

  initial begin
    #10_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int s = 0; s < 127; s++) begin
      for (int y = 0; y < 127; y++) begin
        scalar = fq_elem_t'(s);
        for (int l = 0; l < 4; l++) begin
          y_word[8*l +: 8] = 8'((y + 31 * l) % 127);
          x_word[8*l +: 8] = 8'($urandom_range(126, 0));
        end
        #1;
        for (int l = 0; l < 4; l++) begin
          int yv, xv, m, e;
          yv = y_word[8*l +: 8];
          xv = x_word[8*l +: 8];
          m  = (s * yv) % 127;
          e  = (xv - m + 127) % 127;
          check(mul_word[8*l +: 8] == 8'(m), $sformatf("mul %0d*%0d lane %0d got %0d", s, yv, l, mul_word[8*l +: 8]));
          check(elim_word[8*l +: 8] == 8'(e), $sformatf("elim %0d-%0d*%0d got %0d", xv, s, yv, elim_word[8*l +: 8]));
        end
      end
    end
    for (int a = 0; a < 127; a++) begin
      inv_in = fq_elem_t'(a);
      #1;
      if (a == 0) check(inv_out == 0, "inv(0) must be 0");
      else check((a * inv_out) % 127 == 1 && inv_out < 127, $sformatf("inv(%0d) got %0d", a, inv_out));
    end
    // out-of-field operands: results must still be reduced values
    for (int i = 0; i < 2000; i++) begin
      scalar = fq_elem_t'($urandom_range(255, 0));
      x_word = $urandom();
      y_word = $urandom();
      #1;
      for (int l = 0; l < 4; l++) begin
        check(mul_word[8*l +: 8] < 127, "mul out of range");
        check(elim_word[8*l +: 8] < 127, "elim out of range");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
