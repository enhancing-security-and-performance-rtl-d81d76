// fq_arith_unit: the four-lane GF(127) arithmetic unit of the RREF accelerator.
//
// Purely combinational. Each of the four lanes works on one byte (one field
// element) of the 32-bit words:
//   mul_word[i]  = scalar * y[i] mod 127            (pivot-row normalisation)
//   elim_word[i] = x[i] - scalar * y[i] mod 127     (row elimination)
// and a 128-entry lookup table gives inv_out = inv_in^-1 mod 127 (0 for 0).
// Inputs are expected in [0, 126]. The lane count matches the four elements
// fetched per memory access. The operations come from rref_accel_synth_pkg, as in
// the described design; wrapping them in a module with these ports is this
// design's choice.
module fq_arith_unit
  import rref_accel_synth_pkg::*;
(
  input  fq_elem_t scalar,
  input  word_t    x_word,
  input  word_t    y_word,
  input  fq_elem_t inv_in,
  output word_t    mul_word,
  output word_t    elim_word,
  output fq_elem_t inv_out
);

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    fq_elem_t prod;
    assign prod                = fq_mul(scalar, y_word[8*i +: 8]);
    assign mul_word[8*i +: 8]  = prod;
    assign elim_word[8*i +: 8] = fq_sub(x_word[8*i +: 8], prod);
  end

  assign inv_out = fq_inv(inv_in);

endmodule
