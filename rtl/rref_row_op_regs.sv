// rref_row_op_regs: the row-operation registers of the RREF accelerator.
//
// Holds the temporary state of one word-level row operation:
//   row_buffer_a, row_buffer_b   one word from each of the two rows being swapped
//   reduce_row_value_buffer      the word of the row being reduced, kept until the
//                                matching pivot-row word arrives (single-port memory)
//   scaling_factor               inverse of the pivot, used across the whole row scaling
//   reduce_multiplier            pivot-column element of the row being reduced
// Each register loads at the clock edge when its load input is high and otherwise
// keeps its value; all reset to 0. The control unit decides when each is loaded.
module rref_row_op_regs
  import rref_accel_synth_pkg::*;
(
  input  logic     clk_i,
  input  logic     rst_ni,
  input  logic     ld_a,
  input  logic     ld_b,
  input  logic     ld_val,
  input  word_t    word_in,
  input  logic     ld_scale,
  input  fq_elem_t scale_in,
  input  logic     ld_mult,
  input  fq_elem_t mult_in,
  output word_t    row_buffer_a,
  output word_t    row_buffer_b,
  output word_t    reduce_row_value_buffer,
  output fq_elem_t scaling_factor,
  output fq_elem_t reduce_multiplier
);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      row_buffer_a            <= '0;
      row_buffer_b            <= '0;
      reduce_row_value_buffer <= '0;
      scaling_factor          <= '0;
      reduce_multiplier       <= '0;
    end else begin
      if (ld_a)     row_buffer_a            <= word_in;
      if (ld_b)     row_buffer_b            <= word_in;
      if (ld_val)   reduce_row_value_buffer <= word_in;
      if (ld_scale) scaling_factor          <= scale_in;
      if (ld_mult)  reduce_multiplier       <= mult_in;
    end
  end

endmodule
