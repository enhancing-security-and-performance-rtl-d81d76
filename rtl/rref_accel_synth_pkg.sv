// rref_accel_synth_pkg: shared types and GF(127) arithmetic of the RREF accelerator.
//
// Field elements live in 8-bit storage (FQ_ELEM) although only 7 bits are
// significant, because Q = 127 = 2^7 - 1. Products are formed in 16 bits
// (FQ_DOUBLEPREC) and reduced by folding: x mod Q = (x >> 7) + (x & 127), applied
// twice, then one conditional subtraction of Q. Inversion uses a 128-entry table
// that is computed here at elaboration as x^(Q-2) mod Q (Fermat), so no data file
// is needed; entry 0 holds 0. All functions are purely combinational, so every
// primitive completes in one clock cycle when used by the control unit.
//
// The folding reduction and the table-based inverse follow the described
// arithmetic unit; computing the table with a function is this design's choice.
package rref_accel_synth_pkg;

  localparam int unsigned Q          = 127;
  localparam int unsigned NUM_BITS_Q = 7;
  localparam int unsigned LANES      = 4;   // field elements per 32-bit memory word

  typedef logic [7:0]  fq_elem_t;        // FQ_ELEM
  typedef logic [15:0] fq_doubleprec_t;  // FQ_DOUBLEPREC
  typedef logic [31:0] word_t;

  // Reduce a 16-bit value into [0, Q-1].
  function automatic fq_elem_t fq_red(input fq_doubleprec_t x);
    fq_doubleprec_t t;
    t = {7'd0, x[15:7]} + {9'd0, x[6:0]};   // <= 511 + 127
    t = {7'd0, t[15:7]} + {9'd0, t[6:0]};   // <= 4 + 127
    if (t >= fq_doubleprec_t'(Q)) t = t - fq_doubleprec_t'(Q);
    return fq_elem_t'(t);
  endfunction

  function automatic fq_elem_t fq_mul(input fq_elem_t a, input fq_elem_t b);
    return fq_red(fq_doubleprec_t'(a) * fq_doubleprec_t'(b));
  endfunction

  function automatic fq_elem_t fq_add(input fq_elem_t a, input fq_elem_t b);
    return fq_red(fq_doubleprec_t'(a) + fq_doubleprec_t'(b));
  endfunction

  // a - b for a, b in [0, Q-1]: a + (Q - b), folded.
  function automatic fq_elem_t fq_sub(input fq_elem_t a, input fq_elem_t b);
    return fq_red(fq_doubleprec_t'(a) + fq_doubleprec_t'(Q) - fq_doubleprec_t'(b));
  endfunction

  // Inverse by exponentiation, used only to build the lookup table.
  function automatic fq_elem_t fq_pow_inv(input fq_elem_t a);
    fq_elem_t r, b;
    int unsigned e;
    r = 8'd1;
    b = a;
    e = Q - 2;
    while (e != 0) begin
      if (e[0]) r = fq_mul(r, b);
      b = fq_mul(b, b);
      e = e >> 1;
    end
    return r;
  endfunction

  typedef fq_elem_t inv_table_t [128];

  function automatic inv_table_t build_inv_table();
    inv_table_t t;
    for (int i = 0; i < 128; i++)
      t[i] = (i == 0 || i >= int'(Q)) ? 8'd0 : fq_pow_inv(fq_elem_t'(i));
    return t;
  endfunction

  // fq_inv_table: 128-entry inversion ROM.
  localparam inv_table_t FQ_INV_TABLE = build_inv_table();

  function automatic fq_elem_t fq_inv(input fq_elem_t a);
    return a[7] ? 8'd0 : FQ_INV_TABLE[a[NUM_BITS_Q-1:0]];
  endfunction

  // Control unit states (Figure of the FSM: names kept).
  typedef enum logic [4:0] {
    IDLE, LOAD_INPUTS,
    PREPROCESS_INIT, PREPROCESS_SCAN_COL, PREPROCESS_FETCH, PREPROCESS_FIND_ROW, PREPROCESS_SWAP_ROWS,
    PIVOT_INIT, PIVOT_FETCH, PIVOT_SEARCH_ROW, PIVOT_NEXT_ROW, PIVOT_NEXT_COL, HANDLE_PIVOT_REUSE,
    SCALE_ROW_FETCH, SCALE_ROW_INIT, SCALE_ROW_LOOP,
    REDUCE_ROW_INIT, REDUCE_ROW_LOOP, REDUCE_COL_LOOP, NEXT_PIVOT_ROW,
    WAIT_FOR_READBACK, STREAM_OUTPUTS, DONE
  } cu_state_e;

endpackage
