// rref_ref_pkg: reference model used by the testbenches of the RREF accelerator.
//
// rref_model() is an independent software model of Gaussian elimination with
// pivot reuse over GF(127) on a flat row-major K x N byte array: preprocessing
// row swaps for the columns marked in was_pivot (only when the reuse limit is not
// 0), diagonal-start column-wise pivot search, row swap with was_pivot clearing,
// pivot reuse (skip scaling and elimination), scaling and elimination of all other
// rows. Field arithmetic uses plain % so it shares nothing with the design's
// folding reduction. Alongside the result it returns the number of clock cycles
// the accelerator's schedule takes from PREPROCESS_INIT to WAIT_FOR_READBACK:
// 2+1 cycles per single-element probe, 6 per swapped word, 3 per scaled word,
// 3 per multiplier fetch, 5 per eliminated word and one cycle for each control
// state passed through. It also counts the mechanisms exercised.
package rref_ref_pkg;

  typedef struct {
    int pre_swaps;      // preprocessing row swaps
    int pre_cols;       // was_pivot columns examined in preprocessing
    int search_swaps;   // row swaps during pivot discovery
    int reuses;         // pivots reused (scaling and elimination skipped)
    int col_skips;      // columns skipped during pivot search
    int scaled_rows;    // pivots scaled and eliminated
    int errors;         // runs that ended without a pivot
  } stats_t;

  function automatic int unsigned m127(input longint x);
    longint r;
    r = x % 127;
    if (r < 0) r += 127;
    return r[31:0];
  endfunction

  function automatic int unsigned inv127(input int unsigned a);
    for (int unsigned i = 1; i < 127; i++) if ((a * i) % 127 == 1) return i;
    return 0;
  endfunction

  // Returns 1 on success, 0 when no pivot was found (error).
  function automatic int rref_model(input int K, input int N, ref byte unsigned g[],
                                    ref bit is_p[], ref bit was_p[], input longint limit,
                                    output longint cycles, inout stats_t st);
    int rw;
    int cnt;
    byte unsigned tmp;
    rw     = (N + 3) / 4;
    cycles = 1;                                   // PREPROCESS_INIT
    foreach (is_p[i]) is_p[i] = 0;
    for (int col = K - 1; col >= 0; col--) begin
      cycles += 1;                                // PREPROCESS_SCAN_COL
      if (was_p[col] && limit != 0) begin
        int r;
        r = -1;
        st.pre_cols++;
        cycles += 3 * K;                          // fetch (2) + find (1) per row
        for (int row = 0; row < K; row++) if (g[row * N + col] != 0) r = row;
        if (r >= 0 && r != col) begin
          for (int c = 0; c < N; c++) begin
            tmp = g[col * N + c]; g[col * N + c] = g[r * N + c]; g[r * N + c] = tmp;
          end
          cycles += 6 * rw + 1;
          st.pre_swaps++;
        end else cycles += 1;
      end
    end
    cycles += 1;                                  // SCAN_COL exit
    cnt = 0;
    for (int p = 0; p < K; p++) begin
      int pr, pc;
      cycles += 1;                                // PIVOT_INIT
      pr = p; pc = p;
      forever begin
        cycles += 3;                              // fetch + search
        if (g[pr * N + pc] != 0) break;
        if (pr < K - 1) begin cycles += 1; pr++; end
        else begin
          cycles += 1;                            // PIVOT_NEXT_COL
          if (pc >= N - 1) begin st.errors++; return 0; end
          pc++; pr = p; st.col_skips++;
        end
      end
      is_p[pc] = 1;
      if (pr != p) begin
        was_p[pr] = 0;
        for (int c = 0; c < N; c++) begin
          tmp = g[p * N + c]; g[p * N + c] = g[pr * N + c]; g[pr * N + c] = tmp;
        end
        cycles += 6 * rw;
        st.search_swaps++;
      end
      cycles += 1;                                // HANDLE decision
      if (was_p[pc] && cnt < limit && pc < K) begin
        cnt++;
        st.reuses++;
        cycles += 1;                              // NEXT_PIVOT_ROW
        continue;
      end
      st.scaled_rows++;
      begin
        int unsigned s;
        s = inv127(g[p * N + pc]);
        for (int c = pc; c < N; c++) g[p * N + c] = byte'(m127(longint'(s) * g[p * N + c]));
        cycles += 3 + 3 * ((N - pc + 3) / 4);
      end
      cycles += 1;                                // REDUCE_ROW_INIT
      for (int r = 0; r < K; r++) begin
        if (r == p) begin cycles += 1; continue; end
        begin
          int unsigned m;
          m = g[r * N + pc];
          for (int c = 0; c < N; c++)
            g[r * N + c] = byte'(m127(longint'(g[r * N + c]) - longint'(m) * g[p * N + c]));
        end
        cycles += 3 + 5 * rw;
      end
      cycles += 2;                                // ROW_LOOP exit + NEXT_PIVOT_ROW
    end
    return 1;
  endfunction

  // Builds a LESS-style input: a systematic matrix [I | M] with its columns
  // permuted and scaled by a random monomial map. was_p marks where the old pivot
  // columns went.
  function automatic void make_monomial(input int K, input int N, ref byte unsigned g[],
                                        ref bit was_p[]);
    int perm[];
    perm = new[N];
    foreach (perm[i]) perm[i] = i;
    for (int i = N - 1; i > 0; i--) begin
      int j, t;
      j = $urandom_range(i, 0);
      t = perm[i]; perm[i] = perm[j]; perm[j] = t;
    end
    foreach (was_p[i]) was_p[i] = 0;
    for (int dst = 0; dst < N; dst++) begin
      int src;
      int unsigned sc;
      src = perm[dst];
      sc  = $urandom_range(126, 1);
      for (int r = 0; r < K; r++) begin
        int unsigned v;
        if (src < K) v = (src == r) ? 1 : 0;
        else         v = $urandom_range(126, 0);
        g[r * N + dst] = byte'(m127(longint'(v) * sc));
      end
      if (src < K) was_p[dst] = 1;
    end
  endfunction

endpackage
