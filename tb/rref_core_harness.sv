// rref_core_harness: drives one rref_accel_synth instance of size K x N through
// RUNS complete operations and checks each against rref_ref_pkg::rref_model.
//
// Each run: pulse start, stream the G words and the was_pivot words with random
// gaps and random interleaving (extra words are offered past the end and must be
// ignored), wait for done_COMPUTE, then pulse start_READBACK and stream out G,
// was_pivot and is_pivot with random read strobes. Checked per run: every output
// word, the error flag, and the exact compute time - the cycles from the clock edge
// that accepts the last input word to the first cycle of done_COMPUTE must be
// 1 + the model's cycle count. On even runs all three outputs are read on every
// cycle and each stream must finish in exactly its number of words (one word per
// cycle). done_G_OUT / done_WAS_OUT / done_IS_OUT must all be high at the end.
// Inputs are a mix of LESS-like monomial-transformed systematic matrices, random
// matrices, matrices with zero leading columns (column skips) and matrices with a
// zero last row (no pivot -> error), with reuse limits 0, 1, K/2, K and large.
// The mechanism counts of the model are returned so the top testbench can require
// each of them to occur.
module rref_core_harness #(
  parameter int K    = 5,
  parameter int N    = 11,
  parameter int RUNS = 20
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output bit   finished,
  output rref_ref_pkg::stats_t stats
);
  import rref_ref_pkg::*;

  localparam int E  = K * N;
  localparam int GW = (E + 3) / 4;
  localparam int PW = (N + 31) / 32;

  logic rst_n = 0, start = 0, start_rb = 0;
  logic valid_in_G = 0, valid_in_WAS = 0, read_G = 0, read_WAS = 0, read_IS = 0;
  logic [31:0] G_in = '0, was_in = '0, limit = '0;
  logic [31:0] G_out, was_out, is_out;
  logic done_c, done_g, done_w, done_i, err;
  longint cyc = 0;

  rref_accel_synth #(.K(K), .N(N)) dut (
    .clk_i(clk), .rst_ni(rst_n), .start, .start_READBACK(start_rb),
    .valid_in_G, .G_in, .valid_in_WAS, .was_pivot_column_in(was_in), .pvt_reuse_limit(limit),
    .read_G, .read_WAS, .read_IS, .G_out, .was_pivot_column_out(was_out),
    .is_pivot_column_out(is_out), .done_COMPUTE(done_c), .done_G_OUT(done_g),
    .done_WAS_OUT(done_w), .done_IS_OUT(done_i), .error(err));

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL [K=%0d N=%0d] %s", K, N, what);
    end
  endtask

  function automatic logic [31:0] g_word(ref byte unsigned g[], input int w);
    logic [31:0] v;
    for (int j = 0; j < 4; j++) v[8*j +: 8] = (4 * w + j < E) ? g[4 * w + j] : 8'h00;
    return v;
  endfunction

  function automatic logic [31:0] bit_word(ref bit b[], input int w);
    logic [31:0] v;
    for (int j = 0; j < 32; j++) v[j] = (32 * w + j < N) ? b[32 * w + j] : 1'b0;
    return v;
  endfunction

  initial begin
    byte unsigned g[], gm[];
    bit was_b[], was_m[], is_m[];
    checks = 0; failures = 0; finished = 0;
    stats = '{default: 0};
    g = new[E]; gm = new[E];
    was_b = new[N]; was_m = new[N]; is_m = new[N];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < RUNS; run++) begin
      int kind, gi, wi, ok;
      longint exp_cycles, t_last, t_done;
      logic [31:0] lim;
      // ---------------- build the input
      kind = run % 5;
      if (kind == 0 || kind == 3) make_monomial(K, N, g, was_b);
      else begin
        foreach (g[i]) g[i] = byte'($urandom_range(126, 0));
        foreach (was_b[i]) was_b[i] = ($urandom_range(2, 0) == 0);
      end
      if (kind == 2) begin                        // zero leading columns
        int z;
        z = $urandom_range(2, 1);
        for (int r = 0; r < K; r++) for (int c = 0; c < z; c++) g[r * N + c] = 0;
      end
      if (kind == 4) begin                        // rank deficient: no pivot for the last row
        for (int c = 0; c < N; c++) g[(K - 1) * N + c] = 0;
      end
      if (kind == 3) begin                        // sparse noise on a monomial input
        for (int i = 0; i < E; i++) if ($urandom_range(9, 0) == 0) g[i] = 0;
      end
      case ($urandom_range(4, 0))
        0: lim = 0;
        1: lim = 1;
        2: lim = K / 2;
        3: lim = K;
        default: lim = 32'hFFFF_FFFF;
      endcase
      if (kind == 0) lim = (run % 10 == 0) ? 32'd0 : 32'hFFFF_FFFF;
      gm = g; was_m = was_b;
      ok = rref_model(K, N, gm, is_m, was_m, longint'(lim), exp_cycles, stats);
      // ---------------- load
      @(negedge clk);
      start = 1; limit = lim;
      @(negedge clk);
      start = 0; limit = $urandom();             // limit is sampled at start only
      gi = 0; wi = 0; t_last = 0;
      while (gi < GW + 2 || wi < PW + 1) begin
        valid_in_G   = (gi < GW + 2) && $urandom_range(3, 0) != 0;
        valid_in_WAS = (wi < PW + 1) && $urandom_range(2, 0) == 0;
        G_in   = (gi < GW) ? g_word(g, gi) : $urandom();
        was_in = (wi < PW) ? bit_word(was_b, wi) : $urandom();
        @(negedge clk);
        if (valid_in_G) gi++;
        if (valid_in_WAS) wi++;
        if (t_last == 0 && gi >= GW && wi >= PW) t_last = cyc;
      end
      valid_in_G = 0; valid_in_WAS = 0;
      // ---------------- compute
      t_done = -1;
      for (longint w = 0; w < 64 * longint'(exp_cycles) + 1000; w++) begin
        if (done_c) begin t_done = cyc; break; end
        @(negedge clk);
      end
      check(t_done >= 0, $sformatf("run %0d: done_COMPUTE never rose", run));
      check(t_done - t_last == exp_cycles + 1,
            $sformatf("run %0d kind %0d: compute took %0d cycles, expected %0d", run, kind,
                      t_done - t_last, exp_cycles + 1));
      check(err === !ok, $sformatf("run %0d: error=%0b expected %0b", run, err, !ok));
      // ---------------- readback
      repeat ($urandom_range(3, 0)) @(negedge clk);
      check(done_c === 1'b1, "done_COMPUTE must hold until readback");
      start_rb = 1;
      @(negedge clk);
      start_rb = 0;
      begin
        int go, wo, io;
        longint t0;
        go = 0; wo = 0; io = 0; t0 = cyc;
        while (!(done_g && done_w && done_i)) begin
          bit full;
          full = (run % 2 == 0);
          read_G   = (go < GW) && (full || $urandom_range(1, 0));
          read_WAS = (wo < PW) && (full || $urandom_range(2, 0) == 0);
          read_IS  = (io < PW) && (full || $urandom_range(2, 0) == 0);
          #1;
          if (read_G)   check(G_out === g_word(gm, go), $sformatf("run %0d G word %0d got %08h expected %08h", run, go, G_out, g_word(gm, go)));
          if (read_WAS) check(was_out === bit_word(was_m, wo), $sformatf("run %0d was word %0d got %08h expected %08h", run, wo, was_out, bit_word(was_m, wo)));
          if (read_IS)  check(is_out === bit_word(is_m, io), $sformatf("run %0d is word %0d got %08h expected %08h", run, io, is_out, bit_word(is_m, io)));
          if (read_G) go++;
          if (read_WAS) wo++;
          if (read_IS) io++;
          @(negedge clk);
          if (cyc - t0 > 20 * GW + 100) break;
        end
        read_G = 0; read_WAS = 0; read_IS = 0;
        check(go == GW && wo == PW && io == PW, $sformatf("run %0d: streams ended early (%0d %0d %0d)", run, go, wo, io));
        if (run % 2 == 0)
          check(cyc - t0 == longint'(((GW > PW) ? GW : PW)),
                $sformatf("run %0d: full-rate readback took %0d cycles for %0d words", run, cyc - t0, GW));
      end
      check(done_g && done_w && done_i, "done flags at end of readback");
      @(negedge clk);                             // DONE lasts one cycle, start is taken in IDLE
    end
    finished = 1;
  end
endmodule
