// less_top_driver: plays the host processor and the DMA engine around less_top.
//
// The driver owns the reset and both bus ports of the accelerator. For each of
// RUNS operations it builds an input matrix (LESS-like monomial-transformed
// systematic matrix, random matrix, zero leading columns, or zero last row), runs
// the reference model, and then talks to the design only through its buses:
//   register port (CPU): write PIVOT_REUSE_LIMIT, write CTRL.START, write the
//     was_pivot words to WAS_PIVOT, poll STATUS, write CTRL.START_READBACK, read
//     WAS_PIVOT and IS_PIVOT words, probe an undefined offset (must answer error);
//   OBI data port (DMA): stream the G words in and out of the G register, either
//     back to back (request held high, one word per cycle) or with random gaps.
// The CPU and DMA threads run in parallel, as on the real system. Checks: every
// output word, the ERROR status bit, the exact compute time (edge accepting the
// last input to first cycle of intr_o[0] = model cycles + 1), the readback rate
// of a back-to-back DMA stream (one word per cycle, rvalid one cycle after gnt),
// the interrupt lines and the STATUS done bits. Mechanism counters are exported
// so the testbench can require each one to have happened. With REPORT set, each
// run's compute time (last input to COMPUTE_DONE) is printed.
module less_top_driver
  import less_bus_pkg::*;
  import rref_ref_pkg::*;
#(
  parameter int K    = 6,
  parameter int N    = 13,
  parameter int RUNS = 10,
  parameter int KIND_MASK = 31,    // bit k enables input kind k
  parameter bit REPORT    = 0      // print each run's compute time
) (
  input  logic      clk,
  output logic      rst_n,
  output reg_req_t  reg_req,
  input  reg_rsp_t  reg_rsp,
  output obi_req_t  obi_req,
  input  obi_resp_t obi_rsp,
  input  logic [3:0] intr,
  output int        checks,
  output int        failures,
  output bit        finished,
  output stats_t    stats,
  output int        b2b_dma_words,   // DMA words moved in back-to-back bursts
  output int        gap_dma_words,   // DMA words moved with idle cycles between them
  output int        reg_errors,      // error answers to undefined offsets
  output int        intr_seen        // bit mask of interrupt lines seen high
);
  localparam int E  = K * N;
  localparam int GW = (E + 3) / 4;
  localparam int PW = (N + 31) / 32;

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int run_intr;                    // interrupt lines seen high in the current readback
  always @(posedge clk) begin
    intr_seen <= intr_seen | int'(intr);
    run_intr  <= run_intr | int'(intr);
  end

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

  // ---------------------------------------------------------------- register port
  // Single-cycle access, driven after a falling edge, answered in the same cycle.
  task automatic reg_access(input logic [7:0] off, input bit wr, input logic [31:0] wdata,
                            output logic [31:0] rdata, output bit err);
    reg_req.addr  = {24'h0, off};
    reg_req.write = wr;
    reg_req.wdata = wdata;
    reg_req.wstrb = 4'hF;
    reg_req.valid = 1'b1;
    #1;
    rdata = reg_rsp.rdata;
    err   = reg_rsp.error;
    @(negedge clk);
    reg_req.valid = 1'b0;
  endtask

  task automatic reg_write(input logic [7:0] off, input logic [31:0] wdata);
    logic [31:0] d;
    bit e;
    reg_access(off, 1'b1, wdata, d, e);
  endtask

  // ---------------------------------------------------------------- DMA (OBI) port
  // Writes: request held until granted (granted in the same cycle here).
  task automatic dma_write_words(ref logic [31:0] words[], input bit b2b, output longint t_last);
    foreach (words[i]) begin
      if (!b2b) repeat ($urandom_range(3, 1)) @(negedge clk);
      obi_req.req = 1'b1; obi_req.we = 1'b1; obi_req.be = 4'hF;
      obi_req.addr = 32'h0; obi_req.wdata = words[i];
      #1;
      while (!obi_rsp.gnt) begin @(negedge clk); #1; end
      @(negedge clk);
      t_last = cyc;
      obi_req.req = 1'b0;
      if (b2b) b2b_dma_words++; else gap_dma_words++;
    end
  endtask

  // Reads: requests may be pipelined; each response arrives with rvalid one cycle
  // after its grant.
  task automatic dma_read_words(input int n, input bit b2b, ref logic [31:0] words[],
                                output longint cycles);
    int issued, got;
    longint t0;
    issued = 0; got = 0;
    words = new[n];
    t0 = cyc;
    while (got < n) begin
      bit want;
      want = (issued < n) && (b2b || $urandom_range(1, 0));
      obi_req.req = want; obi_req.we = 1'b0; obi_req.be = 4'hF; obi_req.addr = 32'h0;
      #1;
      if (want && obi_rsp.gnt) issued++;
      @(negedge clk);
      if (obi_rsp.rvalid) begin words[got] = obi_rsp.rdata; got++; end
      if (cyc - t0 > 64 * n + 100) break;
    end
    obi_req.req = 1'b0;
    cycles = cyc - t0;
    if (b2b) b2b_dma_words += n; else gap_dma_words += n;
  endtask

  // ---------------------------------------------------------------- test sequence
  initial begin
    byte unsigned g[], gm[];
    bit was_b[], was_m[], is_m[];
    logic [31:0] gwords[], was_words[], rd_words[];
    checks = 0; failures = 0; finished = 0; stats = '{default: 0};
    b2b_dma_words = 0; gap_dma_words = 0; reg_errors = 0; intr_seen = 0;
    reg_req = '0; obi_req = '0; rst_n = 0;
    g = new[E]; gm = new[E]; was_b = new[N]; was_m = new[N]; is_m = new[N];
    gwords = new[GW]; was_words = new[PW];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int run = 0; run < RUNS; run++) begin
      int kind, ok;
      longint exp_cycles, t_g, t_w, t_last, t_done, rd_cycles;
      logic [31:0] lim, d;
      bit e, b2b;
      // ---------------- input
      kind = run % 5;
      while (!KIND_MASK[kind]) kind = (kind + 1) % 5;
      if (kind == 0 || kind == 3) make_monomial(K, N, g, was_b);
      else begin
        foreach (g[i]) g[i] = byte'($urandom_range(126, 0));
        foreach (was_b[i]) was_b[i] = ($urandom_range(2, 0) == 0);
      end
      if (kind == 2) for (int r = 0; r < K; r++) g[r * N] = 0;
      if (kind == 4) for (int c = 0; c < N; c++) g[(K - 1) * N + c] = 0;
      if (kind == 3) for (int i = 0; i < E; i++) if ($urandom_range(9, 0) == 0) g[i] = 0;
      case ($urandom_range(3, 0))
        0: lim = 0;
        1: lim = 1;
        2: lim = K;
        default: lim = 32'hFFFF_FFFF;
      endcase
      if (kind == 0) lim = 32'hFFFF_FFFF;
      gm = g; was_m = was_b;
      ok = rref_model(K, N, gm, is_m, was_m, longint'(lim), exp_cycles, stats);
      for (int w = 0; w < GW; w++) gwords[w] = g_word(g, w);
      for (int w = 0; w < PW; w++) was_words[w] = bit_word(was_b, w);
      b2b = (run % 2 == 0);
      // ---------------- configure and start
      reg_write(PIVOT_REUSE_LIMIT_OFFSET, lim);
      reg_access(PIVOT_REUSE_LIMIT_OFFSET, 1'b0, 0, d, e);
      check(d === lim, "limit register reads back");
      reg_access(8'h20, 1'b0, 0, d, e);
      check(e === 1'b1, "undefined offset answers error");
      if (e) reg_errors++;
      reg_write(CTRL_OFFSET, 32'h1);
      // ---------------- CPU writes was_pivot while the DMA streams G
      t_g = 0; t_w = 0;
      fork
        dma_write_words(gwords, b2b, t_g);
        begin
          repeat ($urandom_range(4, 0)) @(negedge clk);
          foreach (was_words[i]) begin
            reg_write(WAS_PIVOT_OFFSET, was_words[i]);
            t_w = cyc;
          end
        end
      join
      t_last = (t_g > t_w) ? t_g : t_w;
      // ---------------- wait for the compute-done interrupt
      t_done = -1;
      for (longint w = 0; w < 8 * exp_cycles + 1000; w++) begin
        if (intr[0]) begin t_done = cyc; break; end
        @(negedge clk);
      end
      check(t_done >= 0, $sformatf("run %0d: compute-done interrupt never rose", run));
      check(t_done - t_last == exp_cycles + 1,
            $sformatf("run %0d kind %0d: compute took %0d cycles, expected %0d", run, kind,
                      t_done - t_last, exp_cycles + 1));
      if (REPORT) $display("%0d x %0d run %0d (kind %0d, limit %0d): compute %0d cycles",
                           K, N, run, kind, lim, t_done - t_last);
      reg_access(STATUS_OFFSET, 1'b0, 0, d, e);
      check(d[1] === 1'b1, "STATUS.COMPUTE_DONE");
      check(d[0] === !ok, $sformatf("run %0d: STATUS.ERROR=%0b expected %0b", run, d[0], !ok));
      // ---------------- readback: CPU reads pivot vectors, DMA reads G
      reg_write(CTRL_OFFSET, 32'h2);
      run_intr = 0;
      fork
        begin
          dma_read_words(GW, b2b, rd_words, rd_cycles);
          foreach (rd_words[w])
            check(rd_words[w] === g_word(gm, w), $sformatf("run %0d G word %0d got %08h expected %08h",
                                                           run, w, rd_words[w], g_word(gm, w)));
          if (b2b) check(rd_cycles == GW,
                         $sformatf("run %0d: back-to-back read of %0d words took %0d cycles", run, GW, rd_cycles));
        end
        begin
          for (int w = 0; w < PW; w++) begin
            reg_access(WAS_PIVOT_OFFSET, 1'b0, 0, d, e);
            check(d === bit_word(was_m, w), $sformatf("run %0d was word %0d got %08h expected %08h", run, w, d, bit_word(was_m, w)));
            reg_access(IS_PIVOT_OFFSET, 1'b0, 0, d, e);
            check(d === bit_word(is_m, w), $sformatf("run %0d is word %0d got %08h expected %08h", run, w, d, bit_word(is_m, w)));
          end
        end
      join
      repeat (3) @(negedge clk);                   // DONE, back to IDLE
      check(run_intr[3:1] == 3'b111, $sformatf("run %0d: output-done interrupts seen %b", run, run_intr[3:0]));
      reg_access(STATUS_OFFSET, 1'b0, 0, d, e);
      check(d[4:1] == 4'b0000 && intr == 4'b0000, "status and interrupts clear once idle");
    end
    finished = 1;
  end
endmodule
