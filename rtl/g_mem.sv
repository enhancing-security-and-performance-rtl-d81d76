// g_mem: generator-matrix memory (G_MEM) with a byte-addressed 32-bit port.
//
// The K x N matrix is held row-major, one GF(127) element per byte, at byte address
// r*N + c. Storage is four 8-bit banks (g_mem_simple); bank b holds the bytes whose
// address is b mod 4, at word index address/4. An access at byte address A covers
// bytes A..A+3. With o = A[1:0] and idx = A >> 2, bank b is addressed at idx+1 when
// b < o and at idx otherwise, so the four bytes are fetched or written in the same
// cycle even when the access crosses a word boundary.
//
// Write routing: byte j of g_data_in, enabled by g_wstrb[j], goes to bank
// (o + j) mod 4. Bytes whose address is at or beyond G_ELEMS are dropped.
// Read alignment: o is registered with the access, and on the next cycle the bank
// outputs are rotated so that byte j of g_data_out is the byte at address A+j
// (bytes beyond G_ELEMS read as 0).
// Timing: read latency 1 cycle, one read and/or one write per cycle, no stalls.
// The banked structure and unaligned support follow the described memory; the
// exact masking beyond the last element is this design's choice.
module g_mem #(
  parameter int unsigned K = 126,
  parameter int unsigned N = 252,
  localparam int unsigned G_ELEMS = K * N,
  localparam int unsigned G_WORDS = (G_ELEMS + 3) / 4,
  localparam int unsigned AW      = $clog2(G_ELEMS + 4),
  localparam int unsigned WAW     = (G_WORDS > 1) ? $clog2(G_WORDS) : 1
) (
  input  logic          clk_i,
  input  logic          g_we,
  input  logic [3:0]    g_wstrb,
  input  logic [AW-1:0] g_addr,
  input  logic [31:0]   g_data_in,
  output logic [31:0]   g_data_out
);

  logic [AW-1:0]  idx;
  logic [1:0]     off;
  logic [1:0]     off_q;      // addr_lo_r
  logic [3:0]     valid_q;    // byte j of the read lies inside the matrix
  logic [WAW-1:0] bank_addr [4];
  logic [3:0]     bank_we;
  logic [7:0]     bank_wdata [4];
  logic [7:0]     bank_rdata [4];

  assign idx = g_addr >> 2;
  assign off = g_addr[1:0];

  always_comb begin
    for (int b = 0; b < 4; b++) begin
      automatic int unsigned j = (b - int'(off)) & 3;   // input byte that lands in bank b
      automatic logic [AW:0] byte_addr = {1'b0, g_addr} + (AW+1)'(j);
      bank_addr[b]  = WAW'((b < int'(off)) ? idx + 1'b1 : idx);
      bank_wdata[b] = g_data_in[8*j +: 8];
      bank_we[b]    = g_we && g_wstrb[j] && (byte_addr < (AW+1)'(G_ELEMS));
    end
  end

  for (genvar b = 0; b < 4; b++) begin : g_bank
    g_mem_simple #(.DEPTH(G_WORDS)) u_bank (
      .clk_i (clk_i),
      .we    (bank_we[b]),
      .addr  (bank_addr[b]),
      .wdata (bank_wdata[b]),
      .rdata (bank_rdata[b])
    );
  end

  always_ff @(posedge clk_i) begin
    off_q <= off;
    for (int j = 0; j < 4; j++)
      valid_q[j] <= ({1'b0, g_addr} + (AW+1)'(j)) < (AW+1)'(G_ELEMS);
  end

  // Address alignment and rotation network.
  always_comb begin
    for (int j = 0; j < 4; j++)
      g_data_out[8*j +: 8] = valid_q[j] ? bank_rdata[(j + int'(off_q)) & 3] : 8'd0;
  end

endmodule
