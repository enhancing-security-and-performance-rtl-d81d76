// g_mem_simple: one 8-bit synchronous memory bank (one byte lane of G_MEM).
//
// A plain single-port array written so that FPGA tools infer block RAM: the write
// happens at the clock edge when we is high, and rdata shows, one cycle after the
// address, the content that location had before any write of that same edge
// (read-first). There is no read enable and no content reset. Four of these banks
// form the 32-bit matrix memory g_mem.
module g_mem_simple #(
  parameter int unsigned DEPTH = 7938,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk_i,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk_i) begin
    if (we && int'(addr) < int'(DEPTH)) mem[addr] <= wdata;
    rdata <= (int'(addr) < int'(DEPTH)) ? mem[addr] : 8'd0;
  end

endmodule
