// rref_pivot_regs: the was_pivot / is_pivot vectors of the RREF accelerator.
//
// Two N-bit flip-flop vectors (2*N flip-flops, no RAM). was_pivot holds the pivot
// columns of an earlier reduction: it is loaded 32 bits at a time from the input
// stream (bit 32w+j = bit j of word w) and single bits are cleared when a row swap
// makes a pivot unusable. is_pivot collects the pivot columns found in this run,
// one bit set at a time. Both are cleared on reset and by `clear` (start of a
// run). Reads are combinational: one bit of was_pivot by index, and one 32-bit
// word of each vector for streaming out (bits beyond N read 0). Writes take
// effect at the next clock edge. If clear and another write coincide, clear wins.
module rref_pivot_regs #(
  parameter int unsigned N = 252,
  localparam int unsigned PIVOT_WORDS = (N + 31) / 32,
  localparam int unsigned IW = $clog2(N),
  localparam int unsigned WW = (PIVOT_WORDS > 1) ? $clog2(PIVOT_WORDS) : 1
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          clear,
  input  logic          was_wr_en,
  input  logic [WW-1:0] was_wr_word,
  input  logic [31:0]   was_wr_data,
  input  logic          was_clr_en,
  input  logic [IW-1:0] was_clr_idx,
  input  logic          is_set_en,
  input  logic [IW-1:0] is_set_idx,
  input  logic [IW-1:0] was_rd_idx,
  output logic          was_bit,
  input  logic [WW-1:0] was_rd_word,
  output logic [31:0]   was_word,
  input  logic [WW-1:0] is_rd_word,
  output logic [31:0]   is_word
);

  localparam int unsigned PADDED = 32 * PIVOT_WORDS;

  logic [N-1:0] was_pivot;
  logic [N-1:0] is_pivot;
  logic [PADDED-1:0] was_pad, is_pad;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      was_pivot <= '0;
      is_pivot  <= '0;
    end else if (clear) begin
      was_pivot <= '0;
      is_pivot  <= '0;
    end else begin
      if (was_wr_en) begin
        for (int j = 0; j < 32; j++)
          if (32 * int'(was_wr_word) + j < int'(N))
            was_pivot[32 * int'(was_wr_word) + j] <= was_wr_data[j];
      end
      if (was_clr_en && int'(was_clr_idx) < int'(N)) was_pivot[was_clr_idx] <= 1'b0;
      if (is_set_en && int'(is_set_idx) < int'(N))   is_pivot[is_set_idx]   <= 1'b1;
    end
  end

  assign was_pad  = PADDED'(was_pivot);
  assign is_pad   = PADDED'(is_pivot);
  assign was_bit  = (int'(was_rd_idx) < int'(N)) ? was_pivot[was_rd_idx] : 1'b0;
  assign was_word = (int'(was_rd_word) < int'(PIVOT_WORDS)) ? was_pad[32*was_rd_word +: 32] : 32'd0;
  assign is_word  = (int'(is_rd_word) < int'(PIVOT_WORDS)) ? is_pad[32*is_rd_word +: 32] : 32'd0;

endmodule
