// rref_accel_reg_top: control and status register file of the RREF accelerator.
//
// A 32-bit register interface (reg_req_t / reg_rsp_t, always ready, answer in
// the same cycle) with five registers:
//   0x00 WAS_PIVOT          rw, external: a write passes 32 was_pivot bits to the
//                           core (was_pivot_qe strobe); a read returns the core's
//                           current output word and strobes was_pivot_re
//   0x04 IS_PIVOT           ro, external: read returns the core's is_pivot word and
//                           strobes is_pivot_re
//   0x08 CTRL               wo: bit 0 START, bit 1 START_READBACK; writing a 1 gives
//                           a one-cycle pulse to the core, nothing is stored
//   0x0C STATUS             ro: bit 0 ERROR, 1 COMPUTE_DONE, 2 G_OUT_DONE,
//                           3 WAS_OUT_DONE, 4 IS_OUT_DONE, straight from the core
//   0x10 PIVOT_REUSE_LIMIT  rw: stored, read back, latched by the core at START
// Any other offset answers error = 1. The register set and field layout follow the
// described register map; offsets, pulse behaviour and the error answer are this
// design's choices (the original is produced by a register generator).
// Lint note: the byte strobes of the request are not used (all registers take
// full 32-bit writes), which the linter reports as unused bits of reg_req_i.
module rref_accel_reg_top
  import less_bus_pkg::*;
(
  input  logic         clk_i,
  input  logic         rst_ni,
  input  reg_req_t     reg_req_i,
  output reg_rsp_t     reg_rsp_o,
  output rref_reg2hw_t reg2hw,
  input  rref_hw2reg_t hw2reg
);

  logic [7:0]  offset;
  logic        wr, rd;
  logic [31:0] limit_q;

  assign offset = reg_req_i.addr[7:0];
  assign wr     = reg_req_i.valid &&  reg_req_i.write;
  assign rd     = reg_req_i.valid && !reg_req_i.write;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) limit_q <= '0;
    else if (wr && offset == PIVOT_REUSE_LIMIT_OFFSET) limit_q <= reg_req_i.wdata;
  end

  always_comb begin
    reg2hw                   = '0;
    reg2hw.was_pivot_q       = reg_req_i.wdata;
    reg2hw.was_pivot_qe      = wr && offset == WAS_PIVOT_OFFSET;
    reg2hw.was_pivot_re      = rd && offset == WAS_PIVOT_OFFSET;
    reg2hw.is_pivot_re       = rd && offset == IS_PIVOT_OFFSET;
    reg2hw.start             = wr && offset == CTRL_OFFSET && reg_req_i.wdata[0];
    reg2hw.start_readback    = wr && offset == CTRL_OFFSET && reg_req_i.wdata[1];
    reg2hw.pivot_reuse_limit = limit_q;
  end

  always_comb begin
    reg_rsp_o       = '0;
    reg_rsp_o.ready = 1'b1;
    unique case (offset)
      WAS_PIVOT_OFFSET:         reg_rsp_o.rdata = hw2reg.was_pivot_d;
      IS_PIVOT_OFFSET:          reg_rsp_o.rdata = hw2reg.is_pivot_d;
      CTRL_OFFSET:              reg_rsp_o.rdata = '0;
      STATUS_OFFSET:            reg_rsp_o.rdata = {27'd0, hw2reg.is_out_done, hw2reg.was_out_done,
                                                   hw2reg.g_out_done, hw2reg.compute_done, hw2reg.error};
      PIVOT_REUSE_LIMIT_OFFSET: reg_rsp_o.rdata = limit_q;
      default:                  reg_rsp_o.error = reg_req_i.valid;
    endcase
    if (!rd) reg_rsp_o.rdata = '0;
  end

endmodule
