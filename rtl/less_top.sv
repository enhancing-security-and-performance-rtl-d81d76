// less_top: RREF accelerator peripheral (wrapper of the accelerator core).
//
// Connects the accelerator core rref_accel_synth to the host system through
// three interfaces:
//  * reg_req_i / reg_rsp_o: control registers (rref_accel_reg_top): WAS_PIVOT,
//    IS_PIVOT, CTRL, STATUS, PIVOT_REUSE_LIMIT. The processor writes the reuse
//    limit, pulses START, writes the was_pivot words and later pulses
//    START_READBACK and reads the pivot words back.
//  * slave_req_i / slave_rsp_o: an OBI slave through which the DMA streams the
//    matrix G, one 32-bit word (4 elements) per write, and later reads the reduced
//    matrix back, one word per read. The request goes through periph_to_reg to the
//    G data register (rref_accel_data_reg_top); the response valid is delayed by
//    one flip-flop so it lines up with the captured read data.
//  * intr_o: [0] done_COMPUTE, [1] done_G_OUT, [2] done_WAS_OUT, [3] done_IS_OUT,
//    level signals from the core, also readable in STATUS.
// The split into two register files, the OBI path with the delayed rvalid and the
// four interrupts follow the described integration; the bus structures, register
// offsets and interrupt order are this design's choices.
// Timing: register accesses and OBI grants complete in the cycle they are made
// (reg_rsp_o.ready is constant 1, and slave_rsp_o.gnt therefore equals
// slave_req_i.req); OBI read data and rvalid arrive one cycle after the grant.
// Two assertions at the end of the module check this response timing.
module less_top
  import less_bus_pkg::*;
#(
  parameter int unsigned K = 126,
  parameter int unsigned N = 252
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  reg_req_t  reg_req_i,
  output reg_rsp_t  reg_rsp_o,
  input  obi_req_t  slave_req_i,
  output obi_resp_t slave_rsp_o,
  output logic [3:0] intr_o
);

  rref_reg2hw_t reg2hw;
  rref_hw2reg_t hw2reg;

  reg_req_t     periph_req;
  reg_rsp_t     periph_rsp;
  logic         p2r_gnt, p2r_valid, rvalid_q;
  logic [31:0]  p2r_rdata;

  logic [31:0]  g_q, g_d;
  logic         g_qe, g_re;

  logic done_compute, done_g_out, done_was_out, done_is_out, err;
  logic [31:0] was_out, is_out;

  rref_accel_reg_top u_reg_top (
    .clk_i     (clk_i),
    .rst_ni    (rst_ni),
    .reg_req_i (reg_req_i),
    .reg_rsp_o (reg_rsp_o),
    .reg2hw    (reg2hw),
    .hw2reg    (hw2reg)
  );

  periph_to_reg u_periph_to_reg (
    .clk_i        (clk_i),
    .rst_ni       (rst_ni),
    .slave_req_i  (slave_req_i),
    .gnt_o        (p2r_gnt),
    .rdata_o      (p2r_rdata),
    .valid_o      (p2r_valid),
    .periph_req_o (periph_req),
    .periph_rsp_i (periph_rsp)
  );

  // rvalid one cycle after the grant
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) rvalid_q <= 1'b0;
    else         rvalid_q <= p2r_valid;
  end

  assign slave_rsp_o.gnt    = p2r_gnt;
  assign slave_rsp_o.rvalid = rvalid_q;
  assign slave_rsp_o.rdata  = p2r_rdata;

  rref_accel_data_reg_top u_data_reg_top (
    .clk_i     (clk_i),
    .rst_ni    (rst_ni),
    .reg_req_i (periph_req),
    .reg_rsp_o (periph_rsp),
    .g_q       (g_q),
    .g_qe      (g_qe),
    .g_re      (g_re),
    .g_d       (g_d)
  );

  rref_accel_synth #(.K(K), .N(N)) u_rref_accel_synth (
    .clk_i                (clk_i),
    .rst_ni               (rst_ni),
    .start                (reg2hw.start),
    .start_READBACK       (reg2hw.start_readback),
    .valid_in_G           (g_qe),
    .G_in                 (g_q),
    .valid_in_WAS         (reg2hw.was_pivot_qe),
    .was_pivot_column_in  (reg2hw.was_pivot_q),
    .pvt_reuse_limit      (reg2hw.pivot_reuse_limit),
    .read_G               (g_re),
    .read_WAS             (reg2hw.was_pivot_re),
    .read_IS              (reg2hw.is_pivot_re),
    .G_out                (g_d),
    .was_pivot_column_out (was_out),
    .is_pivot_column_out  (is_out),
    .done_COMPUTE         (done_compute),
    .done_G_OUT           (done_g_out),
    .done_WAS_OUT         (done_was_out),
    .done_IS_OUT          (done_is_out),
    .error                (err)
  );

  always_comb begin
    hw2reg.was_pivot_d  = was_out;
    hw2reg.is_pivot_d   = is_out;
    hw2reg.error        = err;
    hw2reg.compute_done = done_compute;
    hw2reg.g_out_done   = done_g_out;
    hw2reg.was_out_done = done_was_out;
    hw2reg.is_out_done  = done_is_out;
  end

  assign intr_o = {done_is_out, done_was_out, done_g_out, done_compute};

  // OBI handshake: each granted request gets exactly one response, in the next cycle.
  a_obi_resp_after_gnt: assert property (@(posedge clk_i)
    slave_rsp_o.gnt |=> slave_rsp_o.rvalid);
  a_obi_no_resp_without_gnt: assert property (@(posedge clk_i)
    !slave_rsp_o.gnt |=> !slave_rsp_o.rvalid);

endmodule
