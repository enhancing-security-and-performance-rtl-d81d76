// periph_to_reg: OBI slave to register-interface bridge.
//
// Passes an OBI request (req, we, be, addr, wdata) to the register side as a
// reg_req_t with valid = req, and grants it in the same cycle when the register
// side is ready. On the granted cycle the register side's read data is captured
// into rdata_o, and valid_o (the "valid before delay") is high for that cycle.
// The wrapper delays valid_o by one flip-flop to form the OBI rvalid, which then
// lines up with rdata_o. Timing: gnt combinational, rdata one cycle later.
// Lint note: the register side's error bit is not forwarded (the OBI response
// used here has no error field), which the linter reports as an unused bit.
module periph_to_reg
  import less_bus_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  obi_req_t    slave_req_i,
  output logic        gnt_o,
  output logic [31:0] rdata_o,
  output logic        valid_o,
  output reg_req_t    periph_req_o,
  input  reg_rsp_t    periph_rsp_i
);

  always_comb begin
    periph_req_o.addr  = slave_req_i.addr;
    periph_req_o.write = slave_req_i.we;
    periph_req_o.wdata = slave_req_i.wdata;
    periph_req_o.wstrb = slave_req_i.be;
    periph_req_o.valid = slave_req_i.req;
  end

  assign gnt_o   = slave_req_i.req && periph_rsp_i.ready;
  assign valid_o = gnt_o;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) rdata_o <= '0;
    else if (gnt_o && !slave_req_i.we) rdata_o <= periph_rsp_i.rdata;
  end

endmodule
