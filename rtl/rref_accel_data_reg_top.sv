// rref_accel_data_reg_top: the G streaming register of the RREF accelerator.
//
// One external 32-bit register, G, seen at every address of the slave region,
// because the DMA writes (and later reads) the whole matrix at one fixed
// address. A write gives g_q = wdata with a one-cycle g_qe strobe (one G word into
// the core); a read returns g_d in the same cycle and strobes g_re (one word taken
// out of the core). Always ready, never an error. Nothing is stored here.
// Lint note: the port decodes a single register, so the address and byte strobes
// of the request and the reset input are not needed; the linter reports them as
// unused. The reset input is kept so the port matches its sibling register file.
module rref_accel_data_reg_top
  import less_bus_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  reg_req_t    reg_req_i,
  output reg_rsp_t    reg_rsp_o,
  output logic [31:0] g_q,
  output logic        g_qe,
  output logic        g_re,
  input  logic [31:0] g_d
);

  assign g_q  = reg_req_i.wdata;
  assign g_qe = reg_req_i.valid &&  reg_req_i.write;
  assign g_re = reg_req_i.valid && !reg_req_i.write;

  always_comb begin
    reg_rsp_o       = '0;
    reg_rsp_o.ready = 1'b1;
    reg_rsp_o.rdata = g_re ? g_d : '0;
  end

  // Only one transfer per cycle can be strobed.
  a_one_strobe: assert property (@(posedge clk_i) !(g_qe && g_re));

endmodule
