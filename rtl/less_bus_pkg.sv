// less_bus_pkg: bus and register-file structures used by the peripheral wrapper.
//
// obi_req_t/obi_resp_t model the OBI slave port through which the system DMA
// streams the generator matrix, reg_req_t/reg_rsp_t the simple register interface
// of the peripheral bus. Field names follow the usual conventions of these buses;
// the layout is this design's choice. rref_reg2hw_t/rref_hw2reg_t carry the
// register values and access strobes between the control register file and the
// accelerator core.
package less_bus_pkg;

  typedef struct packed {
    logic        req;
    logic        we;
    logic [3:0]  be;
    logic [31:0] addr;
    logic [31:0] wdata;
  } obi_req_t;

  typedef struct packed {
    logic        gnt;
    logic        rvalid;
    logic [31:0] rdata;
  } obi_resp_t;

  typedef struct packed {
    logic [31:0] addr;
    logic        write;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        valid;
  } reg_req_t;

  typedef struct packed {
    logic [31:0] rdata;
    logic        error;
    logic        ready;
  } reg_rsp_t;

  // Register offsets of the control register file.
  localparam logic [7:0] WAS_PIVOT_OFFSET         = 8'h00;
  localparam logic [7:0] IS_PIVOT_OFFSET          = 8'h04;
  localparam logic [7:0] CTRL_OFFSET              = 8'h08;
  localparam logic [7:0] STATUS_OFFSET            = 8'h0C;
  localparam logic [7:0] PIVOT_REUSE_LIMIT_OFFSET = 8'h10;

  typedef struct packed {
    logic [31:0] was_pivot_q;       // written word
    logic        was_pivot_qe;      // software wrote WAS_PIVOT
    logic        was_pivot_re;      // software read WAS_PIVOT
    logic        is_pivot_re;       // software read IS_PIVOT
    logic        start;             // CTRL.START written as 1 (pulse)
    logic        start_readback;    // CTRL.START_READBACK written as 1 (pulse)
    logic [31:0] pivot_reuse_limit; // PIVOT_REUSE_LIMIT value
  } rref_reg2hw_t;

  typedef struct packed {
    logic [31:0] was_pivot_d;
    logic [31:0] is_pivot_d;
    logic        error;
    logic        compute_done;
    logic        g_out_done;
    logic        was_out_done;
    logic        is_out_done;
  } rref_hw2reg_t;

endpackage
