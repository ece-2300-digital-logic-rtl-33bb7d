// TinyRV1 multi-cycle processor: control unit plus datapath.
//
// The control unit drives the datapath's 23 control signals and reads back
// the instruction register and the eq and c_lsb status signals. The memory
// interface is a single request port (val, type, addr, data) with the
// response data expected combinationally in the same cycle. inst_done is
// set in the last cycle of every instruction; it is an observation output
// of this design, not part of the original interface.
module tinyrv1_mc_proc
  import tinyrv1_mc_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  output logic        memreq_val,
  output mtype_t      memreq_type,
  output logic [31:0] memreq_addr,
  output logic [31:0] memreq_data,
  input  logic [31:0] memresp_data,
  output logic        inst_done
);

  ctrl_t       ctrl;
  logic [31:0] ir;
  logic        eq, c_lsb;
  state_t      state;

  tinyrv1_mc_ctrl u_ctrl (
    .clk (clk), .rst (rst), .ir (ir), .eq (eq), .c_lsb (c_lsb),
    .ctrl (ctrl), .state (state), .inst_done (inst_done)
  );

  tinyrv1_mc_dpath #(.RESET_PC(RESET_PC)) u_dpath (
    .clk (clk), .rst (rst), .ctrl (ctrl),
    .ir (ir), .eq (eq), .c_lsb (c_lsb),
    .memreq_addr (memreq_addr), .memreq_data (memreq_data), .memresp_data (memresp_data)
  );

  assign memreq_val  = ctrl.memreq_val;
  assign memreq_type = ctrl.memreq_type;

endmodule
