// ALU of the multi-cycle datapath.
//
// The left operand is register A, the right operand the output of the b_op
// mux (B, 4, 0 or -4). Function ALU_ADD outputs in0 + in1; ALU_CMP outputs
// 1 when the operands are equal and 0 otherwise. The eq status output
// (in0 == in1) goes to the control unit in every cycle, whatever the
// function. Purely combinational.
//
// The add function and the eq status follow the design; that alu_func is a
// single bit choosing between add and compare is this design's choice.
module tinyrv1_alu
  import tinyrv1_mc_pkg::*;
#(
  parameter int unsigned XLEN = 32
) (
  input  logic [XLEN-1:0] in0,
  input  logic [XLEN-1:0] in1,
  input  alu_t            func,
  output logic [XLEN-1:0] out,
  output logic            eq
);

  always_comb begin
    eq = (in0 == in1);
    unique case (func)
      ALU_ADD: out = in0 + in1;
      ALU_CMP: out = {{(XLEN-1){1'b0}}, eq};
      default: out = '0;
    endcase
  end

endmodule
