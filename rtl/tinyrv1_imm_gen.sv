// Immediate generator.
//
// Takes the instruction held in IR and produces the sign-extended 32-bit
// immediate in the format chosen by imm_type: I (addi, lw, lw.ai),
// S (sw), J (jal) or B (bne). The J and B immediates keep their implied
// zero in bit 0. Purely combinational; its output reaches the datapath bus
// through the ig bus enable.
//
// The existence of the unit and its imm_type select follow the design; the
// bit layout of each format is the standard RV32I one.
module tinyrv1_imm_gen
  import tinyrv1_mc_pkg::*;
(
  input  logic [31:0] inst,
  input  imm_t        imm_type,
  output logic [31:0] imm
);

  always_comb begin
    unique case (imm_type)
      IMM_I: imm = {{20{inst[31]}}, inst[31:20]};
      IMM_S: imm = {{20{inst[31]}}, inst[31:25], inst[11:7]};
      IMM_J: imm = {{12{inst[31]}}, inst[19:12], inst[20], inst[30:21], 1'b0};
      IMM_B: imm = {{20{inst[31]}}, inst[7], inst[30:25], inst[11:8], 1'b0};
      default: imm = '0;
    endcase
  end

endmodule
