// Instruction encoders for the TinyRV1 testbenches.
//
// Each function returns the 32-bit machine word of one instruction, built
// field by field from the RV32I/RV32M formats (and, for add.mm and lw.ai,
// the custom opcodes this processor uses). They are written from the
// instruction formats, independently of the processor's decoder and
// immediate generator.
package tinyrv1_asm_pkg;

  function automatic logic [31:0] r_type(input logic [6:0] f7, input int rs2, input int rs1,
                                         input logic [2:0] f3, input int rd, input logic [6:0] op);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), op};
  endfunction

  function automatic logic [31:0] i_type(input int imm, input int rs1, input logic [2:0] f3,
                                         input int rd, input logic [6:0] op);
    logic [11:0] i = 12'(imm);
    return {i, 5'(rs1), f3, 5'(rd), op};
  endfunction

  function automatic logic [31:0] s_type(input int imm, input int rs2, input int rs1,
                                         input logic [2:0] f3, input logic [6:0] op);
    logic [11:0] i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), f3, i[4:0], op};
  endfunction

  function automatic logic [31:0] b_type(input int off, input int rs2, input int rs1,
                                         input logic [2:0] f3, input logic [6:0] op);
    logic [12:0] i = 13'(off);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), f3, i[4:1], i[11], op};
  endfunction

  function automatic logic [31:0] j_type(input int off, input int rd, input logic [6:0] op);
    logic [20:0] i = 21'(off);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), op};
  endfunction

  function automatic logic [31:0] asm_add (input int rd, input int rs1, input int rs2);
    return r_type(7'b0000000, rs2, rs1, 3'b000, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] asm_mul (input int rd, input int rs1, input int rs2);
    return r_type(7'b0000001, rs2, rs1, 3'b000, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] asm_addi(input int rd, input int rs1, input int imm);
    return i_type(imm, rs1, 3'b000, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] asm_lw  (input int rd, input int imm, input int rs1);
    return i_type(imm, rs1, 3'b010, rd, 7'b0000011);
  endfunction
  function automatic logic [31:0] asm_sw  (input int rs2, input int imm, input int rs1);
    return s_type(imm, rs2, rs1, 3'b010, 7'b0100011);
  endfunction
  function automatic logic [31:0] asm_jal (input int rd, input int off);
    return j_type(off, rd, 7'b1101111);
  endfunction
  function automatic logic [31:0] asm_jr  (input int rs1);
    return i_type(0, rs1, 3'b000, 0, 7'b1100111);
  endfunction
  function automatic logic [31:0] asm_bne (input int rs1, input int rs2, input int off);
    return b_type(off, rs2, rs1, 3'b001, 7'b1100011);
  endfunction
  function automatic logic [31:0] asm_addmm(input int rd, input int rs1, input int rs2);
    return r_type(7'b0000000, rs2, rs1, 3'b000, rd, 7'b0001011);
  endfunction
  function automatic logic [31:0] asm_lwai(input int rd, input int imm, input int rs1);
    return i_type(imm, rs1, 3'b010, rd, 7'b0101011);
  endfunction

endpackage
