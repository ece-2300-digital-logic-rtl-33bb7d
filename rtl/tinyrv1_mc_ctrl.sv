// Control unit of the TinyRV1 multi-cycle processor.
//
// A finite state machine: a State register, state transition logic and
// control signal logic. Every instruction starts with the three fetch
// states
//   F0: memreq.addr <- PC; A <- PC      F1: IR <- RD
//   F2: PC <- A + 4; go to the first state of the instruction in IR
// and then walks its own chain of states (one bus transfer each), the last
// of which returns to F0:
//   add    A0-A2    A <- RF[rs1]; B <- RF[rs2]; RF[rd] <- A + B
//   addi   AI0-AI2  A <- RF[rs1]; B <- imm; RF[rd] <- A + B
//   mul    M0-M35   B <- RF[rs1]; C <- RF[rs2]; A <- RF[x0]; then 32 steps
//                   A <- A + (c_lsb ? B : 0), B <- B << 1, C <- C >> 1;
//                   RF[rd] <- A + 0
//   lw     L0-L3    A <- RF[rs1]; B <- imm; RD <- M[A + B]; RF[rd] <- RD
//   sw     S0-S3    A <- RF[rs1]; B <- imm; WD <- RF[rs2]; M[A + B] <- WD
//   jal    JA0-JA2  RF[rd] <- PC; B <- imm; PC <- A + B (A = fetch PC)
//   jr     JR0      PC <- RF[rs1]
//   bne    B0-B5    A <- RF[rs1]; B <- RF[rs2];
//                   compare A, B and A <- PC, to F0 if equal;
//                   A <- A - 4; B <- imm; PC <- A + B
//   add.mm MM0-MM8  M[R[rd]] <- M[R[rs1]] + M[R[rs2]]
//   lw.ai  LA0-LA4  R[rd] <- M[R[rs1] + imm]; R[rs1] <- R[rs1] + 4
// Unknown instructions return to F0 from F2 and do nothing.
//
// Inputs are IR and the two status signals eq and c_lsb; outputs are the
// 23 control signals (ctrl_t), the state and inst_done, which is set in the
// last cycle of an instruction. The state register is reset synchronously
// to F0. Control signals are a function of the state alone, except the
// b_op select in the multiply steps M3-M34, which follows c_lsb.
//
// The state names and counts (3 fetch states, 3/3/36/4/4/3/1/6 per
// instruction, bne leaving after B2 when not taken), the fetch and add
// micro-operations and the fetch rows of the control table follow the
// design. The micro-operations of the other states, the opcodes and the
// extension instructions' states and opcodes are this design's own.
module tinyrv1_mc_ctrl
  import tinyrv1_mc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] ir,
  input  logic        eq,
  input  logic        c_lsb,
  output ctrl_t       ctrl,
  output state_t      state,
  output logic        inst_done
);

  state_t state_next;

  // ---------------------------------------------------------------- decode
  logic [6:0] opcode, funct7;
  logic [2:0] funct3;
  assign opcode = ir[6:0];
  assign funct3 = ir[14:12];
  assign funct7 = ir[31:25];

  state_t dispatch;
  always_comb begin
    dispatch = F0;
    unique case (opcode)
      OP_REG:    if (funct3 == 3'b000 && funct7 == F7_ADD) dispatch = A0;
                 else if (funct3 == 3'b000 && funct7 == F7_MUL) dispatch = M0;
      OP_IMM:    if (funct3 == 3'b000) dispatch = AI0;
      OP_LOAD:   if (funct3 == 3'b010) dispatch = L0;
      OP_STORE:  if (funct3 == 3'b010) dispatch = S0;
      OP_JAL:    dispatch = JA0;
      OP_JALR:   if (funct3 == 3'b000) dispatch = JR0;
      OP_BRANCH: if (funct3 == 3'b001) dispatch = B0;
      OP_ADDMM:  if (funct3 == 3'b000 && funct7 == F7_ADD) dispatch = MM0;
      OP_LWAI:   if (funct3 == 3'b010) dispatch = LA0;
      default:   dispatch = F0;
    endcase
  end

  // ------------------------------------------------ state transition logic
  logic in_mul_loop;
  assign in_mul_loop = (state >= M3) && (state <= M34);

  always_comb begin
    unique case (state)
      F2:                              state_next = dispatch;
      A2, AI2, M35, L3, S3, JA2, JR0,
      B5, MM8, LA4:                    state_next = F0;
      B2:                              state_next = eq ? F0 : B3;
      default:                         state_next = state_t'(state + 7'd1);
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= F0;
    else     state <= state_next;
  end

  assign inst_done = (state != F0) && (state != F1) && (state_next == F0);

  // --------------------------------------------------- control signal logic
  always_comb begin
    ctrl = CTRL_IDLE;
    if (in_mul_loop) begin
      // A <- A + (c_lsb ? B : 0); B <- B << 1; C <- C >> 1
      ctrl.alu_bus_en = 1'b1;
      ctrl.a_en       = 1'b1;
      ctrl.b_en       = 1'b1;  ctrl.b_sel = B_SHL;
      ctrl.c_en       = 1'b1;  ctrl.c_sel = C_SHR;
      ctrl.bop_sel    = c_lsb ? BOP_B : BOP_ZERO;
    end else begin
      unique case (state)
        // fetch
        F0: begin ctrl.pc_bus_en = 1'b1; ctrl.a_en = 1'b1;
                  ctrl.memreq_val = 1'b1; ctrl.memreq_type = MEM_RD; end
        F1: begin ctrl.rd_bus_en = 1'b1; ctrl.ir_en = 1'b1; end
        F2: begin ctrl.alu_bus_en = 1'b1; ctrl.bop_sel = BOP_P4; ctrl.pc_en = 1'b1; end
        // A <- RF[rs1]
        A0, AI0, L0, S0, B0, LA0, MM3:
            begin ctrl.rf_bus_en = 1'b1; ctrl.rf_addr_sel = RF_RS1; ctrl.a_en = 1'b1; end
        // B <- RF[rs2]
        A1, B1:
            begin ctrl.rf_bus_en = 1'b1; ctrl.rf_addr_sel = RF_RS2; ctrl.b_en = 1'b1; end
        // RF[rd] <- A + B
        A2, AI2:
            begin ctrl.alu_bus_en = 1'b1; ctrl.rf_wen = 1'b1; ctrl.rf_addr_sel = RF_RD; end
        // B <- I-type immediate
        AI1, L1, LA1:
            begin ctrl.ig_bus_en = 1'b1; ctrl.imm_type = IMM_I; ctrl.b_en = 1'b1; end
        // mul setup and write-back
        M0: begin ctrl.rf_bus_en = 1'b1; ctrl.rf_addr_sel = RF_RS1; ctrl.b_en = 1'b1; end
        M1: begin ctrl.rf_bus_en = 1'b1; ctrl.rf_addr_sel = RF_RS2; ctrl.c_en = 1'b1; end
        M2: begin ctrl.rf_bus_en = 1'b1; ctrl.rf_addr_sel = RF_X0;  ctrl.a_en = 1'b1; end
        M35: begin ctrl.alu_bus_en = 1'b1; ctrl.bop_sel = BOP_ZERO;
                   ctrl.rf_wen = 1'b1; ctrl.rf_addr_sel = RF_RD; end
        // RD <- M[A + B]
        L2, LA2:
            begin ctrl.alu_bus_en = 1'b1; ctrl.memreq_val = 1'b1; ctrl.memreq_type = MEM_RD; end
        // RF[rd] <- RD
        L3, LA3:
            begin ctrl.rd_bus_en = 1'b1; ctrl.rf_wen = 1'b1; ctrl.rf_addr_sel = RF_RD; end
        // sw
        S1: begin ctrl.ig_bus_en = 1'b1; ctrl.imm_type = IMM_S; ctrl.b_en = 1'b1; end
        S2: begin ctrl.rf_bus_en = 1'b1; ctrl.rf_addr_sel = RF_RS2; ctrl.wd_en = 1'b1; end
        S3: begin ctrl.alu_bus_en = 1'b1; ctrl.memreq_val = 1'b1; ctrl.memreq_type = MEM_WR; end
        // jal
        JA0: begin ctrl.pc_bus_en = 1'b1; ctrl.rf_wen = 1'b1; ctrl.rf_addr_sel = RF_RD; end
        JA1: begin ctrl.ig_bus_en = 1'b1; ctrl.imm_type = IMM_J; ctrl.b_en = 1'b1; end
        JA2, B5:
             begin ctrl.alu_bus_en = 1'b1; ctrl.pc_en = 1'b1; end
        // jr
        JR0: begin ctrl.rf_bus_en = 1'b1; ctrl.rf_addr_sel = RF_RS1; ctrl.pc_en = 1'b1; end
        // bne: compare while A <- PC, then A <- A - 4, B <- imm
        B2: begin ctrl.alu_func = ALU_CMP; ctrl.pc_bus_en = 1'b1; ctrl.a_en = 1'b1; end
        B3: begin ctrl.alu_bus_en = 1'b1; ctrl.bop_sel = BOP_M4; ctrl.a_en = 1'b1; end
        B4: begin ctrl.ig_bus_en = 1'b1; ctrl.imm_type = IMM_B; ctrl.b_en = 1'b1; end
        // add.mm
        MM0: begin ctrl.rf_bus_en = 1'b1; ctrl.rf_addr_sel = RF_RS2; ctrl.a_en = 1'b1; end
        MM1, MM4:
             begin ctrl.alu_bus_en = 1'b1; ctrl.bop_sel = BOP_ZERO;
                   ctrl.memreq_val = 1'b1; ctrl.memreq_type = MEM_RD; end
        MM2: begin ctrl.rd_bus_en = 1'b1; ctrl.b_en = 1'b1; end
        MM5: begin ctrl.rd_bus_en = 1'b1; ctrl.a_en = 1'b1; end
        MM6: begin ctrl.alu_bus_en = 1'b1; ctrl.wd_en = 1'b1; end
        MM7: begin ctrl.rf_bus_en = 1'b1; ctrl.rf_addr_sel = RF_RD; ctrl.a_en = 1'b1; end
        MM8: begin ctrl.alu_bus_en = 1'b1; ctrl.bop_sel = BOP_ZERO;
                   ctrl.memreq_val = 1'b1; ctrl.memreq_type = MEM_WR; end
        // lw.ai: RF[rs1] <- A + 4
        LA4: begin ctrl.alu_bus_en = 1'b1; ctrl.bop_sel = BOP_P4;
                   ctrl.rf_wen = 1'b1; ctrl.rf_addr_sel = RF_RS1; end
        default: ctrl = CTRL_IDLE;
      endcase
    end
  end

endmodule
