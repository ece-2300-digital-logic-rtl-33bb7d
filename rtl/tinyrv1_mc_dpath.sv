// Datapath of the TinyRV1 multi-cycle processor.
//
// Every value moves over one shared bus, one transfer per cycle. Bus
// sources: PC, the immediate generator, the ALU, the register file and the
// RD register. Bus sinks: PC, IR, A, B, C, WD, the register file and the
// memory request address. Around the bus:
//   - A is the ALU's left operand; the b_op mux gives the right one (B, 4,
//     0 or -4). The ALU adds or compares; its eq output is a status signal.
//   - B loads from the bus or from B << 1; C loads from the bus or from
//     C >> 1, and C's least significant bit (c_lsb) is a status signal.
//     With the ALU these make a shift-and-add multiplier.
//   - The single-port register file is addressed by a mux choosing x0,
//     rs1, rs2 or rd from IR.
//   - RD captures the memory response in every cycle with a memory request;
//     WD holds store data and drives memreq_data.
// The control unit drives the 23 signals of ctrl and sees IR, eq and c_lsb.
// All registers change at the rising clock edge; the bus, ALU, immediate
// generator and register-file read are combinational within the cycle.
//
// The registers, muxes, shifters and bus enables follow the design. The
// select codes, the reset of the registers to 0 (PC to RESET_PC) and RD
// loading whenever memreq_val is set are this design's choices.
module tinyrv1_mc_dpath
  import tinyrv1_mc_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  ctrl_t       ctrl,
  // to the control unit
  output logic [31:0] ir,
  output logic        eq,
  output logic        c_lsb,
  // memory interface
  output logic [31:0] memreq_addr,
  output logic [31:0] memreq_data,
  input  logic [31:0] memresp_data
);

  logic [31:0] pc, a, b, c, wd, rd;
  logic [31:0] bus;
  logic [31:0] imm, alu_out, rf_rdata, bop;
  logic [4:0]  rf_addr;

  // Bus
  tinyrv1_bus #(.XLEN(32), .NSRC(5)) u_bus (
    .en  ({ctrl.rd_bus_en, ctrl.rf_bus_en, ctrl.alu_bus_en, ctrl.ig_bus_en, ctrl.pc_bus_en}),
    .src ({rd, rf_rdata, alu_out, imm, pc}),
    .bus (bus)
  );

  // b_op mux and ALU
  always_comb begin
    unique case (ctrl.bop_sel)
      BOP_B:    bop = b;
      BOP_P4:   bop = 32'd4;
      BOP_ZERO: bop = 32'd0;
      BOP_M4:   bop = -32'sd4;
      default:  bop = b;
    endcase
  end

  tinyrv1_alu #(.XLEN(32)) u_alu (
    .in0 (a), .in1 (bop), .func (ctrl.alu_func), .out (alu_out), .eq (eq)
  );

  // Immediate generator
  tinyrv1_imm_gen u_imm (.inst (ir), .imm_type (ctrl.imm_type), .imm (imm));

  // Register file with its address mux
  always_comb begin
    unique case (ctrl.rf_addr_sel)
      RF_X0:   rf_addr = 5'd0;
      RF_RS1:  rf_addr = rs1_of(ir);
      RF_RS2:  rf_addr = rs2_of(ir);
      RF_RD:   rf_addr = rd_of(ir);
      default: rf_addr = 5'd0;
    endcase
  end

  tinyrv1_regfile #(.XLEN(32), .NREGS(32)) u_rf (
    .clk (clk), .addr (rf_addr), .wen (ctrl.rf_wen), .wdata (bus), .rdata (rf_rdata)
  );

  // Registers
  always_ff @(posedge clk) begin
    if (rst) begin
      pc <= RESET_PC;
      ir <= '0;
      a  <= '0;
      b  <= '0;
      c  <= '0;
      wd <= '0;
      rd <= '0;
    end else begin
      if (ctrl.pc_en) pc <= bus;
      if (ctrl.ir_en) ir <= bus;
      if (ctrl.a_en)  a  <= bus;
      if (ctrl.b_en)  b  <= (ctrl.b_sel == B_SHL) ? (b << 1) : bus;
      if (ctrl.c_en)  c  <= (ctrl.c_sel == C_SHR) ? (c >> 1) : bus;
      if (ctrl.wd_en) wd <= bus;
      if (ctrl.memreq_val) rd <= memresp_data;
    end
  end

  assign c_lsb       = c[0];
  assign memreq_addr = bus;
  assign memreq_data = wd;

  // Only one source may drive the bus in a cycle.
  a_bus_onehot: assert property (@(posedge clk) disable iff (rst)
    $onehot0({ctrl.rd_bus_en, ctrl.rf_bus_en, ctrl.alu_bus_en, ctrl.ig_bus_en, ctrl.pc_bus_en}));

endmodule
