// Shared types and constants of the TinyRV1 multi-cycle processor.
//
// The processor executes each instruction as a sequence of single-cycle
// steps over one shared datapath bus. This package holds what the control
// unit and the datapath agree on: the 23-bit control word (bus enables,
// register enables, mux selects, function selects, register-file and
// memory-request controls), the encodings of each select, the FSM state
// names and the instruction opcodes.
//
// The grouping and names of the control signals follow the control table
// of the design (bus enables pc/ig/alu/rf/rd, register enables
// pc/ir/a/b/c/wd, muxes b/c/bop, functions ig/alu, rf sel/wen, memreq
// val/type). The binary codes of every select, the opcodes (RV32I/RV32M,
// with jr taken as jalr rd=x0) and the opcodes of the two extension
// instructions add.mm and lw.ai are this design's own choices.
package tinyrv1_mc_pkg;


  // b mux: B loads from the bus or from B shifted left by one
  typedef enum logic { B_BUS = 1'b0, B_SHL = 1'b1 } bsel_t;
  // c mux: C loads from the bus or from C shifted right by one
  typedef enum logic { C_BUS = 1'b0, C_SHR = 1'b1 } csel_t;
  // b_op mux in front of the ALU's right input
  typedef enum logic [1:0] { BOP_B = 2'd0, BOP_P4 = 2'd1, BOP_ZERO = 2'd2, BOP_M4 = 2'd3 } bop_t;
  // immediate formats
  typedef enum logic [1:0] { IMM_I = 2'd0, IMM_S = 2'd1, IMM_J = 2'd2, IMM_B = 2'd3 } imm_t;
  // ALU functions
  typedef enum logic { ALU_ADD = 1'b0, ALU_CMP = 1'b1 } alu_t;
  // register file address mux
  typedef enum logic [1:0] { RF_X0 = 2'd0, RF_RS1 = 2'd1, RF_RS2 = 2'd2, RF_RD = 2'd3 } rfsel_t;
  // memory request type
  typedef enum logic { MEM_RD = 1'b0, MEM_WR = 1'b1 } mtype_t;

  // The 23 control signals, in the column order of the control table.
  typedef struct packed {
    // bus enables
    logic   pc_bus_en;
    logic   ig_bus_en;
    logic   alu_bus_en;
    logic   rf_bus_en;
    logic   rd_bus_en;
    // register enables
    logic   pc_en;
    logic   ir_en;
    logic   a_en;
    logic   b_en;
    logic   c_en;
    logic   wd_en;
    // muxes
    bsel_t  b_sel;
    csel_t  c_sel;
    bop_t   bop_sel;
    // functions
    imm_t   imm_type;
    alu_t   alu_func;
    // register file
    rfsel_t rf_addr_sel;
    logic   rf_wen;
    // memory request
    logic   memreq_val;
    mtype_t memreq_type;
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '0;

  // FSM states. M[36] expands to M0..M35.
  typedef enum logic [6:0] {
    F0, F1, F2,
    A0, A1, A2,
    AI0, AI1, AI2,
    M[36],
    L0, L1, L2, L3,
    S0, S1, S2, S3,
    JA0, JA1, JA2,
    JR0,
    B0, B1, B2, B3, B4, B5,
    MM0, MM1, MM2, MM3, MM4, MM5, MM6, MM7, MM8,
    LA0, LA1, LA2, LA3, LA4
  } state_t;


  // Opcodes (instruction bits [6:0])
  localparam logic [6:0] OP_REG    = 7'b0110011; // add, mul
  localparam logic [6:0] OP_IMM    = 7'b0010011; // addi
  localparam logic [6:0] OP_LOAD   = 7'b0000011; // lw
  localparam logic [6:0] OP_STORE  = 7'b0100011; // sw
  localparam logic [6:0] OP_JAL    = 7'b1101111; // jal
  localparam logic [6:0] OP_JALR   = 7'b1100111; // jr
  localparam logic [6:0] OP_BRANCH = 7'b1100011; // bne
  localparam logic [6:0] OP_ADDMM  = 7'b0001011; // add.mm (extension)
  localparam logic [6:0] OP_LWAI   = 7'b0101011; // lw.ai  (extension)

  localparam logic [6:0] F7_ADD = 7'b0000000;
  localparam logic [6:0] F7_MUL = 7'b0000001;

  // Instruction field helpers
  function automatic logic [4:0] rs1_of(input logic [31:0] i); return i[19:15]; endfunction
  function automatic logic [4:0] rs2_of(input logic [31:0] i); return i[24:20]; endfunction
  function automatic logic [4:0] rd_of (input logic [31:0] i); return i[11:7];  endfunction

endpackage
