// Self-checking testbench of the datapath.
//
// The testbench plays the control unit: it applies one control word per
// cycle and checks the bus (visible as memreq_addr), IR, the status
// signals and the store data. A small array in the testbench acts as the
// combinational memory. Covered: fetch (F0-F2), immediate generation onto
// the bus, register-file write and read through the x0/rs1/rs2/rd address
// mux, ALU add with each b_op input (B, 4, 0, -4), compare and eq, the
// B << 1 and C >> 1 shift paths with c_lsb, WD and RD.
module tinyrv1_mc_dpath_tb;
  import tinyrv1_mc_pkg::*;
  import tinyrv1_asm_pkg::*;

  logic        clk = 0, rst;
  ctrl_t       ctrl;
  logic [31:0] ir, memreq_addr, memreq_data, memresp_data;
  logic        eq, c_lsb;
  logic [31:0] mem [16];
  int checks = 0, failures = 0;

  tinyrv1_mc_dpath #(.RESET_PC(32'h0)) dut (
    .clk, .rst, .ctrl, .ir, .eq, .c_lsb, .memreq_addr, .memreq_data, .memresp_data);

  assign memresp_data = mem[memreq_addr[5:2]];

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ctrl_t cw();
    return CTRL_IDLE;
  endfunction

  // Apply a control word for one cycle; optionally check the bus value.
  task automatic step(input ctrl_t c, input bit chk, input logic [31:0] exp_bus, input string what);
    ctrl = c;
    #1;
    if (chk) begin
      checks++;
      if (memreq_addr !== exp_bus) begin
        failures++; $display("%s: bus %h expected %h", what, memreq_addr, exp_bus);
      end
    end
    @(negedge clk);
  endtask

  task automatic expect32(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++; $display("%s: %h expected %h", what, got, exp);
    end
  endtask

  // fetch the instruction at PC; pc is the expected PC
  task automatic fetch(input logic [31:0] pc);
    ctrl_t c;
    c = cw(); c.pc_bus_en = 1; c.a_en = 1; c.memreq_val = 1; c.memreq_type = MEM_RD;
    step(c, 1, pc, "F0 bus = PC");
    c = cw(); c.rd_bus_en = 1; c.ir_en = 1;
    step(c, 1, mem[pc[5:2]], "F1 bus = RD");
    expect32("IR", ir, mem[pc[5:2]]);
    c = cw(); c.alu_bus_en = 1; c.bop_sel = BOP_P4; c.pc_en = 1;
    step(c, 1, pc + 4, "F2 bus = A + 4");
  endtask

  initial begin
    ctrl_t c;
    logic [31:0] x, y, p;
    ctrl = CTRL_IDLE; rst = 1;
    for (int i = 0; i < 16; i++) mem[i] = '0;
    x = 32'h0000_0123; y = 32'hffff_f9c3;   // 291 and -1597
    mem[0] = asm_addi(5, 6, 291);    // rd = x5, rs1 = x6
    mem[1] = asm_addi(6, 5, -1597);  // rd = x6, rs1 = x5
    mem[2] = asm_sw(6, -8, 5);       // rs2 = x6, rs1 = x5, S imm -8
    mem[3] = asm_bne(5, 6, -64);
    mem[4] = asm_jal(7, 2048);
    mem[5] = 32'h0bad_cafe;
    repeat (2) @(negedge clk);
    rst = 0;

    // instruction 0: RF[rd=x5] <- I-immediate
    fetch(0);
    c = cw(); c.ig_bus_en = 1; c.imm_type = IMM_I; c.rf_wen = 1; c.rf_addr_sel = RF_RD;
    step(c, 1, x, "I imm on bus");
    c = cw(); c.rf_bus_en = 1; c.rf_addr_sel = RF_RD;
    step(c, 1, x, "read back x5 (rd)");
    c = cw(); c.rf_bus_en = 1; c.rf_addr_sel = RF_X0;
    step(c, 1, 0, "x0 reads zero");

    // instruction 1: RF[rd=x6] <- I-immediate; rs1 of it is x5
    fetch(4);
    c = cw(); c.ig_bus_en = 1; c.imm_type = IMM_I; c.rf_wen = 1; c.rf_addr_sel = RF_RD;
    step(c, 1, y, "I imm (negative) on bus");
    c = cw(); c.rf_bus_en = 1; c.rf_addr_sel = RF_RS1; c.a_en = 1;
    step(c, 1, x, "A <- RF[rs1]");

    // instruction 2: rs2 = x6, rs1 = x5
    fetch(8);
    c = cw(); c.rf_bus_en = 1; c.rf_addr_sel = RF_RS1; c.a_en = 1;
    step(c, 1, x, "A <- RF[rs1]");
    c = cw(); c.rf_bus_en = 1; c.rf_addr_sel = RF_RS2; c.b_en = 1; c.b_sel = B_BUS;
    step(c, 1, y, "B <- RF[rs2]");
    c = cw(); c.alu_bus_en = 1; c.bop_sel = BOP_B;
    step(c, 1, x + y, "A + B");
    c = cw(); c.alu_bus_en = 1; c.bop_sel = BOP_ZERO;
    step(c, 1, x, "A + 0");
    c = cw(); c.alu_bus_en = 1; c.bop_sel = BOP_M4;
    step(c, 1, x - 4, "A - 4");
    c = cw(); c.alu_bus_en = 1; c.bop_sel = BOP_P4;
    step(c, 1, x + 4, "A + 4");
    c = cw(); c.ig_bus_en = 1; c.imm_type = IMM_S;
    step(c, 1, -32'sd8, "S imm on bus");
    // compare: not equal
    ctrl = cw(); ctrl.alu_func = ALU_CMP; ctrl.alu_bus_en = 1; ctrl.bop_sel = BOP_B; #1;
    expect32("cmp result (unequal)", memreq_addr, 0);
    expect32("eq (unequal)", 32'(eq), 0);
    @(negedge clk);
    // WD <- RF[rs2]
    c = cw(); c.rf_bus_en = 1; c.rf_addr_sel = RF_RS2; c.wd_en = 1;
    step(c, 1, y, "WD <- RF[rs2]");
    expect32("memreq_data = WD", memreq_data, y);
    // make A == B and compare
    c = cw(); c.rf_bus_en = 1; c.rf_addr_sel = RF_RS2; c.a_en = 1;
    step(c, 1, y, "A <- RF[rs2]");
    ctrl = cw(); ctrl.alu_func = ALU_CMP; ctrl.alu_bus_en = 1; ctrl.bop_sel = BOP_B; #1;
    expect32("cmp result (equal)", memreq_addr, 1);
    expect32("eq (equal)", 32'(eq), 1);
    @(negedge clk);

    // shift-and-add: B <- x, C <- y, A <- 0 then 32 steps gives x * y
    c = cw(); c.rf_bus_en = 1; c.rf_addr_sel = RF_RS1; c.b_en = 1;
    step(c, 1, x, "B <- x");
    c = cw(); c.rf_bus_en = 1; c.rf_addr_sel = RF_RS2; c.c_en = 1;
    step(c, 1, y, "C <- y");
    c = cw(); c.rf_bus_en = 1; c.rf_addr_sel = RF_X0; c.a_en = 1;
    step(c, 1, 0, "A <- x0");
    p = 0;
    for (int i = 0; i < 32; i++) begin
      expect32("c_lsb", 32'(c_lsb), 32'(y[i]));
      c = cw(); c.alu_bus_en = 1; c.a_en = 1; c.b_en = 1; c.b_sel = B_SHL;
      c.c_en = 1; c.c_sel = C_SHR; c.bop_sel = c_lsb ? BOP_B : BOP_ZERO;
      if (y[i]) p = p + (x << i);
      step(c, 1, p, "multiply step");
    end
    c = cw(); c.alu_bus_en = 1; c.bop_sel = BOP_ZERO;
    step(c, 1, x * y, "product");

    // instruction 3 (bne) and 4 (jal): B and J immediates
    fetch(12);
    c = cw(); c.ig_bus_en = 1; c.imm_type = IMM_B;
    step(c, 1, -32'sd64, "B imm on bus");
    fetch(16);
    c = cw(); c.ig_bus_en = 1; c.imm_type = IMM_J;
    step(c, 1, 32'd2048, "J imm on bus");
    // data load through RD
    c = cw(); c.ig_bus_en = 1; c.imm_type = IMM_J; c.a_en = 1;
    step(c, 1, 32'd2048, "A <- imm");
    c = cw(); c.alu_bus_en = 1; c.bop_sel = BOP_M4; c.a_en = 1;
    step(c, 1, 32'd2044, "A <- A - 4");
    c = cw(); c.alu_bus_en = 1; c.bop_sel = BOP_M4; c.a_en = 1;
    step(c, 1, 32'd2040, "A <- A - 4");
    // read word 5 of the memory
    ctrl = cw(); ctrl.pc_bus_en = 1; #1;
    expect32("PC after two fetches past 16", memreq_addr, 20);
    ctrl.memreq_val = 1; ctrl.memreq_type = MEM_RD; @(negedge clk);
    c = cw(); c.rd_bus_en = 1;
    step(c, 1, 32'h0bad_cafe, "RD holds memory response");
    // PC <- bus
    c = cw(); c.ig_bus_en = 1; c.imm_type = IMM_J; c.pc_en = 1;
    step(c, 1, 32'd2048, "PC <- imm");
    c = cw(); c.pc_bus_en = 1;
    step(c, 1, 32'd2048, "PC");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
