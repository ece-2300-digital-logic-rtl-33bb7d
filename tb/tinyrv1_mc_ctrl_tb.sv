// Self-checking testbench of the control unit.
//
// The instruction register and the status signals are driven directly.
// For every instruction the testbench runs the FSM from F0 until the cycle
// after inst_done and checks the number of cycles (3 fetch cycles plus the
// length of the instruction's state chain), the fetch control words, the
// number of multiply shift steps and that their b_op select follows c_lsb,
// and the memory requests each instruction makes.
module tinyrv1_mc_ctrl_tb;
  import tinyrv1_mc_pkg::*;
  import tinyrv1_asm_pkg::*;

  logic        clk = 0, rst;
  logic [31:0] ir;
  logic        eq, c_lsb;
  ctrl_t       ctrl;
  state_t      state;
  logic        inst_done;
  int checks = 0, failures = 0;

  tinyrv1_mc_ctrl dut (.clk, .rst, .ir, .eq, .c_lsb, .ctrl, .state, .inst_done);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++; $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Run one instruction from F0; eq_val is held during the instruction.
  task automatic run(input string name, input logic [31:0] inst, input logic eq_val,
                     input int exp_cycles, input int exp_rd, input int exp_wr);
    int cycles = 0, steps = 0, rds = 0, wrs = 0, bop_ok = 1;
    expect_eq({name, " starts in F0"}, int'(state), int'(F0));
    ir = 32'hdead_beef; eq = eq_val;
    forever begin
      // IR is loaded at the end of F1
      if (state == F2) ir = inst;
      c_lsb = 1'($urandom);
      #1;
      cycles++;
      if (state == F0) begin
        checks++;
        if (!(ctrl.pc_bus_en && ctrl.a_en && ctrl.memreq_val && ctrl.memreq_type == MEM_RD
              && !ctrl.alu_bus_en && !ctrl.rf_wen)) begin
          failures++; $display("%s: bad F0 control word", name);
        end
      end else begin
        if (ctrl.memreq_val && ctrl.memreq_type == MEM_RD) rds++;
        if (ctrl.memreq_val && ctrl.memreq_type == MEM_WR) wrs++;
      end
      if (state == F1) begin
        checks++;
        if (!(ctrl.rd_bus_en && ctrl.ir_en && !ctrl.memreq_val)) begin
          failures++; $display("%s: bad F1 control word", name);
        end
      end
      if (state == F2) begin
        checks++;
        if (!(ctrl.alu_bus_en && ctrl.pc_en && ctrl.bop_sel == BOP_P4 && ctrl.alu_func == ALU_ADD)) begin
          failures++; $display("%s: bad F2 control word", name);
        end
      end
      if (ctrl.b_en && ctrl.b_sel == B_SHL) begin
        steps++;
        if (ctrl.bop_sel != (c_lsb ? BOP_B : BOP_ZERO) || !ctrl.c_en || ctrl.c_sel != C_SHR)
          bop_ok = 0;
      end
      if (inst_done) break;
      @(negedge clk);
    end
    expect_eq({name, " cycles"}, cycles, exp_cycles);
    expect_eq({name, " memory reads"}, rds, exp_rd);
    expect_eq({name, " memory writes"}, wrs, exp_wr);
    expect_eq({name, " multiply steps"}, steps, (name == "mul") ? 32 : 0);
    expect_eq({name, " multiply b_op follows c_lsb"}, bop_ok, 1);
    @(negedge clk);
    expect_eq({name, " returns to F0"}, int'(state), int'(F0));
  endtask

  initial begin
    rst = 1; ir = '0; eq = 0; c_lsb = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    run("add",    asm_add(3, 1, 2),      0, 6,  0, 0);
    run("addi",   asm_addi(3, 1, -7),    0, 6,  0, 0);
    run("mul",    asm_mul(3, 1, 2),      0, 39, 0, 0);
    run("lw",     asm_lw(3, 8, 1),       0, 7,  1, 0);
    run("sw",     asm_sw(3, 8, 1),       0, 7,  0, 1);
    run("jal",    asm_jal(1, 16),        0, 6,  0, 0);
    run("jr",     asm_jr(5),             0, 4,  0, 0);
    run("bne taken",     asm_bne(1, 2, -8), 0, 9, 0, 0);
    run("bne not taken", asm_bne(1, 2, -8), 1, 6, 0, 0);
    run("add.mm", asm_addmm(3, 1, 2),    0, 12, 2, 1);
    run("lw.ai",  asm_lwai(3, 4, 1),     0, 8,  1, 0);
    run("unknown", 32'h0000_0000,        0, 3,  0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
