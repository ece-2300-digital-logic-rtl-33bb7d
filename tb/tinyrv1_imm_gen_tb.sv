// Self-checking testbench of the immediate generator: random immediates are
// encoded into I, S, J and B instructions with the assembler functions and
// must come back sign-extended.
module tinyrv1_imm_gen_tb;
  import tinyrv1_mc_pkg::*;
  import tinyrv1_asm_pkg::*;

  logic [31:0] inst, imm;
  imm_t        imm_type;
  int checks = 0, failures = 0;

  tinyrv1_imm_gen dut (.inst, .imm_type, .imm);

  task automatic expect_imm(input logic [31:0] word, input imm_t t, input int val);
    inst = word; imm_type = t; #1;
    checks++;
    if (imm !== 32'(val)) begin
      failures++; $display("type %0d inst %h: imm %h expected %h", t, word, imm, 32'(val));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    for (int i = 0; i < 300; i++) begin
      // I and S: 12-bit signed
      v = int'($urandom_range(0, 4095)) - 2048;
      expect_imm(asm_addi(int'($urandom_range(0,31)), int'($urandom_range(0,31)), v), IMM_I, v);
      expect_imm(asm_sw(int'($urandom_range(0,31)), v, int'($urandom_range(0,31))), IMM_S, v);
      // B: 13-bit signed, even
      v = (int'($urandom_range(0, 4095)) - 2048) * 2;
      expect_imm(asm_bne(int'($urandom_range(0,31)), int'($urandom_range(0,31)), v), IMM_B, v);
      // J: 21-bit signed, even
      v = (int'($urandom_range(0, 1048575)) - 524288) * 2;
      expect_imm(asm_jal(int'($urandom_range(0,31)), v), IMM_J, v);
    end
    expect_imm(asm_addi(1, 2, -1), IMM_I, -1);
    expect_imm(asm_addi(1, 2, 2047), IMM_I, 2047);
    expect_imm(asm_bne(1, 0, -4096), IMM_B, -4096);
    expect_imm(asm_jal(1, 1048574), IMM_J, 1048574);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
