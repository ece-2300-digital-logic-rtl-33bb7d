// Test programs for the TinyRV1 processor testbenches.
//
// Each function returns a program as a list of machine words to be placed
// from address 0. Every program ends with "jal x0, 0" (a jump to itself),
// whose address is returned as halt_addr: a testbench stops when the
// processor fetches from it.
//
//   prog_mixed  every instruction at least once, results stored from 0x200;
//               expects two operands at 0x300 and 0x304
//   prog_vvadd  dest[i] = src0[i] + src1[i] for n elements
//               (src0 at 0x400, src1 at 0x500, dest at 0x600)
//   prog_find   found = 1 if any src0[i] equals value
//               (src0 at 0x400, value at 0x3f0, found stored at 0x3f4)
// The vvadd and find loops are the two example kernels of the design's
// performance analysis, instruction for instruction.
package tinyrv1_progs_pkg;
  import tinyrv1_asm_pkg::*;

  localparam int SRC0 = 'h400, SRC1 = 'h500, DEST = 'h600;
  localparam int VALUE_ADDR = 'h3f0, FOUND_ADDR = 'h3f4;
  localparam int RES = 'h200, OPA = 'h300, OPB = 'h304;

  function automatic void prog_mixed(output logic [31:0] p[$], output int halt_addr);
    p = {};
    p.push_back(asm_addi(1, 0, 5));          // 0
    p.push_back(asm_addi(2, 0, -3));         // 4
    p.push_back(asm_add(3, 1, 2));           // 8   x3 = 2
    p.push_back(asm_mul(4, 1, 2));           // 12  x4 = -15
    p.push_back(asm_addi(10, 0, RES));       // 16
    p.push_back(asm_sw(3, 0, 10));           // 20  M[RES+0]  = 2
    p.push_back(asm_sw(4, 4, 10));           // 24  M[RES+4]  = -15
    p.push_back(asm_lw(5, 4, 10));           // 28  x5 = -15
    p.push_back(asm_add(5, 5, 5));           // 32  x5 = -30
    p.push_back(asm_sw(5, 8, 10));           // 36  M[RES+8]  = -30
    p.push_back(asm_jal(6, 12));             // 40  x6 = 44, to 52
    p.push_back(asm_addi(7, 0, 99));         // 44  skipped
    p.push_back(asm_addi(7, 0, 98));         // 48  skipped
    p.push_back(asm_sw(6, 12, 10));          // 52  M[RES+12] = 44
    p.push_back(asm_addi(8, 0, 72));         // 56
    p.push_back(asm_jr(8));                  // 60  to 72
    p.push_back(asm_addi(9, 0, 77));         // 64  skipped
    p.push_back(asm_addi(9, 0, 78));         // 68  skipped
    p.push_back(asm_addi(9, 0, 1));          // 72
    p.push_back(asm_bne(9, 0, 8));           // 76  taken, to 84
    p.push_back(asm_addi(9, 0, 55));         // 80  skipped
    p.push_back(asm_bne(9, 9, 8));           // 84  not taken
    p.push_back(asm_sw(9, 16, 10));          // 88  M[RES+16] = 1
    p.push_back(asm_addi(12, 0, RES + 'h14));// 92
    p.push_back(asm_addi(13, 0, RES + 4));   // 96
    p.push_back(asm_addmm(12, 10, 13));      // 100 M[RES+20] = 2 + -15
    p.push_back(asm_lwai(14, 8, 10));        // 104 x14 = -30, x10 = RES+4
    p.push_back(asm_sw(14, 20, 10));         // 108 M[RES+24] = -30
    p.push_back(asm_sw(10, 24, 10));         // 112 M[RES+28] = RES+4
    p.push_back(asm_lw(16, OPA, 0));         // 116
    p.push_back(asm_lw(17, OPB, 0));         // 120
    p.push_back(asm_mul(15, 16, 17));        // 124
    p.push_back(asm_sw(15, 28, 10));         // 128 M[RES+32] = opa * opb
    p.push_back(asm_addi(0, 0, 9));          // 132 write to x0 is ignored
    p.push_back(asm_sw(0, 32, 10));          // 136 M[RES+36] = 0
    halt_addr = 4 * p.size();
    p.push_back(asm_jal(0, 0));              // 140 halt
  endfunction

  function automatic void prog_vvadd(input int n, output logic [31:0] p[$], output int halt_addr);
    p = {};
    p.push_back(asm_addi(1, 0, SRC0));
    p.push_back(asm_addi(2, 0, SRC1));
    p.push_back(asm_addi(3, 0, DEST));
    p.push_back(asm_addi(4, 0, n));
    // loop (address 16)
    p.push_back(asm_lw(5, 0, 1));
    p.push_back(asm_lw(6, 0, 2));
    p.push_back(asm_add(7, 5, 6));
    p.push_back(asm_sw(7, 0, 3));
    p.push_back(asm_addi(1, 1, 4));
    p.push_back(asm_addi(2, 2, 4));
    p.push_back(asm_addi(3, 3, 4));
    p.push_back(asm_addi(4, 4, -1));
    p.push_back(asm_bne(4, 0, -32));         // 48 -> 16
    halt_addr = 4 * p.size();
    p.push_back(asm_jal(0, 0));
  endfunction

  function automatic void prog_find(input int n, output logic [31:0] p[$], output int halt_addr);
    p = {};
    p.push_back(asm_addi(1, 0, SRC0));
    p.push_back(asm_addi(2, 0, n));
    p.push_back(asm_lw(3, VALUE_ADDR, 0));
    p.push_back(asm_addi(5, 0, 0));          // 12
    // loop (address 16)
    p.push_back(asm_lw(4, 0, 1));            // 16
    p.push_back(asm_bne(4, 3, 8));           // 20 -> neq at 28
    p.push_back(asm_addi(5, 0, 1));          // 24
    // neq (address 28)
    p.push_back(asm_addi(1, 1, 4));          // 28
    p.push_back(asm_addi(2, 2, -1));         // 32
    p.push_back(asm_bne(2, 0, -20));         // 36 -> 16
    p.push_back(asm_sw(5, FOUND_ADDR, 0));   // 40
    halt_addr = 4 * p.size();
    p.push_back(asm_jal(0, 0));
  endfunction

  // Cycles per instruction of the multi-cycle processor: 3 fetch states
  // plus the length of each instruction's state chain.
  localparam int CYC_ADD = 6, CYC_ADDI = 6, CYC_MUL = 39, CYC_LW = 7, CYC_SW = 7,
                 CYC_JAL = 6, CYC_JR = 4, CYC_BNE_TAKEN = 9, CYC_BNE_NOT = 6,
                 CYC_ADDMM = 12, CYC_LWAI = 8;

endpackage
