// Random-program testbench of the processor system against a reference
// instruction-set model.
//
// Each round generates a random program, runs it on tinyrv1_mc_top and on
// a simple instruction-level model written in this testbench, and compares
// the data region, the final values of all 31 registers (stored to memory
// by the program's epilogue) and the total cycle count, which the model
// adds up from the per-instruction latencies.
//
// Program layout (byte addresses): code from 0, data region 0x600-0x6ff,
// initial register values 0x700-0x77c, register dump 0x780-0x7fc. The body
// is built from groups of 1 to 4 instructions: an ALU instruction, a load
// or store with its base-address setup, add.mm or lw.ai with theirs, a
// forward bne or jal, or an "addi x31, target; jr x31" pair. Jumps and
// branches only go forward and only to the start of a group, so every
// program ends and every memory address stays in the data region.
module tinyrv1_mc_random_tb;
  import tinyrv1_mc_pkg::*;
  import tinyrv1_asm_pkg::*;
  import tinyrv1_progs_pkg::*;

  localparam int ROUNDS = 40, GROUPS = 70;
  localparam int DATA = 'h600, INIT = 'h700, DUMP = 'h780;

  logic        clk = 0, rst = 1;
  logic        memreq_val;
  mtype_t      memreq_type;
  logic [31:0] memreq_addr, memreq_data;
  logic        inst_done;
  int checks = 0, failures = 0;

  tinyrv1_mc_top dut (.clk, .rst, .memreq_val, .memreq_type, .memreq_addr, .memreq_data, .inst_done);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ generator
  logic [31:0] prog[$];
  int          gstart[$];           // index of the first word of each group
  typedef struct { int idx; int group; int skip; int kind; int rd; } fix_t;
  fix_t        fixes[$];            // kind 0: bne, 1: jal, 2: addi of a jr pair

  function automatic int rreg();  return int'($urandom_range(1, 30)); endfunction
  function automatic int anyreg(); return int'($urandom_range(0, 31)); endfunction
  function automatic int dbase(); return DATA + 64 + 4 * int'($urandom_range(0, 31)); endfunction
  function automatic int doff();  return 4 * (int'($urandom_range(0, 31)) - 16); endfunction

  function automatic void gen(output int halt_addr);
    int kind, a, b, c, tgt;
    prog = {}; gstart = {}; fixes = {};
    for (int r = 1; r < 32; r++) prog.push_back(asm_lw(r, INIT + 4 * r, 0));
    for (int g = 0; g < GROUPS; g++) begin
      gstart.push_back(prog.size());
      kind = int'($urandom_range(0, 11));
      case (kind)
        0: prog.push_back(asm_add(anyreg(), anyreg(), anyreg()));
        1: prog.push_back(asm_addi(anyreg(), anyreg(), int'($urandom_range(0, 4095)) - 2048));
        2: prog.push_back(asm_mul(anyreg(), anyreg(), anyreg()));
        3, 4: begin a = rreg();
             prog.push_back(asm_addi(a, 0, dbase()));
             prog.push_back(asm_lw(anyreg(), doff(), a)); end
        5, 6: begin a = rreg();
             prog.push_back(asm_addi(a, 0, dbase()));
             prog.push_back(asm_sw(anyreg(), doff(), a)); end
        7: begin a = rreg(); b = rreg(); c = rreg();
             prog.push_back(asm_addi(a, 0, dbase()));
             prog.push_back(asm_addi(b, 0, dbase()));
             prog.push_back(asm_addi(c, 0, dbase()));
             prog.push_back(asm_addmm(c, a, b)); end
        8: begin a = rreg();
             prog.push_back(asm_addi(a, 0, dbase()));
             prog.push_back(asm_lwai(anyreg(), doff(), a)); end
        9: begin
             fixes.push_back('{prog.size(), g, int'($urandom_range(1, 3)), 0, 0});
             // compare two registers that are often equal: bne both ways
             a = anyreg();
             prog.push_back(asm_bne(a, ($urandom_range(0, 2) == 0) ? a : anyreg(), 0)); end
        10: begin
             fixes.push_back('{prog.size(), g, int'($urandom_range(1, 3)), 1, anyreg()});
             prog.push_back(32'h0); end
        11: begin
             fixes.push_back('{prog.size(), g, int'($urandom_range(1, 3)), 2, 0});
             prog.push_back(32'h0);
             prog.push_back(asm_jr(31)); end
        default: ;
      endcase
    end
    // landing pad for the last forward jumps, then the register dump
    for (int k = 0; k < 4; k++) begin
      gstart.push_back(prog.size());
      prog.push_back(asm_addi(0, 0, 0));
    end
    for (int r = 1; r < 32; r++) prog.push_back(asm_sw(r, DUMP + 4 * r, 0));
    halt_addr = 4 * prog.size();
    prog.push_back(asm_jal(0, 0));
    // patch forward targets
    foreach (fixes[i]) begin
      tgt = 4 * gstart[fixes[i].group + 1 + fixes[i].skip];
      case (fixes[i].kind)
        0: prog[fixes[i].idx] = asm_bne(int'(prog[fixes[i].idx][19:15]), int'(prog[fixes[i].idx][24:20]),
                                        tgt - 4 * fixes[i].idx);
        1: prog[fixes[i].idx] = asm_jal(fixes[i].rd, tgt - 4 * fixes[i].idx);
        default: prog[fixes[i].idx] = asm_addi(31, 0, tgt);
      endcase
    end
  endfunction

  // ------------------------------------------------------ reference model
  logic [31:0] rmem [1024];
  logic [31:0] x [32];

  function automatic logic [31:0] sext(input logic [31:0] v, input int bits);
    return 32'($signed(v << (32 - bits)) >>> (32 - bits));
  endfunction

  function automatic longint model(input int halt_addr);
    logic [31:0] pc, i, nextpc, ia, ib, addr, t;
    longint cyc = 0;
    pc = 0;
    foreach (x[r]) x[r] = 0;
    while (pc != 32'(halt_addr)) begin
      i = rmem[pc[11:2]];
      nextpc = pc + 4;
      ia = sext({20'b0, i[31:20]}, 12);
      case (i[6:0])
        7'b0110011: if (i[31:25] == 7'b0000001) begin
                      t = x[i[19:15]] * x[i[24:20]]; cyc += CYC_MUL;
                      if (i[11:7] != 0) x[i[11:7]] = t;
                    end else begin
                      t = x[i[19:15]] + x[i[24:20]]; cyc += CYC_ADD;
                      if (i[11:7] != 0) x[i[11:7]] = t;
                    end
        7'b0010011: begin t = x[i[19:15]] + ia; cyc += CYC_ADDI;
                      if (i[11:7] != 0) x[i[11:7]] = t; end
        7'b0000011: begin addr = x[i[19:15]] + ia; cyc += CYC_LW;
                      if (i[11:7] != 0) x[i[11:7]] = rmem[addr[11:2]]; end
        7'b0100011: begin addr = x[i[19:15]] + sext({20'b0, i[31:25], i[11:7]}, 12); cyc += CYC_SW;
                      rmem[addr[11:2]] = x[i[24:20]]; end
        7'b1101111: begin cyc += CYC_JAL;
                      if (i[11:7] != 0) x[i[11:7]] = pc + 4;
                      nextpc = pc + sext({11'b0, i[31], i[19:12], i[20], i[30:21], 1'b0}, 21); end
        7'b1100111: begin cyc += CYC_JR; nextpc = x[i[19:15]]; end
        7'b1100011: begin
                      ib = sext({19'b0, i[31], i[7], i[30:25], i[11:8], 1'b0}, 13);
                      if (x[i[19:15]] != x[i[24:20]]) begin nextpc = pc + ib; cyc += CYC_BNE_TAKEN; end
                      else cyc += CYC_BNE_NOT;
                    end
        7'b0001011: begin cyc += CYC_ADDMM;
                      t = x[i[11:7]];
                      rmem[t[11:2]] = rmem[x[i[19:15]] >> 2 & 32'h3ff] + rmem[x[i[24:20]] >> 2 & 32'h3ff]; end
        7'b0101011: begin cyc += CYC_LWAI;
                      t = x[i[19:15]];
                      addr = t + ia;
                      if (i[11:7] != 0) x[i[11:7]] = rmem[addr[11:2]];
                      if (i[19:15] != 0) x[i[19:15]] = t + 4; end
        default: cyc += 3;
      endcase
      pc = nextpc;
    end
    return cyc;
  endfunction

  // --------------------------------------------------------------- rounds
  initial begin
    int halt, cycles, nbr;
    longint exp_cycles;
    logic [31:0] w;
    for (int round = 0; round < ROUNDS; round++) begin
      gen(halt);
      foreach (rmem[k]) rmem[k] = 32'h0;
      foreach (prog[k]) rmem[k] = prog[k];
      for (int k = DATA / 4; k < INIT / 4; k++) rmem[k] = $urandom;
      for (int r = 1; r < 32; r++) begin
        // few distinct values so that bne sees equal operands too
        w = ($urandom_range(0, 3) == 0) ? 32'(r % 3) : $urandom;
        rmem[INIT / 4 + r] = w;
      end
      foreach (rmem[k]) dut.u_mem.m[k] = rmem[k];
      exp_cycles = model(halt);

      rst = 1;
      repeat (2) @(negedge clk);
      rst = 0;
      cycles = 0; nbr = 0;
      while (!(dut.u_proc.u_ctrl.state == F0 && memreq_addr == 32'(halt))) begin
        @(negedge clk);
        cycles++;
      end
      checks++;
      if (longint'(cycles) != exp_cycles) begin
        failures++; $display("round %0d: %0d cycles, model %0d", round, cycles, exp_cycles);
      end
      for (int k = DATA / 4; k < 1024; k++) begin
        checks++;
        if (dut.u_mem.m[k] !== rmem[k]) begin
          failures++;
          $display("round %0d: word %h = %h, model %h", round, 4 * k, dut.u_mem.m[k], rmem[k]);
        end
      end
      $display("round %0d: %0d instructions of code, %0d cycles", round, prog.size(), cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
