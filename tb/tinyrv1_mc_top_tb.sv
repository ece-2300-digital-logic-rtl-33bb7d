// End-to-end testbench of the processor system at its default size.
//
// Runs three programs on the top module, each from reset until the
// processor fetches the program's final jump-to-self:
//   1. the mixed program (every instruction, results checked in memory);
//   2. vector-vector add with n = 64, checked element by element;
//   3. find with n = 64 where only the first element matches.
// For vvadd and find the total cycle count is checked against the count
// derived from the per-instruction latencies (3 fetch cycles plus the
// state chain of each instruction). The testbench also counts how often
// each mechanism of the design happened (each instruction's state chain,
// bne taken and not taken, multiply steps that add and that skip, memory
// reads and writes) and counts a failure for any that never did.
module tinyrv1_mc_top_tb;
  import tinyrv1_mc_pkg::*;
  import tinyrv1_progs_pkg::*;

  localparam int N = 64;

  logic        clk = 0, rst = 1;
  logic        memreq_val;
  mtype_t      memreq_type;
  logic [31:0] memreq_addr, memreq_data;
  logic        inst_done;
  int checks = 0, failures = 0;

  tinyrv1_mc_top dut (.clk, .rst, .memreq_val, .memreq_type, .memreq_addr, .memreq_data, .inst_done);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ mechanism counts
  typedef enum int { EV_ADD, EV_ADDI, EV_MUL, EV_LW, EV_SW, EV_JAL, EV_JR, EV_BNE,
                     EV_ADDMM, EV_LWAI, EV_BNE_TAKEN, EV_BNE_NOT, EV_MUL_ADD, EV_MUL_SKIP,
                     EV_MEM_RD_DATA, EV_MEM_WR, EV_COUNT } ev_t;
  int ev [EV_COUNT];
  string ev_name [EV_COUNT] = '{"add", "addi", "mul", "lw", "sw", "jal", "jr", "bne",
                                "add.mm", "lw.ai", "bne taken", "bne not taken",
                                "multiply step adds B", "multiply step adds 0",
                                "data memory read", "memory write"};

  state_t st;
  assign st = dut.u_proc.u_ctrl.state;

  always @(posedge clk) if (!rst) begin
    case (st)
      A0:  ev[EV_ADD]++;
      AI0: ev[EV_ADDI]++;
      M0:  ev[EV_MUL]++;
      L0:  ev[EV_LW]++;
      S0:  ev[EV_SW]++;
      JA0: ev[EV_JAL]++;
      JR0: ev[EV_JR]++;
      B0:  ev[EV_BNE]++;
      MM0: ev[EV_ADDMM]++;
      LA0: ev[EV_LWAI]++;
      B3:  ev[EV_BNE_TAKEN]++;
      B2:  if (inst_done) ev[EV_BNE_NOT]++;
      default: ;
    endcase
    if (st >= M3 && st <= M34) begin
      if (dut.u_proc.c_lsb) ev[EV_MUL_ADD]++;
      else                  ev[EV_MUL_SKIP]++;
    end
    if (memreq_val && memreq_type == MEM_RD && st != F0) ev[EV_MEM_RD_DATA]++;
    if (memreq_val && memreq_type == MEM_WR) ev[EV_MEM_WR]++;
  end

  // ----------------------------------------------------------------- helpers
  task automatic expect32(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++; $display("%s: %h expected %h", what, got, exp);
    end
  endtask

  task automatic load(input logic [31:0] p[$]);
    foreach (dut.u_mem.m[i]) dut.u_mem.m[i] = '0;
    foreach (p[i]) dut.u_mem.m[i] = p[i];
  endtask

  // Reset, run until the fetch of halt_addr, return the cycle count.
  task automatic run(input int halt_addr, output int cycles);
    rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    cycles = 0;
    while (!(st == F0 && memreq_addr == 32'(halt_addr))) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    logic [31:0] p[$];
    logic [31:0] opa, opb, v, s0 [N], s1 [N];
    int halt, cycles, exp_cycles;

    // 1. mixed program
    prog_mixed(p, halt);
    load(p);
    opa = $urandom; opb = $urandom;
    dut.u_mem.m[OPA / 4] = opa; dut.u_mem.m[OPB / 4] = opb;
    run(halt, cycles);
    expect32("mixed: add",        dut.u_mem.m[(RES + 0) / 4],  32'd2);
    expect32("mixed: mul",        dut.u_mem.m[(RES + 4) / 4],  -32'sd15);
    expect32("mixed: lw + add",   dut.u_mem.m[(RES + 8) / 4],  -32'sd30);
    expect32("mixed: jal link",   dut.u_mem.m[(RES + 12) / 4], 32'd44);
    expect32("mixed: jr/bne",     dut.u_mem.m[(RES + 16) / 4], 32'd1);
    expect32("mixed: add.mm",     dut.u_mem.m[(RES + 20) / 4], -32'sd13);
    expect32("mixed: lw.ai load", dut.u_mem.m[(RES + 24) / 4], -32'sd30);
    expect32("mixed: lw.ai incr", dut.u_mem.m[(RES + 28) / 4], 32'(RES + 4));
    expect32("mixed: mul random", dut.u_mem.m[(RES + 32) / 4], opa * opb);
    expect32("mixed: x0",         dut.u_mem.m[(RES + 36) / 4], 32'd0);

    // 2. vvadd, n = 64
    prog_vvadd(N, p, halt);
    load(p);
    for (int i = 0; i < N; i++) begin
      s0[i] = $urandom; s1[i] = $urandom;
      dut.u_mem.m[SRC0 / 4 + i] = s0[i];
      dut.u_mem.m[SRC1 / 4 + i] = s1[i];
    end
    run(halt, cycles);
    for (int i = 0; i < N; i++)
      expect32($sformatf("vvadd dest[%0d]", i), dut.u_mem.m[DEST / 4 + i], s0[i] + s1[i]);
    // 4 addi of setup, then per iteration 2 lw, add, sw, 4 addi, bne
    exp_cycles = 4 * CYC_ADDI
               + N * (2 * CYC_LW + CYC_ADD + CYC_SW + 4 * CYC_ADDI)
               + (N - 1) * CYC_BNE_TAKEN + CYC_BNE_NOT;
    expect32("vvadd cycles", 32'(cycles), 32'(exp_cycles));
    $display("vvadd n=%0d: %0d cycles, CPI %0.2f", N, cycles, real'(cycles) / real'(4 + 9 * N));

    // 3. find, n = 64, only the first element matches
    prog_find(N, p, halt);
    load(p);
    v = $urandom;
    dut.u_mem.m[VALUE_ADDR / 4] = v;
    for (int i = 0; i < N; i++) dut.u_mem.m[SRC0 / 4 + i] = (i == 0) ? v : v ^ (32'd1 << (i % 32));
    dut.u_mem.m[FOUND_ADDR / 4] = 32'hffff_ffff;
    run(halt, cycles);
    expect32("find result", dut.u_mem.m[FOUND_ADDR / 4], 32'd1);
    // setup addi, addi, lw, addi; first iteration: lw, bne not taken, addi,
    // addi, addi, bne taken; other iterations: lw, bne taken, addi, addi,
    // bne (taken except in the last); final sw
    exp_cycles = 3 * CYC_ADDI + CYC_LW
               + (CYC_LW + CYC_BNE_NOT + 3 * CYC_ADDI + CYC_BNE_TAKEN)
               + (N - 1) * (CYC_LW + CYC_BNE_TAKEN + 2 * CYC_ADDI) + (N - 2) * CYC_BNE_TAKEN
               + CYC_BNE_NOT + CYC_SW;
    expect32("find cycles", 32'(cycles), 32'(exp_cycles));
    $display("find n=%0d: %0d cycles", N, cycles);

    for (int e = 0; e < EV_COUNT; e++) begin
      checks++;
      $display("mechanism %-22s happened %0d times", ev_name[e], ev[e]);
      if (ev[e] == 0) begin
        failures++; $display("mechanism %s never happened", ev_name[e]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
