// Self-checking testbench of the processor (control unit plus datapath).
//
// A combinational memory model in the testbench holds the mixed test
// program, which executes every instruction at least once and stores its
// results. The testbench checks the stored results against values worked
// out here, and checks the cycle count of every instruction executed
// (3 fetch cycles plus the state chain of the instruction; bne is 9
// cycles when taken and 6 when not).
module tinyrv1_mc_proc_tb;
  import tinyrv1_mc_pkg::*;
  import tinyrv1_asm_pkg::*;
  import tinyrv1_progs_pkg::*;

  logic        clk = 0, rst;
  logic        memreq_val;
  mtype_t      memreq_type;
  logic [31:0] memreq_addr, memreq_data, memresp_data;
  logic        inst_done;
  logic [31:0] mem [1024];
  int checks = 0, failures = 0;

  tinyrv1_mc_proc #(.RESET_PC(32'h0)) dut (
    .clk, .rst, .memreq_val, .memreq_type, .memreq_addr, .memreq_data, .memresp_data, .inst_done);

  assign memresp_data = mem[memreq_addr[11:2]];
  always_ff @(posedge clk)
    if (memreq_val && memreq_type == MEM_WR) mem[memreq_addr[11:2]] <= memreq_data;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect32(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++; $display("%s: %h expected %h", what, got, exp);
    end
  endtask

  function automatic int latency(input logic [31:0] i, input bit taken);
    case (i[6:0])
      7'b0110011: return (i[31:25] == 7'b0000001) ? CYC_MUL : CYC_ADD;
      7'b0010011: return CYC_ADDI;
      7'b0000011: return CYC_LW;
      7'b0100011: return CYC_SW;
      7'b1101111: return CYC_JAL;
      7'b1100111: return CYC_JR;
      7'b1100011: return taken ? CYC_BNE_TAKEN : CYC_BNE_NOT;
      7'b0001011: return CYC_ADDMM;
      7'b0101011: return CYC_LWAI;
      default:    return 3;
    endcase
  endfunction

  initial begin
    logic [31:0] prog[$];
    logic [31:0] opa, opb, last_inst, cur_inst, cur_pc, last_pc;
    int halt_addr, cyc, last_cyc, ninst;
    bit first, pending;

    foreach (mem[i]) mem[i] = '0;
    prog_mixed(prog, halt_addr);
    foreach (prog[i]) mem[i] = prog[i];
    opa = $urandom; opb = $urandom;
    mem[OPA / 4] = opa; mem[OPB / 4] = opb;

    rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    first = 1; pending = 0; cyc = 0; ninst = 0;
    forever begin
      // the cycle after inst_done (or reset) is F0: memreq_addr is the PC
      if (first) begin
        cur_pc = memreq_addr;
        cur_inst = memresp_data;
        if (pending) begin
          checks++;
          if (last_cyc != latency(last_inst, cur_pc != last_pc + 4)) begin
            failures++;
            $display("instruction %h at %h took %0d cycles", last_inst, last_pc, last_cyc);
          end
          ninst++;
        end
        if (cur_pc == 32'(halt_addr)) break;
        first = 0; cyc = 0;
      end
      cyc++;
      if (inst_done) begin
        first = 1; pending = 1;
        last_inst = cur_inst; last_pc = cur_pc; last_cyc = cyc;
      end
      @(negedge clk);
    end

    expect32("instructions executed", 32'(ninst), 32'(halt_addr / 4 - 5));
    expect32("add",          mem[(RES + 0) / 4],  32'd2);
    expect32("mul small",    mem[(RES + 4) / 4],  -32'sd15);
    expect32("lw + add",     mem[(RES + 8) / 4],  -32'sd30);
    expect32("jal link",     mem[(RES + 12) / 4], 32'd44);
    expect32("jr/bne path",  mem[(RES + 16) / 4], 32'd1);
    expect32("add.mm",       mem[(RES + 20) / 4], -32'sd13);
    expect32("lw.ai load",   mem[(RES + 24) / 4], -32'sd30);
    expect32("lw.ai incr",   mem[(RES + 28) / 4], 32'(RES + 4));
    expect32("mul random",   mem[(RES + 32) / 4], opa * opb);
    expect32("x0 stays 0",   mem[(RES + 36) / 4], 32'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
