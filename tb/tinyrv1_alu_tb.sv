// Self-checking testbench of the ALU: random and corner operands for add
// and compare, and the eq status in both functions.
module tinyrv1_alu_tb;
  import tinyrv1_mc_pkg::*;

  logic [31:0] in0, in1, out;
  logic        eq;
  alu_t        func;
  int checks = 0, failures = 0;

  tinyrv1_alu #(.XLEN(32)) dut (.in0, .in1, .func, .out, .eq);

  task automatic check(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] sum;
    sum = 32'(longint'(a) + longint'(b));
    in0 = a; in1 = b;
    func = ALU_ADD; #1;
    checks++;
    if (out !== sum || eq !== (a == b)) begin
      failures++; $display("add %h %h -> %h eq=%b", a, b, out, eq);
    end
    func = ALU_CMP; #1;
    checks++;
    if (out !== ((a == b) ? 32'd1 : 32'd0) || eq !== (a == b)) begin
      failures++; $display("cmp %h %h -> %h eq=%b", a, b, out, eq);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    check(32'h0, 32'h0);
    check(32'hffff_ffff, 32'h1);
    check(32'h7fff_ffff, 32'h1);
    check(32'h1234, 32'hffff_fffc);
    check(32'h8000_0000, 32'h8000_0000);
    for (int i = 0; i < 200; i++) begin
      r = $urandom;
      check($urandom, (i % 4 == 0) ? r : $urandom);
    end
    for (int i = 0; i < 50; i++) begin
      r = $urandom;
      check(r, r);
      // operands that differ in a single bit
      check(r, r ^ (32'd1 << (i % 32)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
