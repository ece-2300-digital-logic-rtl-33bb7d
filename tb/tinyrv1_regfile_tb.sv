// Self-checking testbench of the single-port register file: random writes
// and reads through the one port against a reference array; x0 stays zero.
module tinyrv1_regfile_tb;
  logic        clk = 0;
  logic [4:0]  addr;
  logic        wen;
  logic [31:0] wdata, rdata;
  logic [31:0] ref_regs [32];
  int checks = 0, failures = 0;

  tinyrv1_regfile #(.XLEN(32), .NREGS(32)) dut (.clk, .addr, .wen, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wen = 0; addr = 0; wdata = 0;
    // fill every register once
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      addr = 5'(r); wen = 1; wdata = $urandom;
      ref_regs[r] = (r == 0) ? 32'd0 : wdata;
    end
    @(negedge clk); wen = 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      addr = 5'($urandom_range(0, 31));
      wen  = ($urandom_range(0, 2) == 0);
      wdata = $urandom;
      #1;
      checks++;
      if (rdata !== ref_regs[addr]) begin
        failures++; $display("read x%0d = %h expected %h", addr, rdata, ref_regs[addr]);
      end
      if (wen && addr != 0) ref_regs[addr] = wdata;
    end
    @(negedge clk); wen = 0; addr = 0; #1;
    checks++;
    if (rdata !== 32'd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
