// Self-checking testbench of the combinational memory: writes take effect
// at the clock edge, reads return data in the same cycle, a read request
// does not write.
module tinyrv1_comb_mem_tb;
  import tinyrv1_mc_pkg::*;

  localparam int W = 64;
  logic        clk = 0;
  logic        memreq_val;
  mtype_t      memreq_type;
  logic [31:0] memreq_addr, memreq_data, memresp_data;
  logic [31:0] ref_m [W];
  int checks = 0, failures = 0;

  tinyrv1_comb_mem #(.WORDS(W)) dut (.clk, .memreq_val, .memreq_type, .memreq_addr,
                                     .memreq_data, .memresp_data);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    memreq_val = 0; memreq_type = MEM_RD; memreq_addr = 0; memreq_data = 0;
    for (int w = 0; w < W; w++) begin
      @(negedge clk);
      memreq_val = 1; memreq_type = MEM_WR; memreq_addr = 32'(w * 4); memreq_data = $urandom;
      ref_m[w] = memreq_data;
    end
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      memreq_val  = 1;
      memreq_type = ($urandom_range(0, 2) == 0) ? MEM_WR : MEM_RD;
      memreq_addr = 32'($urandom_range(0, W - 1) * 4);
      memreq_data = $urandom;
      #1;
      checks++;
      if (memresp_data !== ref_m[memreq_addr[7:2]]) begin
        failures++; $display("addr %h: %h expected %h", memreq_addr, memresp_data, ref_m[memreq_addr[7:2]]);
      end
      if (memreq_type == MEM_WR) ref_m[memreq_addr[7:2]] = memreq_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
