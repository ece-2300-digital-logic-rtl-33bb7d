// Self-checking testbench of the datapath bus: each single enable passes
// its source through; no enable gives zero.
module tinyrv1_bus_tb;
  logic [4:0]       en;
  logic [4:0][31:0] src;
  logic [31:0]      bus;
  int checks = 0, failures = 0;

  tinyrv1_bus #(.XLEN(32), .NSRC(5)) dut (.en, .src, .bus);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 100; i++) begin
      for (int s = 0; s < 5; s++) src[s] = $urandom;
      for (int s = 0; s < 5; s++) begin
        en = 5'(1 << s); #1;
        checks++;
        if (bus !== src[s]) begin
          failures++; $display("en %b bus %h expected %h", en, bus, src[s]);
        end
      end
      en = '0; #1;
      checks++;
      if (bus !== 32'd0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
