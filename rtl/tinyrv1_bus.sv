// Datapath bus.
//
// The one shared bus of the multi-cycle datapath. Five sources can drive
// it: PC, the immediate generator, the ALU, the register file and the RD
// register, each behind its own bus enable. At most one enable is set in a
// cycle (the datapath asserts this). The tri-state bus of a drawing is
// written here as an AND-OR multiplexer; with no enable set it carries 0.
// Purely combinational.
//
// The set of sources and their enables follow the design; the AND-OR form
// and the idle value 0 are this design's choices.
module tinyrv1_bus #(
  parameter int unsigned XLEN = 32,
  parameter int unsigned NSRC = 5
) (
  input  logic [NSRC-1:0]           en,
  input  logic [NSRC-1:0][XLEN-1:0] src,
  output logic [XLEN-1:0]           bus
);

  always_comb begin
    bus = '0;
    for (int i = 0; i < NSRC; i++)
      bus |= src[i] & {XLEN{en[i]}};
  end

endmodule
