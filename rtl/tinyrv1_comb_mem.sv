// Combinational single-port memory.
//
// WORDS 32-bit words behind one port. A read returns M[addr] in the same
// cycle (combinational, shorter than one clock cycle); a write (memreq_val
// with memreq_type = MEM_WR) stores memreq_data at the rising clock edge.
// Addresses are byte addresses of aligned words: bits [1:0] are ignored and
// the address wraps at the memory size. Contents are not reset.
//
// The combinational read and the single port follow the design, which
// takes such a memory as an idealised assumption; the size, word-only
// access and wrap-around are this design's choices.
module tinyrv1_comb_mem
  import tinyrv1_mc_pkg::*;
#(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic        memreq_val,
  input  mtype_t      memreq_type,
  input  logic [31:0] memreq_addr,
  input  logic [31:0] memreq_data,
  output logic [31:0] memresp_data
);

  logic [31:0] m [WORDS];

  logic [AW-1:0] widx;
  assign widx = memreq_addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (memreq_val && memreq_type == MEM_WR)
      m[widx] <= memreq_data;
  end

  assign memresp_data = m[widx];

endmodule
