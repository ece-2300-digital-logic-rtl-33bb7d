// TinyRV1 multi-cycle processor system: processor and memory.
//
// The processor fetches and executes instructions from a single-port,
// combinational-read memory of MEM_WORDS 32-bit words, starting at
// RESET_PC after a synchronous reset. Instructions take 4 to 39 cycles
// (3 fetch cycles plus 1 to 36 execute cycles). The memory request and
// inst_done are brought out so that activity can be observed; there are
// no other ports, so programs and data are placed in the memory array
// (u_mem.m) before reset is released.
//
// The memory size is this design's choice.
module tinyrv1_mc_top
  import tinyrv1_mc_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC  = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  output logic        memreq_val,
  output mtype_t      memreq_type,
  output logic [31:0] memreq_addr,
  output logic [31:0] memreq_data,
  output logic        inst_done
);

  logic [31:0] memresp_data;

  tinyrv1_mc_proc #(.RESET_PC(RESET_PC)) u_proc (
    .clk (clk), .rst (rst),
    .memreq_val (memreq_val), .memreq_type (memreq_type),
    .memreq_addr (memreq_addr), .memreq_data (memreq_data),
    .memresp_data (memresp_data), .inst_done (inst_done)
  );

  tinyrv1_comb_mem #(.WORDS(MEM_WORDS)) u_mem (
    .clk (clk), .memreq_val (memreq_val), .memreq_type (memreq_type),
    .memreq_addr (memreq_addr), .memreq_data (memreq_data),
    .memresp_data (memresp_data)
  );

endmodule
