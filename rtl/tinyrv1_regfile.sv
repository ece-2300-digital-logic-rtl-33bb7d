// Single-port register file.
//
// NREGS registers of XLEN bits behind one read/write port, as required when
// multi-ported arrays are too expensive. The port's address comes from the
// rf_addr_sel mux in the datapath (x0, rs1, rs2 or rd of IR). Reads are
// combinational (rdata follows addr in the same cycle); a write takes
// wdata at the rising clock edge when wen is set. Register 0 always reads
// as zero and ignores writes, which lets the datapath clear a register by
// reading x0.
//
// The single port follows the design; the register count (32) and the
// hard-wired zero register are the RISC-V convention. Registers are not
// reset.
module tinyrv1_regfile #(
  parameter int unsigned XLEN  = 32,
  parameter int unsigned NREGS = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic            clk,
  input  logic [AW-1:0]   addr,
  input  logic            wen,
  input  logic [XLEN-1:0] wdata,
  output logic [XLEN-1:0] rdata
);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (wen && addr != '0)
      regs[addr] <= wdata;
  end

  assign rdata = (addr == '0) ? '0 : regs[addr];

endmodule
