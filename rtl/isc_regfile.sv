// isc_regfile: the ISC general registers R0..R31.
//
// NREGS registers of WIDTH bits. The register addressed by `rd_idx` is always
// read onto `rdata`, which the datapath gates onto the internal bus when the
// sequencer enables it; on a rising clock edge with `ld` set, register[wr_idx]
// takes `wdata` from the bus. Separate read and write indices let one bus
// cycle move a register into another (copy). Reading and writing the same
// register in one cycle gives the old value on `rdata`, the new one from the
// next cycle on.
// All registers are ordinary: R0 is not wired to zero.
//
// The 32 registers and the single bus connection follow the ISC structure.
// Resetting every register to 0 (active-low synchronous `rst_n`) and the
// second read port `dbg_idx`/`dbg_data`, which lets a host observe a register
// without disturbing the machine, are this design's own.
module isc_regfile
  import isc_pkg::*;
#(
  parameter int WIDTH = WORD_W,
  parameter int N     = NREGS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] rd_idx,
  input  logic [$clog2(N)-1:0] wr_idx,
  input  logic                 ld,
  input  logic [WIDTH-1:0]     wdata,
  output logic [WIDTH-1:0]     rdata,
  input  logic [$clog2(N)-1:0] dbg_idx,
  output logic [WIDTH-1:0]     dbg_data
);

  logic [WIDTH-1:0] regs [N];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else if (ld) begin
      regs[wr_idx] <= wdata;
    end
  end

  assign rdata    = regs[rd_idx];
  assign dbg_data = regs[dbg_idx];

endmodule
