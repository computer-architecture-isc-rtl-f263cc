// isc_memory: the ISC main memory, one array for program and data alike.
//
// 2**AW words of WIDTH bits. The address is the low AW bits of the address
// bus (higher bits are ignored, so the space wraps). Reads are combinational:
// `rdata` shows the addressed word in the same cycle, and the processor's MDR
// captures it at the end of its "read memory" step. A write stores `wdata`
// at the rising clock edge when `we` is set. The contents are not reset.
//
// The one undifferentiated array is the ISC's; its size (64K words), the
// single-cycle read and the word addressing are this design's choices.
module isc_memory #(
  parameter int WIDTH = 32,
  parameter int AW    = 16
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr,
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
