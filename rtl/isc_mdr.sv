// isc_mdr: the ISC Memory Data Register.
//
// Holds a word on its way between the internal bus and the memory data bus.
// `ld_mem` captures the memory's read data at the end of a read cycle;
// `ld_bus` captures the internal bus (the word a store will write). If both
// are set, the memory wins. `q` feeds both the internal bus (through its
// enable) and the memory's write data. The two paths are the ISC's; the
// split of the bidirectional data bus into separate read and write wires,
// the priority and the reset to 0 are this design's choices.
module isc_mdr #(
  parameter int WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ld_bus,
  input  logic             ld_mem,
  input  logic [WIDTH-1:0] bus_d,
  input  logic [WIDTH-1:0] mem_d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)      q <= '0;
    else if (ld_mem) q <= mem_d;
    else if (ld_bus) q <= bus_d;
  end

endmodule
