// isc_bus_reg: a register strobed from the ISC internal bus.
//
// On a rising clock edge with `ld` set it takes `d`; otherwise it holds. It
// resets to 0 (active-low synchronous `rst_n`). The processor uses it for the
// Memory Address Register, the Instruction Register, the two ALU operand
// registers ALU_in[0] and ALU_in[1], and ALU_out (one bit wider there, to
// hold the ALU test bit next to the result). Those registers and their
// strobes are the ISC's; the reset value is this design's choice.
module isc_bus_reg #(
  parameter int WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ld,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= '0;
    else if (ld) q <= d;
  end

endmodule
