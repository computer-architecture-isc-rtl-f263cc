// isc_ip: the ISC Instruction Pointer.
//
// Holds the address of the next instruction. On a rising clock edge, `ld`
// takes a jump target from the internal bus and `inc` (the sequencer's
// increment strobe, step 3' of instruction fetch) adds one; `ld` wins if both
// are set. `q` is what the IP drives onto the bus when enabled. Both strobes
// follow the ISC structure; reset to address 0 (active-low synchronous
// `rst_n`) and the priority of `ld` are this design's choices.
module isc_ip #(
  parameter int WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ld,
  input  logic             inc,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)   q <= '0;
    else if (ld)  q <= d;
    else if (inc) q <= q + WIDTH'(1);
  end

endmodule
