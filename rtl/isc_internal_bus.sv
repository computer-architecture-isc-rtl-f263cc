// isc_internal_bus: the single internal bus of the ISC processor.
//
// In the ISC every register that can drive the bus does so through a 3-state
// buffer whose enable is a strobe from the control sequencer. Here the
// buffers are modelled as an AND-OR multiplexer: each source's word is gated
// by its enable and the gated words are ORed, so the bus is 0 when nothing
// drives it. At most one enable may be set in a cycle; an assertion checks
// that rule on every rising clock edge outside reset. The one-bus structure
// is the ISC's; the multiplexer form and the idle value are this design's.
module isc_internal_bus #(
  parameter int WIDTH = 32,
  parameter int N_SRC = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_SRC-1:0] oe,
  input  logic [WIDTH-1:0] src [N_SRC],
  output logic [WIDTH-1:0] bus
);

  always_comb begin
    bus = '0;
    for (int i = 0; i < N_SRC; i++) bus |= src[i] & {WIDTH{oe[i]}};
  end

  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(oe))
    else $error("internal bus driven by more than one source: oe=%b", oe);

endmodule
