// isc_alu: the ISC arithmetic-logic unit.
//
// Purely combinational. It takes the two operand registers ALU_in[0] (a) and
// ALU_in[1] (b) and the function code from the control sequencer, and gives a
// result word and a test bit. The arithmetic functions are the ISC's add, sub,
// mul, div, and, or, comp, shr and shl; the comparisons eq, ne, lt, gt, lte
// and gte exist for the conditional jumps and only set the test bit, which the
// sequencer reads (through ALU_out) to decide a jump.
//
// This design's choices, where the ISC leaves the point open: words are
// two's-complement signed for mul, div and the comparisons; comp is the
// bitwise complement of a; shl and shr shift a by one place (shr is logical);
// division truncates toward zero, a division by zero gives 0 and the one
// overflowing quotient (most negative number / -1) wraps to the dividend. The test bit
// is 0 for every non-comparison function.
module isc_alu
  import isc_pkg::*;
#(
  parameter int WIDTH = WORD_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_fn_e          fn,
  output logic [WIDTH-1:0] result,
  output logic             test
);

  localparam logic [WIDTH-1:0] MIN_INT = {1'b1, {(WIDTH-1){1'b0}}};

  logic signed [WIDTH-1:0] sa, sb;
  assign sa = $signed(a);
  assign sb = $signed(b);

  always_comb begin
    result = '0;
    test   = 1'b0;
    unique case (fn)
      ALU_ADD:  result = a + b;
      ALU_SUB:  result = a - b;
      ALU_MUL:  result = WIDTH'(sa * sb);
      ALU_DIV: begin
        if (b == '0)                          result = '0;
        else if (a == MIN_INT && sb == -1)    result = a;   // overflow wraps
        else                                  result = WIDTH'(sa / sb);
      end
      ALU_AND:  result = a & b;
      ALU_OR:   result = a | b;
      ALU_COMP: result = ~a;
      ALU_SHR:  result = a >> 1;
      ALU_SHL:  result = a << 1;
      ALU_EQ:   test = (a == b);
      ALU_NE:   test = (a != b);
      ALU_LT:   test = (sa <  sb);
      ALU_GT:   test = (sa >  sb);
      ALU_LTE:  test = (sa <= sb);
      ALU_GTE:  test = (sa >= sb);
      default:  result = '0;
    endcase
  end

endmodule
