// tb_isc_alu: self-checking test of the ISC ALU.
//
// Drives every function with directed corner cases and random operands and
// compares result and test bit with a reference model written here with
// 64-bit arithmetic. Prints TB_RESULT and finishes; a watchdog ends a hung run.
module tb_isc_alu;
  import isc_pkg::*;

  logic [31:0] a, b, result;
  alu_fn_e     fn;
  logic        test;
  int checks = 0, failures = 0;

  isc_alu dut (.a, .b, .fn, .result, .test);

  function automatic void model(input logic [31:0] x, y, input int f,
                                output logic [31:0] r, output logic t);
    longint sx, sy;
    sx = longint'($signed(x));
    sy = longint'($signed(y));
    r = 0; t = 0;
    case (f)
      0:  r = 32'(sx + sy);
      1:  r = 32'(sx - sy);
      2:  r = 32'(sx * sy);
      3:  r = (sy == 0) ? 32'd0 : 32'(sx / sy);
      4:  r = x & y;
      5:  r = x | y;
      6:  r = x ^ 32'hFFFF_FFFF;
      7:  r = {1'b0, x[31:1]};
      8:  r = {x[30:0], 1'b0};
      9:  t = (sx == sy);
      10: t = (sx != sy);
      11: t = (sx <  sy);
      12: t = (sx >  sy);
      13: t = (sx <= sy);
      14: t = (sx >= sy);
      default: ;
    endcase
  endfunction

  task automatic check(input logic [31:0] x, y, input int f);
    logic [31:0] er; logic et;
    a = x; b = y; fn = alu_fn_e'(f);
    #1;
    model(x, y, f, er, et);
    checks++;
    if (result !== er || test !== et) begin
      failures++;
      $display("FAIL fn=%0d a=%0d b=%0d got %0d/%0b want %0d/%0b",
               f, $signed(x), $signed(y), $signed(result), test, $signed(er), et);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corner [6] = '{32'd0, 32'd1, 32'hFFFF_FFFF, 32'd7, 32'h8000_0000, 32'd25};
    for (int f = 0; f <= 14; f++)
      foreach (corner[i]) foreach (corner[j]) check(corner[i], corner[j], f);
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] x, y;
      x = $urandom; y = $urandom;
      if (n % 4 == 0) y = x;
      if (n % 8 == 1) y = $urandom_range(0, 9);
      check(x, y, $urandom_range(0, 14));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
