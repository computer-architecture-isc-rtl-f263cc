// tb_isc_ip: self-checking test of the Instruction Pointer.
//
// Checks reset to address 0, increment, load of a jump target, and that a
// load takes priority over an increment in the same cycle.
module tb_isc_ip;
  logic clk = 0, rst_n = 0, ld = 0, inc = 0;
  logic [31:0] d = 0, q, model = 0;
  int checks = 0, failures = 0;

  isc_ip dut (.clk, .rst_n, .ld, .inc, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++; if (q !== 0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      ld  = ($urandom_range(0, 3) == 0);
      inc = ($urandom_range(0, 1) == 1);
      d   = (n % 50 == 7) ? 32'hFFFF_FFFF : $urandom;
      @(posedge clk);
      if (ld) model = d;
      else if (inc) model = model + 1;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL q=%h want %h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
