// tb_isc_bus_reg: self-checking test of the bus-loadable register.
//
// Checks reset to zero, that the register takes its input only on a clock
// edge with load set, and holds otherwise.
module tb_isc_bus_reg;
  logic clk = 0, rst_n = 0, ld = 0;
  logic [32:0] d = 0, q, model = 0;
  int checks = 0, failures = 0;

  isc_bus_reg #(.WIDTH(33)) dut (.clk, .rst_n, .ld, .d, .q);

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
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ld = ($urandom_range(0, 2) == 0);
      d  = {$urandom_range(0, 1) == 1, 32'($urandom)};
      @(posedge clk);
      if (ld) model = d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL q=%h want %h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
