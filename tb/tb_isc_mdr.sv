// tb_isc_mdr: self-checking test of the Memory Data Register.
//
// Checks reset, loading from the memory data bus, loading from the internal
// bus, holding, and that the memory side wins when both loads are set.
module tb_isc_mdr;
  logic clk = 0, rst_n = 0, ld_bus = 0, ld_mem = 0;
  logic [31:0] bus_d = 0, mem_d = 0, q, model = 0;
  int checks = 0, failures = 0;

  isc_mdr dut (.clk, .rst_n, .ld_bus, .ld_mem, .bus_d, .mem_d, .q);

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
      ld_bus = ($urandom_range(0, 2) == 0);
      ld_mem = ($urandom_range(0, 2) == 0);
      bus_d = $urandom; mem_d = $urandom;
      @(posedge clk);
      if (ld_mem) model = mem_d;
      else if (ld_bus) model = bus_d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL q=%h want %h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
