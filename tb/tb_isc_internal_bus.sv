// tb_isc_internal_bus: self-checking test of the internal bus.
//
// With no source enabled the bus must read 0; with exactly one enabled it
// must carry that source's word, whatever the others hold.
module tb_isc_internal_bus;
  logic clk = 0, rst_n = 0;
  logic [4:0]  oe = 0;
  logic [31:0] src [5];
  logic [31:0] bus;
  int checks = 0, failures = 0;

  isc_internal_bus dut (.clk, .rst_n, .oe, .src, .bus);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (src[i]) src[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int sel;
      @(negedge clk);
      foreach (src[i]) src[i] = $urandom;
      sel = $urandom_range(0, 5);
      oe = (sel == 5) ? 5'b0 : 5'(1 << sel);
      #1;
      checks++;
      if (bus !== ((sel == 5) ? 32'd0 : src[sel])) begin
        failures++;
        $display("FAIL sel=%0d bus=%h", sel, bus);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
