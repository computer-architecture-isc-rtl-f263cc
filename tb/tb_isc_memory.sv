// tb_isc_memory: self-checking test of the main memory.
//
// Writes random words at random addresses, keeping a shadow copy, and checks
// that each read returns the last word written there, in the same cycle.
// Uses a 1K-word memory to keep the run short.
module tb_isc_memory;
  localparam int AW = 10;
  logic clk = 0, we = 0;
  logic [AW-1:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] shadow [2**AW];
  bit          valid  [2**AW];
  int checks = 0, failures = 0;

  isc_memory #(.AW(AW)) dut (.clk, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (valid[i]) valid[i] = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      addr  = AW'($urandom_range(0, 63));
      we    = ($urandom_range(0, 1) == 1);
      wdata = $urandom;
      #1;
      if (valid[addr]) begin
        checks++;
        if (rdata !== shadow[addr]) begin
          failures++;
          $display("FAIL addr=%0d got %h want %h", addr, rdata, shadow[addr]);
        end
      end
      @(posedge clk);
      if (we) begin shadow[addr] = wdata; valid[addr] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
