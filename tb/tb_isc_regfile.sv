// tb_isc_regfile: self-checking test of the 32 general registers.
//
// Checks reset to zero, random writes (to the read register or another) against a shadow array, that a write is
// seen on the read port only from the next cycle, and the debug read port.
module tb_isc_regfile;
  logic clk = 0, rst_n = 0, ld = 0;
  logic [4:0] idx = 0, wr_idx = 0, dbg_idx = 0;
  logic [31:0] wdata = 0, rdata, dbg_data;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  isc_regfile dut (.clk, .rst_n, .rd_idx(idx), .wr_idx, .ld, .wdata, .rdata, .dbg_idx, .dbg_data);

  always #5 clk = ~clk;

  task automatic expect_eq(logic [31:0] got, want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      shadow[i] = 0;
      idx = 5'(i); dbg_idx = 5'(31 - i); #1;
      expect_eq(rdata, 0, "reset value");
      expect_eq(dbg_data, 0, "reset value dbg");
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      idx = 5'($urandom); wr_idx = ($urandom_range(0, 1) == 1) ? idx : 5'($urandom); ld = ($urandom_range(0, 1) == 1); wdata = $urandom;
      dbg_idx = 5'($urandom);
      #1;
      expect_eq(rdata, shadow[idx], "read before write");
      expect_eq(dbg_data, shadow[dbg_idx], "debug read");
      @(posedge clk);
      if (ld) shadow[wr_idx] = wdata;
      #1;
      expect_eq(rdata, shadow[idx], "read after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
