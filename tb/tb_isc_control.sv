// tb_isc_control: self-checking test of the control sequencer.
//
// Plays the part of the datapath: it loads the instruction register itself
// when the sequencer strobes ir_ld and drives the ALU test bit. For every
// opcode it checks the three fetch steps, the length of the instruction in
// cycles, and the strobes that do the instruction's work (the full four-step
// add subsequence, register writes, memory strobes, jumps taken or not).
module tb_isc_control;
  import isc_pkg::*;
  import isc_asm_pkg::*;

  logic  clk = 0, rst_n = 0, alu_test = 0, fetch;
  word_t ir = 0;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  isc_control dut (.clk, .rst_n, .ir, .alu_test, .ctrl, .fetch);

  always #5 clk = ~clk;

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (ir=%h)", what, ir);
    end
  endtask

  // Counts of strobes over one instruction's execute steps.
  int n_rf_ld, n_ip_ld, n_mem_rd, n_mem_wr, n_mar, n_mdr_bus, n_alu_out;

  // Runs one instruction through the sequencer and returns its cycle count.
  task automatic run(input word_t w, input bit test, output int cycles);
    n_rf_ld = 0; n_ip_ld = 0; n_mem_rd = 0; n_mem_wr = 0; n_mar = 0;
    n_mdr_bus = 0; n_alu_out = 0;
    // Called at the falling edge inside F1.
    expect_true(fetch, "F1: fetch marker");
    expect_true(ctrl.oe == 5'(1 << SRC_IP) && ctrl.mar_ld, "F1: IP onto bus, load MAR");
    @(negedge clk);
    expect_true(ctrl.mem_rd && ctrl.mdr_ld_mem && ctrl.oe == 0, "F2: read memory");
    @(negedge clk);
    expect_true(ctrl.oe == 5'(1 << SRC_MDR) && ctrl.ir_ld && ctrl.ip_inc, "F3: MDR to IR, increment IP");
    @(posedge clk);
    ir = w;
    alu_test = test;
    cycles = 3;
    forever begin
      @(negedge clk);
      if (fetch) break;
      cycles++;
      checks++;
      if (!$onehot0(ctrl.oe)) begin failures++; $display("FAIL two bus drivers"); end
      if (ctrl.ir_ld || ctrl.ip_inc) begin failures++; $display("FAIL fetch strobe in execute"); end
      n_rf_ld   += int'(ctrl.rf_ld);
      n_ip_ld   += int'(ctrl.ip_ld);
      n_mem_rd  += int'(ctrl.mem_rd);
      n_mem_wr  += int'(ctrl.mem_wr);
      n_mar     += int'(ctrl.mar_ld);
      n_mdr_bus += int'(ctrl.mdr_ld_bus);
      n_alu_out += int'(ctrl.alu_out_ld);
      if (cycles > 20) break;
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    word_t w;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // The add subsequence, step by step.
    @(negedge clk); @(negedge clk); @(negedge clk);
    @(posedge clk) ir = a_add(3, 4, 5);
    @(negedge clk);
    expect_true(ctrl.oe == 5'(1 << SRC_RF) && ctrl.rf_rd_sel == SEL_RB && ctrl.alu_in0_ld, "add 1: Rb -> ALU_in[0]");
    @(negedge clk);
    expect_true(ctrl.oe == 5'(1 << SRC_RF) && ctrl.rf_rd_sel == SEL_RC && ctrl.alu_in1_ld, "add 2: Rc -> ALU_in[1]");
    @(negedge clk);
    expect_true(ctrl.alu_fn == ALU_ADD && ctrl.alu_out_ld && ctrl.oe == 0, "add 3: add function");
    @(negedge clk);
    expect_true(ctrl.oe == 5'(1 << SRC_ALU) && ctrl.rf_wr_sel == SEL_RA && ctrl.rf_ld, "add 4: ALU_out -> Ra");
    @(negedge clk);
    expect_true(fetch, "add returns to fetch after 4 steps");

    // Every opcode: length and the strobes that matter.
    for (int op = 0; op <= 21; op++) begin
      for (int t = 0; t < 2; t++) begin
        w = r3(op, 1, 2, 3);
        run(w, t[0], cyc);
        checks++;
        if (cyc != cycles_of(w)) begin
          failures++;
          $display("FAIL op %0d took %0d cycles, want %0d", op, cyc, cycles_of(w));
        end
        case (op)
          0,1,2,3,4,5,6,7,8,10:
            expect_true(n_rf_ld == 1 && n_alu_out == 1 && n_ip_ld == 0, "ALU op writes Ra once");
          9, 13: expect_true(n_rf_ld == 1 && n_alu_out == 0, "lim/copy write Ra");
          11: expect_true(n_mar == 1 && n_mem_rd == 1 && n_rf_ld == 1 && n_mem_wr == 0, "load");
          12: expect_true(n_mar == 1 && n_mdr_bus == 1 && n_mem_wr == 1 && n_rf_ld == 0, "store");
          14,15,16,17,18,19:
            expect_true(n_ip_ld == int'(t) && n_alu_out == 1 && n_rf_ld == 0, "conditional jump follows test bit");
          20: expect_true(n_ip_ld == 1 && n_rf_ld == 0, "junc");
          21: expect_true(n_ip_ld == 1 && n_rf_ld == 1, "jsub");
          default: ;
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
