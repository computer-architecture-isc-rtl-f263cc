// tb_isc_top: end-to-end test of the ISC computer at its default size.
//
// Loads three programs in turn through the host port (an instruction test
// that touches every instruction, the array summation and a recursive
// factorial of 4), runs each until it reaches its final jump-to-self, and at
// every instruction boundary compares the instruction pointer and all 32
// general registers with the instruction-level reference model isc_ref. It
// also checks the length of every instruction in clock cycles (3 fetch
// cycles plus the instruction's own steps), the memory contents after each
// run, and the results the programs are known to produce (sum 25, factorial
// 24, and the intermediate sums 14 and 16 of the worked example). Every
// opcode, a taken and a not-taken conditional jump, a memory read, a memory
// write and a subroutine call must occur at least once.
module tb_isc_top;
  import isc_pkg::*;
  import isc_asm_pkg::*;
  import isc_ref_pkg::*;

  localparam int AW = 16;   // the top's default memory size

  logic          clk = 0, rst_n = 0, host_we = 0, fetch;
  logic [AW-1:0] host_addr = 0;
  word_t         host_wdata = 0, host_rdata, ip, dbg_data;
  reg_idx_t      dbg_idx = 0;

  isc_top dut (.clk, .rst_n, .host_we, .host_addr, .host_wdata, .host_rdata,
               .fetch, .ip, .dbg_idx, .dbg_data);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int op_count [32];
  int n_taken = 0, n_not_taken = 0;
  longint cycle = 0;
  // Register snapshots (count, sum, value) each time the array-summation
  // loop head is fetched.
  logic [31:0] loop_snap [$][3];

  always @(posedge clk) cycle <= cycle + 1;

  task automatic expect_eq(logic [31:0] got, want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d (%h) want %0d (%h)", what,
                                  $signed(got), got, $signed(want), want);
    end
  endtask

  task automatic host_write(int unsigned a, logic [31:0] d);
    @(negedge clk);
    host_addr = AW'(a); host_wdata = d; host_we = 1;
    @(negedge clk);
    host_we = 0;
  endtask

  // Runs one program; returns the reference model's final state.
  task automatic run_program(program_t p, output isc_ref rm);
    isc_ref  m;
    longint  last_cycle;
    int      expect_cycles, n_instr;
    logic [31:0] w;
    m = new(AW);
    @(negedge clk);
    rst_n = 0;
    foreach (p.words[i]) begin
      host_write(i, p.words[i]);
      m.m[i] = p.words[i];
    end
    foreach (p.data[i]) begin
      host_write(p.data_addr + i, p.data[i]);
      m.m[p.data_addr + i] = p.data[i];
    end
    @(negedge clk);
    rst_n = 1;
    expect_cycles = -1;
    last_cycle = 0;
    n_instr = 0;
    // The first fetch cycle is the one in which reset is released.
    forever begin
      if (!fetch) begin
        @(negedge clk);
        continue;
      end
      if (expect_cycles >= 0)
        expect_eq(32'(cycle - last_cycle), expect_cycles,
                  $sformatf("%s: cycles of %h", p.name, w));
      last_cycle = cycle;
      expect_eq(ip, m.ip, $sformatf("%s: instruction pointer", p.name));
      for (int i = 0; i < 32; i++) begin
        dbg_idx = reg_idx_t'(i);
        #0.1;
        expect_eq(dbg_data, m.r[i], $sformatf("%s: r%0d after %0d instructions", p.name, i, n_instr));
      end
      if (p.name == "array summation" && m.ip == 6)
        loop_snap.push_back('{m.r[R_COUNT], m.r[R_SUM], m.r[R_VALUE]});
      if (m.halted || n_instr > 2000) break;
      w = m.rd(m.ip);
      expect_cycles = cycles_of(w);
      op_count[w[31:27]]++;
      m.step();
      if (w[31:27] >= 14 && w[31:27] <= 19) begin
        if (m.taken) n_taken++; else n_not_taken++;
      end
      n_instr++;
      @(negedge clk);
    end
    checks++;
    if (!m.halted) begin failures++; $display("FAIL %s did not finish", p.name); end
    // Memory after the run, read back through the host port.
    @(negedge clk);
    rst_n = 0;
    foreach (m.m[a]) begin
      host_addr = AW'(a);
      #1;
      expect_eq(host_rdata, m.m[a], $sformatf("%s: mem[%0d]", p.name, a));
    end
    $display("%s: %0d instructions", p.name, n_instr);
    rm = m;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    isc_ref m;
    foreach (op_count[i]) op_count[i] = 0;
    repeat (2) @(posedge clk);

    run_program(isa_test(), m);

    run_program(array_sum(), m);
    expect_eq(m.r[R_SUM], 25, "array sum");
    expect_eq(m.r[R_COUNT], 0, "array count at end");
    expect_eq(m.r[R_VALUE], 9, "last value loaded");
    // The register states shown at the loop head in the worked example:
    // count 2 / sum 14 / value 6, count 1 / sum 16 / value 2, and
    // count 0 / sum 25 / value 9.
    checks++;
    if (loop_snap.size() != 6) begin failures++; $display("FAIL loop head reached %0d times", loop_snap.size()); end
    else begin
      expect_eq(loop_snap[3][0], 2,  "count at 4th loop head");
      expect_eq(loop_snap[3][1], 14, "sum at 4th loop head");
      expect_eq(loop_snap[3][2], 6,  "value at 4th loop head");
      expect_eq(loop_snap[4][0], 1,  "count at 5th loop head");
      expect_eq(loop_snap[4][1], 16, "sum at 5th loop head");
      expect_eq(loop_snap[4][2], 2,  "value at 5th loop head");
      expect_eq(loop_snap[5][1], 25, "sum at last loop head");
    end

    run_program(factorial(4), m);
    expect_eq(m.r[R_RESULT], 24, "factorial(4)");
    expect_eq(m.r[R_SP], 199, "stack pointer back at empty");

    // Every mechanism must have occurred.
    for (int op = 0; op <= 21; op++) begin
      checks++;
      if (op_count[op] == 0) begin failures++; $display("FAIL opcode %0d never ran", op); end
    end
    checks++; if (n_taken == 0)     begin failures++; $display("FAIL no taken jump"); end
    checks++; if (n_not_taken == 0) begin failures++; $display("FAIL no untaken jump"); end
    $display("coverage: conditional jumps taken %0d, not taken %0d; loads %0d, stores %0d, jsub %0d",
             n_taken, n_not_taken, op_count[11], op_count[12], op_count[21]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
