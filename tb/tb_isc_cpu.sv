// tb_isc_cpu: test of the ISC processor on its own, against a memory model
// held in the testbench (a word array with combinational read and clocked
// write, as the processor's memory interface expects).
//
// Runs the instruction test and a recursive factorial of 5, comparing the
// instruction pointer and all 32 registers with the reference model isc_ref
// at every instruction boundary, the cycle count of every instruction, and
// the memory after each run. It also checks that the processor never reads
// and writes memory in the same cycle.
module tb_isc_cpu;
  import isc_pkg::*;
  import isc_asm_pkg::*;
  import isc_ref_pkg::*;

  localparam int AW = 12;

  logic          clk = 0, rst_n = 0, fetch, mem_rd, mem_wr;
  word_t         mem_addr, mem_wdata, mem_rdata, ip, dbg_data;
  reg_idx_t      dbg_idx = 0;
  word_t         mem [2**AW];

  isc_cpu dut (.clk, .rst_n, .mem_addr, .mem_rd, .mem_wr, .mem_wdata, .mem_rdata,
               .fetch, .ip, .dbg_idx, .dbg_data);

  assign mem_rdata = mem[mem_addr[AW-1:0]];
  always @(posedge clk) if (rst_n && mem_wr) mem[mem_addr[AW-1:0]] <= mem_wdata;
  always @(negedge clk) if (rst_n && mem_rd && mem_wr) begin
    failures++;
    $display("FAIL read and write in one cycle");
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int op_count [32];
  int n_taken = 0, n_not_taken = 0;
  longint cycle = 0;

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
    mem[AW'(a)] = d;
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
    foreach (m.m[a]) expect_eq(mem[AW'(a)], m.m[a], $sformatf("%s: mem[%0d]", p.name, a));
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

    run_program(factorial(5), m);
    expect_eq(m.r[R_RESULT], 120, "factorial(5)");

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
