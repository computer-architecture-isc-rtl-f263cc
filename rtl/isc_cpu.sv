// isc_cpu: the ISC processor.
//
// All registers meet on one internal bus. The sources that can drive it are
// the Instruction Pointer, the Memory Data Register, the general register
// selected by the sequencer, the constant field C of the Instruction Register
// (sign-extended) and ALU_out; the receivers are MAR, MDR, IP, IR, the general
// registers and the two ALU operand registers ALU_in[0] and ALU_in[1]. The
// ALU computes from ALU_in[0]/ALU_in[1] into ALU_out, whose extra test bit
// goes back to the control sequencer to decide conditional jumps. The control
// sequencer (isc_control) reads IR and drives every enable and strobe.
//
// Memory interface: `mem_addr` is the MAR; in a cycle with `mem_rd` the MDR
// captures `mem_rdata` at the clock edge; in a cycle with `mem_wr` the memory
// should store `mem_wdata` (the MDR) at `mem_addr` on the clock edge.
// `fetch` marks the first cycle of each instruction, and `ip` shows the
// instruction pointer. `dbg_idx`/`dbg_data` read a general register without
// disturbing the machine (this design's addition, for observation).
//
// The structure is the ISC's. Word width, reset (active-low, synchronous,
// all registers to 0, start at address 0) and the split of the bidirectional
// data bus into read and write wires are this design's choices.
module isc_cpu
  import isc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  output word_t    mem_addr,
  output logic     mem_rd,
  output logic     mem_wr,
  output word_t    mem_wdata,
  input  word_t    mem_rdata,
  output logic     fetch,
  output word_t    ip,
  input  reg_idx_t dbg_idx,
  output word_t    dbg_data
);

  ctrl_t  ctrl;
  word_t  bus;
  word_t  ir, mdr, rf_rdata, alu_a, alu_b, alu_res;
  logic   alu_test_c;
  logic [WORD_W:0] alu_out;       // {test bit, result}
  reg_idx_t rf_rd_idx, rf_wr_idx;
  instr_t   in;
  word_t    bus_src [N_BUS_SRC];

  assign in = instr_t'(ir);

  function automatic reg_idx_t field(reg_sel_e sel, instr_t i);
    case (sel)
      SEL_RA:  return i.ra;
      SEL_RB:  return i.rb;
      default: return i.rc;
    endcase
  endfunction

  assign rf_rd_idx = field(ctrl.rf_rd_sel, in);
  assign rf_wr_idx = field(ctrl.rf_wr_sel, in);

  assign bus_src[SRC_IP]  = ip;
  assign bus_src[SRC_MDR] = mdr;
  assign bus_src[SRC_RF]  = rf_rdata;
  assign bus_src[SRC_IMM] = imm_of(ir);
  assign bus_src[SRC_ALU] = alu_out[WORD_W-1:0];

  isc_internal_bus #(.WIDTH(WORD_W), .N_SRC(N_BUS_SRC)) u_bus (
    .clk, .rst_n, .oe(ctrl.oe), .src(bus_src), .bus
  );

  isc_control u_ctrl (
    .clk, .rst_n, .ir, .alu_test(alu_out[WORD_W]), .ctrl, .fetch
  );

  isc_ip #(.WIDTH(WORD_W)) u_ip (
    .clk, .rst_n, .ld(ctrl.ip_ld), .inc(ctrl.ip_inc), .d(bus), .q(ip)
  );

  isc_bus_reg #(.WIDTH(WORD_W)) u_ir (
    .clk, .rst_n, .ld(ctrl.ir_ld), .d(bus), .q(ir)
  );

  isc_bus_reg #(.WIDTH(WORD_W)) u_mar (
    .clk, .rst_n, .ld(ctrl.mar_ld), .d(bus), .q(mem_addr)
  );

  isc_mdr #(.WIDTH(WORD_W)) u_mdr (
    .clk, .rst_n, .ld_bus(ctrl.mdr_ld_bus), .ld_mem(ctrl.mdr_ld_mem),
    .bus_d(bus), .mem_d(mem_rdata), .q(mdr)
  );

  isc_regfile #(.WIDTH(WORD_W), .N(NREGS)) u_regs (
    .clk, .rst_n, .rd_idx(rf_rd_idx), .wr_idx(rf_wr_idx), .ld(ctrl.rf_ld), .wdata(bus), .rdata(rf_rdata),
    .dbg_idx, .dbg_data
  );

  isc_bus_reg #(.WIDTH(WORD_W)) u_alu_in0 (
    .clk, .rst_n, .ld(ctrl.alu_in0_ld), .d(bus), .q(alu_a)
  );

  isc_bus_reg #(.WIDTH(WORD_W)) u_alu_in1 (
    .clk, .rst_n, .ld(ctrl.alu_in1_ld), .d(bus), .q(alu_b)
  );

  isc_alu #(.WIDTH(WORD_W)) u_alu (
    .a(alu_a), .b(alu_b), .fn(ctrl.alu_fn), .result(alu_res), .test(alu_test_c)
  );

  isc_bus_reg #(.WIDTH(WORD_W + 1)) u_alu_out (
    .clk, .rst_n, .ld(ctrl.alu_out_ld), .d({alu_test_c, alu_res}), .q(alu_out)
  );

  assign mem_rd    = ctrl.mem_rd;
  assign mem_wr    = ctrl.mem_wr;
  assign mem_wdata = mdr;

endmodule
