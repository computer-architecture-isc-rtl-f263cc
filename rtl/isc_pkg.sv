// isc_pkg: shared types and constants of the ISC (Incredibly Simple Computer).
//
// The ISC is a tutorial RISC with 32 general registers (R0..R31), one internal
// bus and a microsequenced controller. This package holds the word and
// register-index types, the opcode list, the ALU function codes and the
// control word that the sequencer sends to the datapath every cycle.
//
// The instruction set (add sub mul div and or comp shr shl, lim aim, load
// store, copy, jeq jne jlt jgt jlte jgte, junc jsub) and the 32 registers are
// the ISC's own. The 32-bit word and the bit layout of an instruction are this
// design's choice, since the ISC leaves them open:
//
//   [31:27] opcode   [26:22] Ra   [21:17] Rb   [16:12] Rc   [11:0] unused
//   lim/aim:         [26:22] Ra   [21:0]  C, a two's-complement constant
package isc_pkg;

  localparam int WORD_W = 32;
  localparam int NREGS  = 32;
  localparam int REG_AW = 5;
  localparam int IMM_W  = 22;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [REG_AW-1:0] reg_idx_t;

  typedef enum logic [4:0] {
    OP_ADD   = 5'd0,
    OP_SUB   = 5'd1,
    OP_MUL   = 5'd2,
    OP_DIV   = 5'd3,
    OP_AND   = 5'd4,
    OP_OR    = 5'd5,
    OP_COMP  = 5'd6,
    OP_SHR   = 5'd7,
    OP_SHL   = 5'd8,
    OP_LIM   = 5'd9,
    OP_AIM   = 5'd10,
    OP_LOAD  = 5'd11,
    OP_STORE = 5'd12,
    OP_COPY  = 5'd13,
    OP_JEQ   = 5'd14,
    OP_JNE   = 5'd15,
    OP_JLT   = 5'd16,
    OP_JGT   = 5'd17,
    OP_JLTE  = 5'd18,
    OP_JGTE  = 5'd19,
    OP_JUNC  = 5'd20,
    OP_JSUB  = 5'd21
  } opcode_e;

  typedef struct packed {
    opcode_e   op;
    reg_idx_t  ra;
    reg_idx_t  rb;
    reg_idx_t  rc;
    logic [11:0] unused;
  } instr_t;

  // ALU functions. The comparisons only set the test bit.
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_MUL  = 4'd2,
    ALU_DIV  = 4'd3,
    ALU_AND  = 4'd4,
    ALU_OR   = 4'd5,
    ALU_COMP = 4'd6,
    ALU_SHR  = 4'd7,
    ALU_SHL  = 4'd8,
    ALU_EQ   = 4'd9,
    ALU_NE   = 4'd10,
    ALU_LT   = 4'd11,
    ALU_GT   = 4'd12,
    ALU_LTE  = 4'd13,
    ALU_GTE  = 4'd14
  } alu_fn_e;

  // Sources that can be enabled onto the internal bus (3-state drivers).
  localparam int N_BUS_SRC = 5;
  localparam int SRC_IP  = 0;
  localparam int SRC_MDR = 1;
  localparam int SRC_RF  = 2;
  localparam int SRC_IMM = 3;
  localparam int SRC_ALU = 4;

  // Which instruction field addresses the register file.
  typedef enum logic [1:0] {
    SEL_RA = 2'd0,
    SEL_RB = 2'd1,
    SEL_RC = 2'd2
  } reg_sel_e;

  // One cycle's worth of strobes from the control sequencer.
  typedef struct packed {
    logic [N_BUS_SRC-1:0] oe;        // bus enables, at most one set
    reg_sel_e  rf_rd_sel;            // field of the register driven onto the bus
    reg_sel_e  rf_wr_sel;            // field of the register loaded from the bus
    logic      rf_ld;                // load register[rf_wr_sel] from the bus
    logic      mar_ld;
    logic      mdr_ld_bus;           // MDR <- internal bus
    logic      mdr_ld_mem;           // MDR <- memory data bus
    logic      ir_ld;
    logic      ip_ld;
    logic      ip_inc;
    logic      alu_in0_ld;
    logic      alu_in1_ld;
    logic      alu_out_ld;
    alu_fn_e   alu_fn;
    logic      mem_rd;
    logic      mem_wr;
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '{oe: '0, rf_rd_sel: SEL_RA, rf_wr_sel: SEL_RA, alu_fn: ALU_ADD, default: 1'b0};

  // Sign-extend the constant field C of lim/aim to a full word.
  function automatic word_t imm_of(word_t ir);
    return word_t'($signed(ir[IMM_W-1:0]));
  endfunction

endpackage
