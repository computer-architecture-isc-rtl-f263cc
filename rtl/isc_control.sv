// isc_control: the ISC control sequencer.
//
// A finite-state machine that, every cycle, sends one control word (bus
// enables and register strobes, see isc_pkg::ctrl_t) to the datapath. Each
// instruction starts with the fetch sequence common to all instructions:
//
//   F1  enable IP onto the bus, load MAR
//   F2  read memory into MDR
//   F3  enable MDR onto the bus, load IR; at the same time increment IP (3')
//
// and then branches on the opcode in IR to that instruction's subsequence,
// one step per cycle (EX0..EX3), returning to F1 after its last step:
//
//   add..shl  Rb->ALU_in[0]; Rc->ALU_in[1]; ALU function->ALU_out; ALU_out->Ra
//   aim       Ra->ALU_in[0]; C->ALU_in[1];  add->ALU_out;          ALU_out->Ra
//   lim       C->Ra
//   copy      Rb->Ra
//   load      Rb->MAR; read memory->MDR; MDR->Ra
//   store     Ra->MAR; Rb->MDR; write memory
//   jeq..jgte Rb->ALU_in[0]; Rc->ALU_in[1]; compare->ALU_out test bit;
//             if the test bit is set, Ra->IP
//   junc      Ra->IP
//   jsub      IP->Rb; Ra->IP
//
// The fetch sequence and the add subsequence are the ISC's published ones;
// the other subsequences are this design's, built from the same register
// transfers. So an add takes 3 + 4 = 7 cycles, lim/copy/junc 4, load/store 6,
// jsub 5 and a conditional jump 7. Other details of this design's own: an
// unused opcode does nothing for one step; in jsub Rb is written before Ra is
// read, so jsub with Ra = Rb falls through to the next instruction; the
// machine starts at F1 after the active-low synchronous reset.
//
// `fetch` is high in F1, i.e. on the first cycle of every instruction.
module isc_control
  import isc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  word_t  ir,          // Instruction Register contents
  input  logic   alu_test,    // ALU test bit held in ALU_out
  output ctrl_t  ctrl,
  output logic   fetch
);

  typedef enum logic [1:0] {S_F1, S_F2, S_F3, S_EX} state_e;

  state_e     state, state_n;
  logic [1:0] step, step_n;
  logic       last;           // current EX step is the instruction's last
  instr_t     in;

  assign in    = instr_t'(ir);
  assign fetch = (state == S_F1);

  function automatic alu_fn_e alu_fn_of(opcode_e op);
    case (op)
      OP_ADD:  return ALU_ADD;
      OP_SUB:  return ALU_SUB;
      OP_MUL:  return ALU_MUL;
      OP_DIV:  return ALU_DIV;
      OP_AND:  return ALU_AND;
      OP_OR:   return ALU_OR;
      OP_COMP: return ALU_COMP;
      OP_SHR:  return ALU_SHR;
      OP_SHL:  return ALU_SHL;
      OP_JEQ:  return ALU_EQ;
      OP_JNE:  return ALU_NE;
      OP_JLT:  return ALU_LT;
      OP_JGT:  return ALU_GT;
      OP_JLTE: return ALU_LTE;
      OP_JGTE: return ALU_GTE;
      default: return ALU_ADD;
    endcase
  endfunction

  // Control word of the current state.
  always_comb begin
    ctrl = CTRL_IDLE;
    last = 1'b0;
    case (state)
      S_F1: begin
        ctrl.oe[SRC_IP] = 1'b1;
        ctrl.mar_ld     = 1'b1;
      end
      S_F2: begin
        ctrl.mem_rd     = 1'b1;
        ctrl.mdr_ld_mem = 1'b1;
      end
      S_F3: begin
        ctrl.oe[SRC_MDR] = 1'b1;
        ctrl.ir_ld       = 1'b1;
        ctrl.ip_inc      = 1'b1;
      end
      S_EX: begin
        unique case (in.op)
          OP_ADD, OP_SUB, OP_MUL, OP_DIV, OP_AND, OP_OR,
          OP_COMP, OP_SHR, OP_SHL, OP_AIM: begin
            case (step)
              2'd0: begin
                ctrl.oe[SRC_RF] = 1'b1;
                ctrl.rf_rd_sel  = (in.op == OP_AIM) ? SEL_RA : SEL_RB;
                ctrl.alu_in0_ld = 1'b1;
              end
              2'd1: begin
                if (in.op == OP_AIM) begin
                  ctrl.oe[SRC_IMM] = 1'b1;
                end else begin
                  ctrl.oe[SRC_RF] = 1'b1;
                  ctrl.rf_rd_sel  = SEL_RC;
                end
                ctrl.alu_in1_ld = 1'b1;
              end
              2'd2: begin
                ctrl.alu_fn     = alu_fn_of(in.op);
                ctrl.alu_out_ld = 1'b1;
              end
              default: begin
                ctrl.oe[SRC_ALU] = 1'b1;
                ctrl.rf_wr_sel   = SEL_RA;
                ctrl.rf_ld       = 1'b1;
                last             = 1'b1;
              end
            endcase
          end
          OP_JEQ, OP_JNE, OP_JLT, OP_JGT, OP_JLTE, OP_JGTE: begin
            case (step)
              2'd0: begin
                ctrl.oe[SRC_RF] = 1'b1;
                ctrl.rf_rd_sel  = SEL_RB;
                ctrl.alu_in0_ld = 1'b1;
              end
              2'd1: begin
                ctrl.oe[SRC_RF] = 1'b1;
                ctrl.rf_rd_sel  = SEL_RC;
                ctrl.alu_in1_ld = 1'b1;
              end
              2'd2: begin
                ctrl.alu_fn     = alu_fn_of(in.op);
                ctrl.alu_out_ld = 1'b1;
              end
              default: begin
                ctrl.oe[SRC_RF] = alu_test;
                ctrl.rf_rd_sel  = SEL_RA;
                ctrl.ip_ld      = alu_test;
                last            = 1'b1;
              end
            endcase
          end
          OP_LIM: begin
            ctrl.oe[SRC_IMM] = 1'b1;
            ctrl.rf_wr_sel   = SEL_RA;
            ctrl.rf_ld       = 1'b1;
            last             = 1'b1;
          end
          OP_COPY: begin
            ctrl.oe[SRC_RF] = 1'b1;
            ctrl.rf_rd_sel  = SEL_RB;
            ctrl.rf_wr_sel  = SEL_RA;
            ctrl.rf_ld      = 1'b1;
            last            = 1'b1;
          end
          OP_LOAD: begin
            case (step)
              2'd0: begin
                ctrl.oe[SRC_RF] = 1'b1;
                ctrl.rf_rd_sel  = SEL_RB;
                ctrl.mar_ld     = 1'b1;
              end
              2'd1: begin
                ctrl.mem_rd     = 1'b1;
                ctrl.mdr_ld_mem = 1'b1;
              end
              default: begin
                ctrl.oe[SRC_MDR] = 1'b1;
                ctrl.rf_wr_sel   = SEL_RA;
                ctrl.rf_ld       = 1'b1;
                last             = 1'b1;
              end
            endcase
          end
          OP_STORE: begin
            case (step)
              2'd0: begin
                ctrl.oe[SRC_RF] = 1'b1;
                ctrl.rf_rd_sel  = SEL_RA;
                ctrl.mar_ld     = 1'b1;
              end
              2'd1: begin
                ctrl.oe[SRC_RF] = 1'b1;
                ctrl.rf_rd_sel  = SEL_RB;
                ctrl.mdr_ld_bus = 1'b1;
              end
              default: begin
                ctrl.mem_wr = 1'b1;
                last        = 1'b1;
              end
            endcase
          end
          OP_JUNC: begin
            ctrl.oe[SRC_RF] = 1'b1;
            ctrl.rf_rd_sel  = SEL_RA;
            ctrl.ip_ld      = 1'b1;
            last            = 1'b1;
          end
          OP_JSUB: begin
            if (step == 2'd0) begin
              ctrl.oe[SRC_IP] = 1'b1;
              ctrl.rf_wr_sel  = SEL_RB;
              ctrl.rf_ld      = 1'b1;
            end else begin
              ctrl.oe[SRC_RF] = 1'b1;
              ctrl.rf_rd_sel  = SEL_RA;
              ctrl.ip_ld      = 1'b1;
              last            = 1'b1;
            end
          end
          default: last = 1'b1;
        endcase
      end
      default: ;
    endcase
  end

  // Sequencing.
  always_comb begin
    state_n = state;
    step_n  = step;
    case (state)
      S_F1: state_n = S_F2;
      S_F2: state_n = S_F3;
      S_F3: begin
        state_n = S_EX;
        step_n  = 2'd0;
      end
      default: begin
        if (last) state_n = S_F1;
        else      step_n  = step + 2'd1;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_F1;
      step  <= 2'd0;
    end else begin
      state <= state_n;
      step  <= step_n;
    end
  end

endmodule
