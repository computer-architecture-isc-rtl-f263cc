// isc_ref_pkg: an instruction-level reference model of the ISC and the test
// programs used by the processor and system testbenches.
//
// isc_ref executes one whole instruction per call of step(), straight from
// the instruction-set definitions (reg[Ra] = reg[Rb] + reg[Rc], jump to
// reg[Ra] if reg[Rb] <= reg[Rc], ...), with no notion of buses or cycles.
// Testbenches compare the processor with it at every instruction boundary.
// The programs are built with isc_asm_pkg; each ends in a jump to itself,
// which step() reports as `halted`.
package isc_ref_pkg;
  import isc_asm_pkg::*;

  class isc_ref;
    logic [31:0] r [32];
    logic [31:0] m [int unsigned];
    logic [31:0] ip;
    bit          halted;
    bit          taken;       // last conditional jump was taken
    int unsigned mem_mask;

    function new(int aw);
      mem_mask = (aw >= 32) ? 32'hFFFF_FFFF : ((1 << aw) - 1);
      foreach (r[i]) r[i] = 0;
      ip = 0; halted = 0; taken = 0;
    endfunction

    function logic [31:0] rd(logic [31:0] a);
      int unsigned k = a & mem_mask;
      return m.exists(k) ? m[k] : 32'd0;
    endfunction

    function void step();
      logic [31:0] w, va, vb, vc, c;
      int op, ra, rb, rc;
      longint sb, sc;
      w  = rd(ip);
      op = int'(w[31:27]); ra = int'(w[26:22]); rb = int'(w[21:17]); rc = int'(w[16:12]);
      c  = {{10{w[21]}}, w[21:0]};
      va = r[ra]; vb = r[rb]; vc = r[rc];
      sb = longint'($signed(vb)); sc = longint'($signed(vc));
      ip = ip + 1;
      taken = 0;
      case (op)
        0:  r[ra] = vb + vc;
        1:  r[ra] = vb - vc;
        2:  r[ra] = 32'(sb * sc);
        3:  r[ra] = (vc == 0) ? 32'd0 : 32'(sb / sc);
        4:  r[ra] = vb & vc;
        5:  r[ra] = vb | vc;
        6:  r[ra] = ~vb;
        7:  r[ra] = vb >> 1;
        8:  r[ra] = vb << 1;
        9:  r[ra] = c;
        10: r[ra] = va + c;
        11: r[ra] = rd(vb);
        12: m[va & mem_mask] = vb;
        13: r[ra] = vb;
        14: taken = (sb == sc);
        15: taken = (sb != sc);
        16: taken = (sb <  sc);
        17: taken = (sb >  sc);
        18: taken = (sb <= sc);
        19: taken = (sb >= sc);
        20: begin
          if (va == ip - 1) halted = 1;
          ip = va;
        end
        21: begin r[rb] = ip; ip = r[ra]; end
        default: ;
      endcase
      if (op >= 14 && op <= 19 && taken) ip = va;
    endfunction
  endclass

  typedef struct {
    string       name;
    logic [31:0] words [$];     // loaded from address 0
    int unsigned data_addr;
    logic [31:0] data  [$];     // loaded from data_addr
  } program_t;

  // Register numbers of the array-summation program.
  localparam int R_ARRAY = 1, R_COUNT = 2, R_SUM = 3, R_ZERO = 4, R_VALUE = 5,
                 R_LOOP = 6, R_DONE = 7, R_HALT = 8;

  // Sums the five-element array 5 3 6 2 9 (total 25) with the loop
  // jlte/load/add/aim/aim/junc.
  function automatic program_t array_sum();
    program_t p;
    p.name = "array summation";
    p.data_addr = 100;
    p.data = '{32'd5, 32'd3, 32'd6, 32'd2, 32'd9};
    p.words = '{
      a_lim(R_ARRAY, 100),               // 0  array base
      a_lim(R_COUNT, 5),                 // 1  element count
      a_lim(R_SUM, 0),                   // 2
      a_lim(R_ZERO, 0),                  // 3
      a_lim(R_DONE, 12),                 // 4  done_loc
      a_lim(R_LOOP, 6),                  // 5  loop_loc
      a_jlte(R_DONE, R_COUNT, R_ZERO),   // 6  loop_loc: exit if count <= 0
      a_load(R_VALUE, R_ARRAY),          // 7
      a_add(R_SUM, R_VALUE, R_SUM),      // 8
      a_aim(R_ARRAY, 1),                 // 9
      a_aim(R_COUNT, -1),                // 10
      a_junc(R_LOOP),                    // 11
      a_lim(R_HALT, 13),                 // 12 done_loc
      a_junc(R_HALT)                     // 13 stop here
    };
    return p;
  endfunction

  // Register numbers of the factorial program.
  localparam int R_SP = 10, R_RESULT = 11, R_ARG = 12, R_FZERO = 13,
                 R_RET = 14, R_TARGET = 15, R_FHALT = 16;

  // Recursive factorial of n, saving the return address and the argument on
  // a stack in memory that starts at address 200.
  function automatic program_t factorial(int n);
    program_t p;
    p.name = "recursive factorial";
    p.data_addr = 200;
    p.data = '{};
    p.words = '{
      a_lim(R_SP, 200),                  // 0  stack_pointer = save_area_loc
      a_aim(R_SP, -1),                   // 1  point at top of (empty) stack
      a_lim(R_FZERO, 0),                 // 2
      a_lim(R_TARGET, 8),                // 3  address of fac
      a_lim(R_ARG, n),                   // 4
      a_jsub(R_TARGET, R_RET),           // 5  call fac
      a_lim(R_FHALT, 7),                 // 6
      a_junc(R_FHALT),                   // 7  stop here
      a_lim(R_RESULT, 1),                // 8  fac: basis is 1
      a_jlte(R_RET, R_ARG, R_FZERO),     // 9  return if arg <= 0
      a_aim(R_SP, 1),                    // 10 push return address
      a_store(R_SP, R_RET),              // 11
      a_aim(R_SP, 1),                    // 12 push argument
      a_store(R_SP, R_ARG),              // 13
      a_aim(R_ARG, -1),                  // 14
      a_jsub(R_TARGET, R_RET),           // 15 recursive call
      a_load(R_ARG, R_SP),               // 16 pop argument
      a_aim(R_SP, -1),                   // 17
      a_load(R_RET, R_SP),               // 18 pop return address
      a_aim(R_SP, -1),                   // 19
      a_mul(R_RESULT, R_RESULT, R_ARG),  // 20
      a_junc(R_RET)                      // 21 return to caller
    };
    return p;
  endfunction

  // Touches every instruction, both outcomes of every conditional jump,
  // negative numbers, division by zero and a store/load round trip.
  function automatic program_t isa_test();
    program_t p;
    int k;
    p.name = "instruction test";
    p.data_addr = 300;
    p.data = '{32'h1234_5678, 32'hCAFE_F00D};
    p.words = '{
      a_lim(1, 300),          // r1 = data address
      a_lim(2, -7),
      a_lim(3, 3),
      a_add(4, 2, 3),         // -4
      a_sub(5, 2, 3),         // -10
      a_mul(6, 2, 3),         // -21
      a_div(7, 2, 3),         // -2
      a_div(8, 2, 0),         // divide by r0 = 0
      a_and(9, 2, 3),
      a_or(10, 2, 3),
      a_comp(11, 3),
      a_shr(12, 2),
      a_shl(13, 2),
      a_aim(3, 2000),         // r3 = 2003
      a_copy(14, 3),
      a_load(15, 1),
      a_aim(1, 1),
      a_load(16, 1),
      a_aim(1, 5),
      a_store(1, 6),          // mem[306] = -21
      a_load(17, 1)
    };
    // For each condition: a taken jump over a poison instruction, then the
    // same condition not taken. r2 = -7, r3 = 2003.
    for (int op = 14; op <= 19; op++) begin
      int tb_, tc, nb, nc;
      case (op)
        14: begin tb_ = 2; tc = 2; nb = 2; nc = 3; end
        15: begin tb_ = 2; tc = 3; nb = 2; nc = 2; end
        16: begin tb_ = 2; tc = 3; nb = 3; nc = 2; end
        17: begin tb_ = 3; tc = 2; nb = 2; nc = 3; end
        18: begin tb_ = 2; tc = 2; nb = 3; nc = 2; end
        default: begin tb_ = 2; tc = 2; nb = 2; nc = 3; end
      endcase
      k = p.words.size();
      p.words.push_back(a_lim(20, k + 3));
      p.words.push_back(r3(op, 20, tb_, tc));
      p.words.push_back(a_lim(24, 99));
      p.words.push_back(r3(op, 20, nb, nc));
    end
    k = p.words.size();
    p.words.push_back(a_lim(21, k + 5));   // k    subroutine address
    p.words.push_back(a_jsub(21, 22));     // k+1  r22 = k+2
    p.words.push_back(a_lim(23, k + 7));   // k+2
    p.words.push_back(a_junc(23));         // k+3
    p.words.push_back(a_lim(24, 98));      // k+4  skipped
    p.words.push_back(a_aim(25, 77));      // k+5  subroutine body
    p.words.push_back(a_junc(22));         // k+6  return
    p.words.push_back(a_lim(26, k + 8));   // k+7
    p.words.push_back(a_junc(26));         // k+8  stop here
    return p;
  endfunction

endpackage
