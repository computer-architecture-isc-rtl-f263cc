// isc_asm_pkg: a tiny assembler for ISC test programs.
//
// Each function returns one 32-bit instruction word in the layout of
// isc_pkg: [31:27] opcode, [26:22] Ra, [21:17] Rb, [16:12] Rc, and for lim
// and aim a 22-bit two's-complement constant in [21:0]. The encoding is
// written out here bit by bit, independently of the processor's decoder.
package isc_asm_pkg;

  function automatic logic [31:0] r3(int op, int ra, int rb, int rc);
    return {5'(op), 5'(ra), 5'(rb), 5'(rc), 12'd0};
  endfunction

  function automatic logic [31:0] ri(int op, int ra, int c);
    return {5'(op), 5'(ra), 22'(c)};
  endfunction

  function automatic logic [31:0] a_add (int ra, int rb, int rc); return r3(0,  ra, rb, rc); endfunction
  function automatic logic [31:0] a_sub (int ra, int rb, int rc); return r3(1,  ra, rb, rc); endfunction
  function automatic logic [31:0] a_mul (int ra, int rb, int rc); return r3(2,  ra, rb, rc); endfunction
  function automatic logic [31:0] a_div (int ra, int rb, int rc); return r3(3,  ra, rb, rc); endfunction
  function automatic logic [31:0] a_and (int ra, int rb, int rc); return r3(4,  ra, rb, rc); endfunction
  function automatic logic [31:0] a_or  (int ra, int rb, int rc); return r3(5,  ra, rb, rc); endfunction
  function automatic logic [31:0] a_comp(int ra, int rb);         return r3(6,  ra, rb, 0);  endfunction
  function automatic logic [31:0] a_shr (int ra, int rb);         return r3(7,  ra, rb, 0);  endfunction
  function automatic logic [31:0] a_shl (int ra, int rb);         return r3(8,  ra, rb, 0);  endfunction
  function automatic logic [31:0] a_lim (int ra, int c);          return ri(9,  ra, c);      endfunction
  function automatic logic [31:0] a_aim (int ra, int c);          return ri(10, ra, c);      endfunction
  function automatic logic [31:0] a_load (int ra, int rb);        return r3(11, ra, rb, 0);  endfunction
  function automatic logic [31:0] a_store(int ra, int rb);        return r3(12, ra, rb, 0);  endfunction
  function automatic logic [31:0] a_copy (int ra, int rb);        return r3(13, ra, rb, 0);  endfunction
  function automatic logic [31:0] a_jeq (int ra, int rb, int rc); return r3(14, ra, rb, rc); endfunction
  function automatic logic [31:0] a_jne (int ra, int rb, int rc); return r3(15, ra, rb, rc); endfunction
  function automatic logic [31:0] a_jlt (int ra, int rb, int rc); return r3(16, ra, rb, rc); endfunction
  function automatic logic [31:0] a_jgt (int ra, int rb, int rc); return r3(17, ra, rb, rc); endfunction
  function automatic logic [31:0] a_jlte(int ra, int rb, int rc); return r3(18, ra, rb, rc); endfunction
  function automatic logic [31:0] a_jgte(int ra, int rb, int rc); return r3(19, ra, rb, rc); endfunction
  function automatic logic [31:0] a_junc(int ra);                 return r3(20, ra, 0, 0);   endfunction
  function automatic logic [31:0] a_jsub(int ra, int rb);         return r3(21, ra, rb, 0);  endfunction

  // Cycles an instruction takes: 3 fetch steps plus its own subsequence.
  function automatic int cycles_of(logic [31:0] w);
    case (int'(w[31:27]))
      0,1,2,3,4,5,6,7,8,10: return 7;
      9, 13, 20:            return 4;
      11, 12:               return 6;
      21:                   return 5;
      14,15,16,17,18,19:    return 7;
      default:              return 4;
    endcase
  endfunction

endpackage
