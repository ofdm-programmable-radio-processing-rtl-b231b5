// rpe_asm_pkg: instruction assembler functions used by the testbenches.
// Each function returns the binary word of one instruction in the encodings
// documented in the decoder. Complex-mode words are 16 bits, real-mode words 32.
// The "_l" helpers return the first word of a two-word instruction; the second
// word is the extension (upper bits of the immediate).
package rpe_asm_pkg;
  import rpe_pkg::*;

  typedef logic [15:0] h_t;
  typedef logic [31:0] w_t;

  // ------------------------------------------------------------ complex mode
  function automatic h_t c_op(copc_e op, logic [10:0] f); return {op, f}; endfunction
  function automatic h_t c_nop(); return c_op(CO_MISC, 11'h0); endfunction
  function automatic h_t c_rts(logic [4:0] cond = CND_ALWAYS);
    return c_op(CO_MISC, {MS_RTS, 3'b0, cond});
  endfunction
  function automatic h_t c_sleep(); return c_op(CO_MISC, {MS_SLEEP, 8'h0}); endfunction
  function automatic h_t c_mode(); return c_op(CO_MISC, {MS_MODE, 8'h0}); endfunction
  function automatic h_t c_addsub(bit sub, bit r, bit x, bit y);
    return c_op(CO_ADDSUB, {sub, r, x, y, 7'h0});
  endfunction
  function automatic h_t c_mac(logic [1:0] m, bit r, bit x, bit y);
    return c_op(CO_MAC, {m, r, x, y, 6'h0});
  endfunction
  function automatic h_t c_sqr(logic [1:0] m, bit r, logic [1:0] xs);
    return c_op(CO_SQR, {m, r, xs, 6'h0});
  endfunction
  function automatic h_t c_cnjneg(bit neg, bit r, logic [1:0] xs);
    return c_op(CO_CNJNEG, {neg, r, xs, 7'h0});
  endfunction
  function automatic h_t c_shift(bit left, bit r, logic [1:0] xs, logic [7:0] imm);
    return c_op(left ? CO_SHL : CO_SHR, {r, xs, imm});
  endfunction
  function automatic h_t c_ldst(bit store, logic [1:0] rg, logic [2:0] idx, bit brev = 0);
    return c_op(CO_LDST, {store, rg, idx, brev, 4'h0});
  endfunction
  function automatic h_t c_ldd(bit store, logic [1:0] rg, bit n, logic [7:0] a);
    return c_op(store ? CO_STD : CO_LDD, {rg, n, a});
  endfunction
  function automatic h_t c_move(logic [2:0] dst, logic [2:0] src);
    return c_op(CO_MOVE, {dst, src, 5'h0});
  endfunction
  function automatic h_t c_ldim(bit im, logic [1:0] rg, logic [7:0] v);
    return c_op(CO_LDIM, {im, rg, v});
  endfunction
  function automatic h_t c_ldim_l(bit im, logic [1:0] rg, logic [7:0] v);
    return c_op(CO_LDIM_L, {im, rg, v});
  endfunction
  function automatic h_t c_ldimc(logic [1:0] rg, logic [3:0] re, logic [3:0] im);
    return c_op(CO_LDIMC, {rg, 1'b0, re, im});
  endfunction
  function automatic h_t c_mac2(logic [1:0] m, bit r, bit x, bit y, logic [1:0] ix, logic [1:0] iy);
    return c_op(CO_MAC2, {m, r, x, y, ix, iy, 2'b0});
  endfunction
  function automatic h_t c_addsub2(bit sub, bit r, bit x, bit y, logic [1:0] ix, logic [1:0] iy);
    return c_op(CO_ADDSUB2, {sub, r, x, y, ix, iy, 3'b0});
  endfunction
  function automatic h_t c_mac1(logic [1:0] m, bit r, bit x, bit y, bit z, logic [2:0] idx);
    return c_op(CO_MAC1, {m, r, x, y, z, idx, 2'b0});
  endfunction
  function automatic h_t c_sqr1(logic [1:0] m, bit r, logic [1:0] xs, logic [2:0] idx);
    return c_op(CO_SQR1, {m, r, xs, idx, 3'b0});
  endfunction
  // sel: 0 I, 1 M, 2 L
  function automatic h_t c_ldreg(int sel, logic [2:0] n, logic [7:0] v);
    return c_op(sel == 0 ? CO_LDI : sel == 1 ? CO_LDM : CO_LDL, {n, v});
  endfunction
  function automatic h_t c_lcr(logic [7:0] v); return c_op(CO_LCR, {3'b0, v}); endfunction
  function automatic h_t c_call(bit pr, logic [7:0] off); return c_op(CO_CALL, {pr, 2'b0, off}); endfunction
  function automatic h_t c_jump(logic [4:0] cond, logic [5:0] off);
    return c_op(CO_JUMP, {cond, off});
  endfunction

  // --------------------------------------------------------------- real mode
  // reg code: {kind, cu}, kind 0 MX, 1 MY, 2 MF, 3 MR
  function automatic logic [3:0] rr(int kind, int c); return {2'(kind), 2'(c)}; endfunction
  function automatic w_t r_misc(misc_e s, logic [4:0] cond = CND_ALWAYS, bit rmr = 0, bit rmf = 0);
    return {RO_MISC, s, 4'h0, cond, 14'h0, rmr, rmf};
  endfunction
  function automatic w_t r_alu(logic [3:0] en, uop_e f, bit r, logic [1:0] xs, bit y,
                               logic [3:0] i0 = 0, logic [3:0] i1 = 0, bit withread = 0);
    return {withread ? RO_ALUP : RO_ALU, en, f, r, xs, y, i0, i1, 8'h0};
  endfunction
  function automatic w_t r_slots(ropc_e op, logic [3:0][6:0] s);
    return {op, s[3], s[2], s[1], s[0]};  // first listed slot is slot 0
  endfunction
  function automatic logic [6:0] sl(logic [3:0] rg, logic [2:0] p); return {rg, p}; endfunction
  function automatic w_t r_ldimm1(logic [3:0] rg, logic [15:0] v);
    return {RO_LDIMM, 1'b0, rg, 4'h0, 3'h0, v};
  endfunction
  function automatic w_t r_ldimm2(logic [3:0] r1, logic [3:0] r2, logic [7:0] v1, logic [7:0] v2);
    return {RO_LDIMM, 1'b1, r1, r2, 3'h0, v1, v2};
  endfunction
  function automatic w_t r_lcr(logic [15:0] v); return {RO_LCR, 12'h0, v}; endfunction
  function automatic w_t r_call(bit pr, logic [4:0] cond, logic [15:0] off);
    return {RO_CALL, pr, 6'h0, cond, off};
  endfunction
  function automatic w_t r_jump(logic [4:0] cond, logic [15:0] off);
    return {RO_JUMP, 7'h0, cond, off};
  endfunction
  function automatic w_t r_setcr(logic [23:0] v); return {RO_SETCR, 4'h0, v}; endfunction
endpackage
