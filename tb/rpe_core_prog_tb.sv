// rpe_core_prog_tb: second end-to-end program on the full-size core, covering
// the instruction forms that rpe_core_tb does not use.
//
// complex mode:
//  * bit-reversed copy: 16 samples are read from CDM0 through DAG0 in
//    bit-reversed order (M0 = 256, so the 12-bit reversal of k*256 is the 4-bit
//    reversal of k) and written linearly to CDM1 through DAG1. Each store takes
//    the value the load before it is still writing back (forwarding to a store).
//  * energy: sum of complex squares over the copy with the square-accumulate
//    plus memory read instruction (SQR1).
//  * nested loops: an outer counter loop calls, with CallPR, a subroutine that
//    runs its own counter loop; LCR is saved and restored by the call. The
//    subroutine also holds a conditional return that must not be taken.
//  * left and right shifts, direct load, negate; a jump onto a jump.
// real mode:
//  * an eight-port load (two-word instruction), abs and negate on four CUs,
//    shifts with the two shift immediates, stores to all eight ports;
//  * a call and return, a call whose condition depends on the instruction
//    before it (deferred call), and a GR hand-over back to complex mode.
module rpe_core_prog_tb;
  import rpe_pkg::*;
  import rpe_asm_pkg::*;

  localparam int N = 16;

  logic clk = 0, rst_n = 0, wake = 0;
  always #5 clk = ~clk;

  logic imem_we = 0; logic [14:0] imem_waddr = '0; logic [31:0] imem_wdata = '0;
  logic cdm0_hwe = 0, cdm1_hwe = 0; logic [11:0] cdm_haddr = '0; cplx_t cdm_hwdata = '0;
  rdata_t [7:0] pin, pout; logic [7:0] rd_stb, wr_stb; logic mode, sleeping;

  rpe_core dut (.*);

  int checks = 0, failures = 0;
  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  h_t prog [$];
  function automatic int here(); return prog.size(); endfunction
  function automatic void e16(h_t h); prog.push_back(h); endfunction
  function automatic void e32(w_t w); prog.push_back(w[31:16]); prog.push_back(w[15:0]); endfunction

  function automatic int brev4(int k);
    return ((k & 1) << 3) | ((k & 2) << 1) | ((k & 4) >> 1) | ((k & 8) >> 3);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_brev = 0, n_pushpr = 0, n_call_def = 0, n_ret = 0, n_ldp8 = 0, n_st_fwd = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.de.valid && dut.de.ma_en && dut.de.ma_brev) n_brev++;
    if (dut.u_pcu.d_take && dut.dd.call && dut.dd.pushregs) n_pushpr++;
    if (dut.u_pcu.e_take && dut.de.call) n_call_def++;
    if ((dut.u_pcu.d_take && dut.dd.ret) || (dut.u_pcu.e_take && dut.de.ret)) n_ret++;
    if (dut.de.valid && dut.de.lp_en == 8'hFF) n_ldp8++;
    if (dut.de.valid && dut.de.ma_we && dut.l0_en) n_st_fwd++;
  end

  cplx_t x [N];
  int L_cp, L_sq, L_out, L_in, L_sub, L_sub2, L_rsub, at_call, at_rcall, at_rcall2;

  initial begin
    cplx_t got;
    longint e_re, e_im;
    int outer, inner;
    outer = 3; inner = 4;
    for (int k = 0; k < N; k++) begin
      x[k].re = 16'($signed(12'($urandom))); x[k].im = 16'($signed(12'($urandom)));
    end
    e_re = 0; e_im = 0;
    for (int k = 0; k < N; k++) begin
      e_re = longint'($signed(16'(e_re + ((longint'(x[k].re) * x[k].re - longint'(x[k].im) * x[k].im) >>> 15))));
      e_im = longint'($signed(16'(e_im + ((longint'(x[k].re) * x[k].im + longint'(x[k].im) * x[k].re) >>> 15))));
    end
    for (int c = 0; c < 8; c++) pin[c] = 16'($signed(10'($urandom)));

    // ---------------- complex mode
    e16(c_ldreg(0, 3'd0, 8'd0));            // I0 = 0
    e16(c_ldreg(1, 3'd0, 8'd0));            // M0 = 256 (two words)
    prog[here() - 1] = c_op(CO_LDM_L, {3'd0, 8'h00});
    e16(16'h0001);
    e16(c_ldreg(0, 3'd4, 8'd0));            // I4 = 0
    e16(c_ldreg(1, 3'd4, 8'd1));            // M4 = 1
    e16(c_ldreg(0, 3'd5, 8'd0));            // I5 = 0
    e16(c_ldreg(1, 3'd5, 8'd1));            // M5 = 1
    e16(c_lcr(8'(N - 1)));
    L_cp = here();
    e16(c_ldst(0, CR_MCX, 3'd0, 1));        // MCX = CDM0(brev(I0))
    e16(c_ldst(1, CR_MCX, 3'd4));           // CDM1(I4) = MCX
    e16(c_jump(CND_CNT, 6'(L_cp - here())));
    // energy
    e16(c_ldimc(CR_MCR, 4'd0, 4'd0));
    e16(c_ldst(0, CR_MCX, 3'd5));           // MCX = CDM1(I5)
    e16(c_lcr(8'(N - 1)));
    L_sq = here();
    e16(c_sqr1(2'd1, 0, CR_MCX, 3'd5));     // MCR += MCX^2, MCX = CDM1(I5)
    e16(c_jump(CND_CNT, 6'(L_sq - here())));
    e16(c_ldd(1, CR_MCR, 0, 8'd100));       // CDM0[100] = energy
    // nested loops with CallPR
    e16(c_ldimc(CR_MCR, 4'd1, 4'd0));       // MCR = 1
    e16(c_ldimc(CR_MCF, 4'd0, 4'd0));       // MCF = 0
    e16(c_lcr(8'(outer - 1)));
    L_out = here();
    at_call = here();
    e16(c_call(1, 8'd0));                   // patched: CallPR sub
    e16(c_jump(CND_CNT, 6'(L_out - here())));
    e16(c_ldd(1, CR_MCF, 0, 8'd101));       // CDM0[101] = outer*inner
    // shifts, direct load, negate
    e16(c_shift(1, 0, CR_MCF, 8'd3));       // MCR = MCF << 3
    e16(c_ldd(1, CR_MCR, 0, 8'd102));
    e16(c_shift(0, 1, CR_MCR, 8'd2));       // MCF = MCR >> 2
    e16(c_ldd(1, CR_MCF, 0, 8'd103));
    e16(c_ldd(0, CR_MCY, 0, 8'd100));       // MCY = energy
    e16(c_cnjneg(1, 1, CR_MCY));            // MCF = -MCY (uses the loaded value)
    // a taken jump whose target is another taken jump; both skip a line
    e16(c_jump(CND_ALWAYS, 6'd2));
    e16(c_ldimc(CR_MCF, 4'd15, 4'd15));     // skipped
    e16(c_jump(CND_ALWAYS, 6'd2));
    e16(c_ldimc(CR_MCF, 4'd15, 4'd15));     // skipped
    e16(c_ldd(1, CR_MCF, 1, 8'd104));       // CDM1[104] = -energy
    e16(c_mode());
    if (here() % 2) e16(c_nop());
    // ---------------- real mode
    e32(r_slots(RO_LDP8, {sl(rr(0, 0), 3'd0), sl(rr(0, 1), 3'd1), sl(rr(0, 2), 3'd2), sl(rr(0, 3), 3'd3)}));
    e32(r_slots(RO_MISC, {sl(rr(1, 0), 3'd4), sl(rr(1, 1), 3'd5), sl(rr(1, 2), 3'd6), sl(rr(1, 3), 3'd7)}));
    e32(r_alu(4'hF, UOP_ABS, 0, 2'd0, 0));           // MR = |MX|
    e32(r_alu(4'hF, UOP_NEG, 1, 2'd1, 0));           // MF = -MY  (x code 1 = MY)
    e32(r_alu(4'hF, UOP_SHL, 0, 2'd3, 0, 4'd2, 4'd5)); // MR <<= 2 (CU0/1), 5 (CU2/3)
    e32(r_slots(RO_STP, {sl(rr(3, 0), 3'd0), sl(rr(3, 1), 3'd1), sl(rr(3, 2), 3'd2), sl(rr(3, 3), 3'd3)}));
    e32(r_slots(RO_STP, {sl(rr(2, 0), 3'd4), sl(rr(2, 1), 3'd5), sl(rr(2, 2), 3'd6), sl(rr(2, 3), 3'd7)}));
    at_rcall = here();
    e32(r_call(0, CND_ALWAYS, 16'd0));               // patched
    e32(r_slots(RO_CU2GR, {sl(rr(0, 0), 3'd7), sl(rr(0, 0), 3'd7), sl(rr(0, 0), 3'd7), sl(rr(0, 0), 3'd7)}));
    e32(r_ldimm2(rr(0, 0), rr(1, 0), 8'd100, 8'd2));
    e32(r_alu(4'h1, UOP_SUB, 1, 2'd0, 0));           // MF0 = MX0 - MY0 = 98 > 0
    at_rcall2 = here();
    e32(r_call(0, CND_R_GT, 16'd0));                 // patched; depends on the line above
    e32(r_misc(MS_MODE));
    // ---------------- complex mode again
    e16(c_move(3'd0, 3'd7));                // MCX = GCR3 (GR6, GR7)
    e16(c_ldd(1, CR_MCX, 0, 8'd105));
    e16(c_sleep());
    e16(c_nop()); e16(c_nop());
    // complex subroutine: inner loop, LCR saved by CallPR
    L_sub = here();
    e16(c_lcr(8'(inner - 1)));
    L_in = here();
    e16(c_addsub(0, 1, 1, 1));              // MCF = MCR + MCF
    e16(c_jump(CND_CNT, 6'(L_in - here())));
    e16(c_rts(CND_R_LT));                   // not taken: MCF > 0
    e16(c_rts());
    prog[at_call] = c_call(1, 8'(L_sub - at_call));
    if (here() % 2) e16(c_nop());
    // real subroutines
    L_rsub = here();
    e32(r_ldimm1(rr(0, 0), 16'h0055));
    e32(r_misc(MS_RTS));
    L_sub2 = here();
    e32(r_ldimm1(rr(0, 0), 16'h0066));      // runs only if the deferred call is taken
    e32(r_misc(MS_RTS));
    {prog[at_rcall], prog[at_rcall + 1]} = r_call(0, CND_ALWAYS, 16'((L_rsub - at_rcall) / 2));
    {prog[at_rcall2], prog[at_rcall2 + 1]} = r_call(0, CND_R_GT, 16'((L_sub2 - at_rcall2) / 2));
    if (here() % 2) e16(c_nop());

    // ---------------- load and run
    for (int k = 0; k < here(); k += 2) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = 15'(k / 2); imem_wdata = {prog[k], prog[k+1]};
    end
    @(negedge clk); imem_we = 0;
    for (int k = 0; k < N; k++) begin
      @(negedge clk); cdm0_hwe = 1; cdm_haddr = 12'(k); cdm_hwdata = x[k];
    end
    @(negedge clk); cdm0_hwe = 0;
    @(negedge clk); rst_n = 1;
    wait (sleeping);
    repeat (4) @(posedge clk);

    // ---------------- results
    for (int k = 0; k < N; k++) begin
      got = dut.u_cdm1.mem[k];
      check(got == x[brev4(k)], $sformatf("bit-reversed copy at %0d", k));
    end
    got = dut.u_cdm0.mem[100];
    check(longint'(got.re) == e_re && longint'(got.im) == e_im,
          $sformatf("energy: got %0d,%0d expected %0d,%0d", got.re, got.im, e_re, e_im));
    got = dut.u_cdm0.mem[101];
    check(got.re == 16'(outer * inner) && got.im == 0, $sformatf("nested loops: %0d", got.re));
    got = dut.u_cdm0.mem[102];
    check(got.re == 16'(outer * inner * 8), "shift left");
    got = dut.u_cdm0.mem[103];
    check(got.re == 16'(outer * inner * 2), "shift right");
    got = dut.u_cdm1.mem[104];
    check(longint'(got.re) == longint'($signed(16'(-e_re))) && longint'(got.im) == longint'($signed(16'(-e_im))),
          "negate of a value loaded just before; jump onto a jump skipped both lines");
    for (int c = 0; c < 4; c++) begin
      int a, s;
      a = $signed(pin[c]) < 0 ? -int'($signed(pin[c])) : int'($signed(pin[c]));
      s = (c < 2) ? 2 : 5;
      check(pout[c] == 16'(a << s), $sformatf("abs+shift CU%0d", c));
      check(pout[4 + c] == 16'(-int'($signed(pin[4 + c]))), $sformatf("negate CU%0d", c));
    end
    got = dut.u_cdm0.mem[105];
    check(got.im == 16'h0055, "value set in real subroutine handed over through GR7");
    check(dut.g_cu[0].u_cu.regs_fwd[0] == 16'h0066, "deferred call reached its subroutine");
    check(n_brev == N, "bit-reversed accesses");
    check(n_pushpr == outer, "CallPR calls");
    check(n_call_def == 1, "deferred call");
    check(n_ret == outer + 2, "returns (conditional one not taken)");
    check(n_ldp8 == 1, "eight-port load");
    check(n_st_fwd > 0, "store of a value in writeback");
    $display("counts: brev=%0d callpr=%0d call_def=%0d ret=%0d ldp8=%0d st_fwd=%0d",
             n_brev, n_pushpr, n_call_def, n_ret, n_ldp8, n_st_fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
