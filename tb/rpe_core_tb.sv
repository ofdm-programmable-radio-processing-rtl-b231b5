// rpe_core_tb: end-to-end test of the whole core at its default sizes.
//
// The program runs in both modes:
//  complex mode: a pilot correlation acc = sum_k x[k] * p[k mod 4] (Q15) over
//    N samples in CDM0 against a 4-entry pilot in CDM1 read through a circular
//    buffer (L4 = 4), with the dual-read MAC instruction in a counter loop; the
//    first MAC uses data loaded by the instruction right before it (forwarding).
//    Then: conj(acc) with a branch that depends on it (deferred branch), a call
//    and return that copies acc through a GCR, a two-word immediate load, and
//    stores of all results.
//  real mode: four CUs in SIMD load their X/Y from the input ports through the
//    port configuration, multiply and accumulate, store to output ports; an
//    8-step division macro in a counter loop; GR moves; deferred branches on
//    CU0 results (sign, then overflow); SLEEP until wake; switch back to complex mode and sleep.
// Results are compared with values computed here. Pipeline timing is checked
// for the MAC loop (a taken branch costs one bubble) and for the deferred
// branch (two bubbles). Each mechanism is counted and must occur.
module rpe_core_tb;
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

  // ------------------------------------------------------------ program
  h_t prog [$];
  function automatic int here(); return prog.size(); endfunction
  function automatic void e16(h_t h); prog.push_back(h); endfunction
  function automatic void e32(w_t w); prog.push_back(w[31:16]); prog.push_back(w[15:0]); endfunction

  int L_loop, L_skip, L_sub, L_div, L_rskip, L_call_at;

  initial begin
    // watchdog
    repeat (4000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_dtake = 0, n_etake = 0, n_defer = 0, n_fwd = 0, n_call = 0, n_ret = 0;
  int n_modesw = 0, n_stall = 0, n_long = 0, n_wrap = 0, n_simd = 0, n_div = 0;
  int n_prd = 0, n_pwr = 0, cyc = 0, n_ovf = 0;
  int t_mac_first = -1, t_std = -1, t_conj = -1, t_after_conj = -1;
  logic [15:0] i4_prev = '0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.u_pcu.d_take) n_dtake++;
    if (dut.u_pcu.e_take) n_etake++;
    if (dut.e_next.valid && dut.e_next.deferred) n_defer++;
    if (dut.de.valid && dut.l0_en && dut.de.cop != COP_NOP) n_fwd++;
    if ((dut.u_pcu.d_take && dut.dd.call) || (dut.u_pcu.e_take && dut.de.call)) n_call++;
    if ((dut.u_pcu.d_take && dut.dd.ret) || (dut.u_pcu.e_take && dut.de.ret)) n_ret++;
    if (dut.e_next.valid && dut.e_next.mode_sw) n_modesw++;
    if (dut.sleeping) n_stall++;
    if (dut.pend_v && dut.d_live) n_long++;
    if (dut.dag_i1[0] < i4_prev) n_wrap++;
    i4_prev <= dut.dag_i1[0];
    if (dut.de.valid && dut.de.u_en == 4'hF && dut.de.uop != UOP_NOP) n_simd++;
    if (dut.de.valid && dut.de.uop == UOP_DIV) n_div++;
    if (dut.u_pcu.e_asta_we && (dut.u_pcu.e_asta_new.re_v || dut.u_pcu.e_asta_new.im_v)) n_ovf++;
    n_prd += $countones(rd_stb);
    n_pwr += $countones(wr_stb);
    if (dut.de.valid && dut.de.cop == COP_MAC && dut.de.mb_en && t_mac_first < 0) t_mac_first = cyc;
    if (dut.de.valid && dut.de.ma_we && dut.de.ma_imm && dut.de.ma_addr == 24'd200) t_std = cyc;
    if (dut.de.valid && dut.de.cop == COP_CONJ) t_conj = cyc;
    if (dut.de.valid && dut.de.call && t_after_conj < 0 && t_conj > 0) t_after_conj = cyc;
  end

  cplx_t x [N], p [4];
  longint acc_re, acc_im;
  int a_div = 203, b_div = 9;

  initial begin
    cplx_t got;
    int t0;
    // ---------------- data
    for (int k = 0; k < N; k++) begin
      x[k].re = 16'($signed(13'($urandom))); x[k].im = 16'($signed(13'($urandom)));
    end
    for (int k = 0; k < 4; k++) begin
      p[k].re = 16'($signed(15'($urandom))); p[k].im = 16'($signed(15'($urandom)));
    end
    acc_re = 0; acc_im = 0;
    for (int k = 0; k < N; k++) begin
      longint pr, pi;
      pr = (longint'(x[k].re) * p[k%4].re - longint'(x[k].im) * p[k%4].im) >>> 15;
      pi = (longint'(x[k].re) * p[k%4].im + longint'(x[k].im) * p[k%4].re) >>> 15;
      acc_re = longint'($signed(16'(acc_re + pr)));
      acc_im = longint'($signed(16'(acc_im + pi)));
    end
    for (int c = 0; c < 8; c++) pin[c] = 16'(c * 7 - 20 + ($urandom % 9));

    // ---------------- complex-mode program
    e16(c_ldreg(0, 3'd0, 8'd0));              // I0 = 0
    e16(c_ldreg(1, 3'd0, 8'd1));              // M0 = 1
    e16(c_ldreg(0, 3'd4, 8'd0));              // I4 = 0
    e16(c_ldreg(1, 3'd4, 8'd1));              // M4 = 1
    e16(c_ldreg(2, 3'd4, 8'd4));              // L4 = 4 (circular pilot buffer)
    e16(c_lcr(8'(N - 1)));                    // LCR = N-1
    e16(c_ldimc(CR_MCR, 4'd0, 4'd0));         // MCR = 0
    e16(c_addsub2(0, 1, 0, 0, 2'd0, 2'd0));   // MCF = MCX+MCY; MCX = x[0], MCY = p[0]
    L_loop = here();
    e16(c_mac2(2'd1, 0, 0, 0, 2'd0, 2'd0));   // MCR += MCX*MCY; load next pair
    e16(c_jump(CND_CNT, 6'(L_loop - here())));
    e16(c_ldd(1, CR_MCR, 0, 8'd200));         // CDM0[200] = acc
    e16(c_cnjneg(0, 1, CR_MCR));              // MCF = conj(acc)
    L_skip = here() + 2;
    e16(c_jump(CND_C_NE, 6'(L_skip - here())));  // depends on the line above
    e16(c_ldimc(CR_MCF, 4'd15, 4'd15));       // skipped
    L_call_at = here();
    e16(c_call(0, 8'd0));                     // patched below
    e16(c_ldim_l(0, CR_MCY, 8'h34));          // MCY.re = 0x1234 (two words)
    e16(16'h0012);
    e16(c_ldd(1, CR_MCY, 1, 8'd100));         // CDM1[100] = MCY
    e16(c_move(3'd0, 3'd5));                  // MCX = GCR1
    e16(c_ldd(1, CR_MCX, 0, 8'd201));         // CDM0[201] = MCX
    e16(c_ldd(1, CR_MCF, 0, 8'd202));         // CDM0[202] = conj(acc)
    e16(c_mode());                            // -> real mode
    if (here() % 2) e16(c_nop());
    // ---------------- real-mode program
    e32(r_setcr({3'd0, 3'd1, 3'd2, 3'd3, 3'd4, 3'd5, 3'd6, 3'd7}));
    e32(r_alu(4'hF, UOP_ADD, 1, 2'd0, 0, 0, 0, 1));   // MF = MX+MY; MX,MY <- ports
    e32(r_alu(4'hF, UOP_MUL, 0, 2'd0, 0));           // MR = MX*MY (forwarded loads)
    e32(r_alu(4'hF, UOP_MAC, 0, 2'd0, 0));           // MR += MX*MY
    e32(r_slots(RO_STP, {sl(rr(3, 0), 3'd0), sl(rr(3, 1), 3'd1), sl(rr(3, 2), 3'd2), sl(rr(3, 3), 3'd3)}));
    e32(r_slots(RO_CU2GR, {sl(rr(3, 1), 3'd0), sl(rr(3, 2), 3'd1), sl(rr(3, 1), 3'd0), sl(rr(3, 1), 3'd0)}));
    e32(r_slots(RO_GR2CU, {sl(rr(2, 3), 3'd0), sl(rr(2, 3), 3'd0), sl(rr(2, 3), 3'd0), sl(rr(2, 3), 3'd0)}));
    e32(r_slots(RO_STP, {sl(rr(2, 3), 3'd5), sl(rr(2, 3), 3'd5), sl(rr(2, 3), 3'd5), sl(rr(2, 3), 3'd5)}));
    // division a/b on CU0: MR0 = a, MX0 = b, 8 steps, then correction
    e32(r_ldimm1(rr(3, 0), 16'(a_div)));
    e32(r_ldimm1(rr(0, 0), 16'(b_div)));
    e32(r_lcr(16'd7));
    L_div = here();
    e32(r_alu(4'h1, UOP_DIV, 0, 2'd0, 0));
    e32(r_jump(CND_CNT, 16'((L_div - here()) / 2)));
    e32(r_alu(4'h1, UOP_ADN, 0, 2'd0, 0));
    e32(r_slots(RO_STP, {sl(rr(3, 0), 3'd4), sl(rr(3, 0), 3'd4), sl(rr(3, 0), 3'd4), sl(rr(3, 0), 3'd4)}));
    // deferred branch on a CU0 result: MF0 = MX0 - MY0 = 9 - 100 < 0 -> skip
    e32(r_ldimm2(rr(0, 0), rr(1, 0), 8'd9, 8'd100));
    e32(r_alu(4'h1, UOP_SUB, 1, 2'd0, 0));
    L_rskip = here() + 4;
    e32(r_jump(CND_R_LT, 16'((L_rskip - here()) / 2)));
    e32(r_ldimm1(rr(2, 0), 16'h7777));               // skipped
    e32(r_slots(RO_STP, {sl(rr(2, 0), 3'd6), sl(rr(2, 0), 3'd6), sl(rr(2, 0), 3'd6), sl(rr(2, 0), 3'd6)}));
    // overflow: 0x7000 + 0x7000 wraps; the branch on "R ov" skips a store
    e32(r_ldimm1(rr(0, 1), 16'h7000));
    e32(r_ldimm1(rr(1, 1), 16'h7000));
    e32(r_alu(4'h1, UOP_ADD, 1, 2'd0, 0));           // CU0 only: 9 + 100, no overflow
    e32(r_alu(4'h2, UOP_ADD, 1, 2'd0, 0));           // CU1: flags come from CU0 -> no ov
    e32(r_jump(CND_R_OV, 16'd2));                     // not taken
    e32(r_ldimm1(rr(0, 0), 16'h7000));
    e32(r_ldimm1(rr(1, 0), 16'h7000));
    e32(r_alu(4'h1, UOP_ADD, 1, 2'd0, 0));           // MF0 = 0x7000 + 0x7000 overflows
    e32(r_jump(CND_R_OV, 16'd2));                     // deferred, taken
    e32(r_slots(RO_STP, {sl(rr(0, 0), 3'd3), sl(rr(0, 0), 3'd3), sl(rr(0, 0), 3'd3), sl(rr(0, 0), 3'd3)}));  // skipped
    e32(r_misc(MS_SLEEP));
    e32(r_misc(MS_RESET, CND_ALWAYS, 0, 1));         // after wake: MF = 0
    e32(r_slots(RO_STP, {sl(rr(2, 1), 3'd7), sl(rr(2, 1), 3'd7), sl(rr(2, 1), 3'd7), sl(rr(2, 1), 3'd7)}));
    e32(r_misc(MS_MODE));
    // ---------------- back in complex mode
    e16(c_ldd(1, CR_MCR, 1, 8'd101));        // CDM1[101] = acc
    e16(c_sleep());
    e16(c_nop()); e16(c_nop());
    // subroutine
    L_sub = here();
    e16(c_move(3'd5, 3'd3));                 // GCR1 = MCR
    e16(c_rts());
    prog[L_call_at] = c_call(0, 8'(L_sub - L_call_at));
    if (here() % 2) e16(c_nop());

    // ---------------- load memories while in reset
    for (int k = 0; k < here(); k += 2) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = 15'(k / 2); imem_wdata = {prog[k], prog[k+1]};
    end
    @(negedge clk); imem_we = 0;
    for (int k = 0; k < N; k++) begin
      @(negedge clk); cdm0_hwe = 1; cdm_haddr = 12'(k); cdm_hwdata = x[k];
    end
    @(negedge clk); cdm0_hwe = 0;
    for (int k = 0; k < 4; k++) begin
      @(negedge clk); cdm1_hwe = 1; cdm_haddr = 12'(k); cdm_hwdata = p[k];
    end
    @(negedge clk); cdm1_hwe = 0;
    @(negedge clk); rst_n = 1;

    // ---------------- run: first SLEEP (real mode)
    wait (sleeping && mode);
    t0 = cyc;
    repeat (6) @(posedge clk);
    @(negedge clk); wake = 1;
    @(negedge clk); wake = 0;
    wait (sleeping && !mode);
    repeat (5) @(posedge clk);

    // ---------------- results
    got = dut.u_cdm0.mem[200];
    check(longint'(got.re) == acc_re && longint'(got.im) == acc_im,
          $sformatf("correlation: got %0d,%0d expected %0d,%0d", got.re, got.im, acc_re, acc_im));
    got = dut.u_cdm0.mem[201];
    check(longint'(got.re) == acc_re && longint'(got.im) == acc_im, "acc copied through GCR1 by subroutine");
    got = dut.u_cdm0.mem[202];
    check(longint'(got.re) == acc_re && longint'(got.im) == longint'($signed(16'(-acc_im))),
          "conj(acc); skipped instruction did not run");
    got = dut.u_cdm1.mem[100];
    check(got.re == 16'h1234, "two-word immediate");
    got = dut.u_cdm1.mem[101];
    check(longint'(got.re) == acc_re, "complex mode after returning from real mode");
    for (int c = 0; c < 4; c++)
      check(pout[c] == 16'(2 * int'(pin[2*c]) * int'(pin[2*c+1])),
            $sformatf("SIMD CU%0d: got %0d", c, pout[c]));
    check(pout[5] == 16'(2 * int'(pin[2]) * int'(pin[3])), "GR moves (MR1 -> GR0 -> MF3)");
    check(pout[4][7:0] == 8'(a_div / b_div) && pout[4][15:8] == 8'(a_div % b_div),
          $sformatf("division: q=%0d r=%0d", pout[4][7:0], pout[4][15:8]));
    check(pout[6] == 16'(9 - 100), "deferred real-mode branch skipped the load");
    check(pout[7] == 16'd0, "MF reset after wake");
    // timing: loop of N MACs with N-1 taken branches at 2 cycles each
    check(t_std - t_mac_first == 3 * N - 1,
          $sformatf("MAC loop timing: %0d cycles, expected %0d", t_std - t_mac_first, 3 * N - 1));
    check(t_after_conj - t_conj == 4,
          $sformatf("deferred branch: %0d cycles to target, expected 4", t_after_conj - t_conj));
    // every mechanism happened
    check(n_dtake > 0, "taken branch in decode");
    check(n_etake >= 2, "deferred branch taken from execute");
    check(n_defer >= 2, "branch deferred");
    check(n_fwd > 0, "writeback-to-execute forwarding");
    check(n_call > 0 && n_ret > 0, "call and return");
    check(n_modesw == 2, "mode switch both ways");
    check(n_stall >= 6, "sleep stall");
    check(n_long > 0, "two-word instruction");
    check(n_wrap > 0, "circular buffer wrap");
    check(n_simd > 0, "four-CU SIMD operation");
    check(n_div == 8, "division steps");
    check(n_ovf >= 1, $sformatf("arithmetic overflow seen %0d times", n_ovf));
    check(n_prd >= 8 && n_pwr >= 8, "port strobes");
    $display("counts: dtake=%0d etake=%0d defer=%0d fwd=%0d call=%0d ret=%0d modesw=%0d stall=%0d long=%0d wrap=%0d simd=%0d div=%0d rd=%0d wr=%0d cycles=%0d",
             n_dtake, n_etake, n_defer, n_fwd, n_call, n_ret, n_modesw, n_stall, n_long, n_wrap,
             n_simd, n_div, n_prd, n_pwr, cyc);
    $display("overflows=%0d", n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
