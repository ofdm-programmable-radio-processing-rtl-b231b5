// decoder_tb: checks the decoded control fields of a selection of complex-mode
// and real-mode instructions, including two-word instructions (extension word
// handling), relative branch targets in both modes and the mode-switch target.
module decoder_tb;
  import rpe_pkg::*;
  import rpe_asm_pkg::*;

  logic mode; logic [31:0] ins, pend; logic [15:0] pc, pend_pc; logic pend_v;
  dop_t d; logic need_ext;
  decoder dut (.*);

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic put(bit m, logic [31:0] w, logic [15:0] p);
    mode = m; ins = w; pc = p; pend_v = 0; #1;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pend = '0; pend_pc = '0; pend_v = 0;
    put(0, c_mac2(2'd1, 0, 0, 1, 2'd2, 2'd3), 16'd10);
    check(d.valid && d.cop == COP_MAC && d.c_x == CR_MCX && d.c_y && !d.c_r, "MAC2 op");
    check(d.ma_en && !d.ma_we && d.ma_idx == 3'd2 && d.mb_en && d.mb_idx == 2'd3 &&
          d.ma_lreg == CR_MCX && d.mb_lreg == CR_MCY, "MAC2 memory fields");
    put(0, c_sqr(2'd2, 1, CR_MCF), 16'd0);
    check(d.cop == COP_SQS && d.c_r && d.c_x == CR_MCF, "SQR-");
    put(0, c_shift(1, 0, CR_MCY, 8'd200), 16'd0);
    check(d.cop == COP_SHL && d.shamt == 8'd200 && d.c_x == CR_MCY, "SHL");
    put(0, c_ldst(1, CR_MCR, 3'd5, 1), 16'd0);
    check(d.ma_en && d.ma_we && d.ma_n && d.ma_idx == 3'd5 && d.ma_brev && d.ma_sreg == CR_MCR, "store indirect");
    put(0, c_move(3'd6, 3'd1), 16'd0);
    check(d.cw_en && d.cw_move && d.cw_dst == 3'd6 && d.cw_src == 3'd1, "move to GCR2");
    put(0, c_ldreg(1, 3'd4, 8'hFE), 16'd0);
    check(d.dag_we && d.dag_sel == 2'd1 && d.dag_n == 3'd4 && d.dag_val == 16'hFFFE, "M4 = -2");
    put(0, c_jump(CND_R_LT, 6'h3C), 16'd20);
    check(d.br && d.cond == CND_R_LT && d.target == 16'd16 && d.retaddr == 16'd21, "jump -4");
    put(0, c_call(1, 8'd7), 16'd3);
    check(d.call && d.pushregs && d.target == 16'd10 && d.cond == CND_ALWAYS, "CallPR");
    put(0, c_mode(), 16'd7);
    check(d.mode_sw && d.target == 16'd8, "mode switch aligns to even");
    // two-word: LDIM_L MCF.re = 0x1234
    put(0, c_ldim_l(0, CR_MCF, 8'h34), 16'd4);
    check(need_ext && !d.valid, "long form asks for extension");
    mode = 0; pend = {16'h0, c_ldim_l(0, CR_MCF, 8'h34)}; pend_pc = 16'd4; pend_v = 1;
    ins = 32'h0000_0012; pc = 16'd5; #1;
    check(!need_ext && d.valid && d.cw_en && d.cw_part == 2'b10 && d.cw_imm.re == 16'h1234,
          "long immediate combined");
    // real mode
    put(1, r_alu(4'b1010, UOP_MAC, 1, 2'd1, 1, 4'd3, 4'd5), 16'd8);
    check(d.u_en == 4'b1010 && d.uop == UOP_MAC && d.u_r && d.u_x == 2'd3 && d.u_y &&
          d.imm0 == 4'd3 && d.imm1 == 4'd5, "real ALU MAC");
    put(1, r_slots(RO_LDP, {sl(rr(1, 2), 3'd7), sl(rr(0, 1), 3'd2), sl(rr(3, 0), 3'd1), sl(rr(2, 3), 3'd0)}), 16'd8);
    check(d.lp_en == 8'h0F && d.lp_reg[0] == rr(1, 2) && d.lp_port[0] == 3'd7 &&
          d.lp_reg[3] == rr(2, 3) && d.lp_port[3] == 3'd0, "load ports");
    put(1, r_jump(CND_CNT, 16'hFFFE), 16'd40);
    check(d.br && d.cond == CND_CNT && d.target == 16'd36 && d.retaddr == 16'd42, "real jump -2");
    put(1, r_ldimm2(rr(0, 0), rr(1, 3), 8'h80, 8'h05), 16'd0);
    check(d.ui_en == 2'b11 && d.ui_val[0] == 16'hFF80 && d.ui_val[1] == 16'd5, "two immediates");
    put(1, r_misc(MS_RESET, CND_ALWAYS, 1, 0), 16'd0);
    check(d.rst_mr && !d.rst_mf, "reset MR");
    put(1, r_slots(RO_LDP8, {sl(rr(0, 0), 3'd0), sl(rr(0, 0), 3'd0), sl(rr(0, 0), 3'd0), sl(rr(0, 0), 3'd0)}), 16'd0);
    check(need_ext, "LDP8 is two words");
    // randomised fields, compared with the field definitions
    for (int it = 0; it < 300; it++) begin
      logic [7:0] v8; logic [5:0] o6; logic [15:0] v16, p16; logic [2:0] n3;
      logic [4:0] cnd; int sel;
      logic [3:0][6:0] sl4;
      v8 = 8'($urandom); o6 = 6'($urandom); v16 = 16'($urandom); n3 = 3'($urandom);
      p16 = 16'($urandom) & 16'hFFFE; cnd = 5'($urandom % 22); sel = $urandom % 3;
      put(0, c_ldreg(sel, n3, v8), p16);
      check(d.dag_we && d.dag_sel == 2'(sel) && d.dag_n == n3 &&
            d.dag_val == (sel == 1 ? {{8{v8[7]}}, v8} : {8'h0, v8}), "random DAG register load");
      put(0, c_lcr(v8), p16);
      check(d.lcr_we && d.lcr_val == {8'h0, v8}, "random LCR load");
      put(0, c_jump(cnd, o6), p16);
      check(d.br && d.cond == cnd && d.target == p16 + {{10{o6[5]}}, o6} && d.retaddr == p16 + 1,
            "random complex jump");
      put(0, c_call(0, v8), p16 + 16'd1);
      check(d.call && !d.pushregs && d.target == p16 + 16'd1 + {{8{v8[7]}}, v8}, "random complex call");
      put(1, r_jump(cnd, v16), p16);
      check(d.br && d.cond == cnd && d.target == p16 + {v16[14:0], 1'b0} && d.retaddr == p16 + 2,
            "random real jump");
      put(1, r_ldimm1(rr(it % 4, it / 4 % 4), v16), p16);
      check(d.ui_en == 2'b01 && d.ui_reg[0] == rr(it % 4, it / 4 % 4) && d.ui_val[0] == v16,
            "random 16-bit immediate");
      for (int k = 0; k < 4; k++) sl4[k] = 7'($urandom);
      put(1, r_slots(RO_STP, sl4), p16);
      for (int k = 0; k < 4; k++)
        check(d.sp_reg[k] == sl4[3-k][6:3] && d.sp_port[k] == sl4[3-k][2:0], "random store slot");
      put(1, r_lcr(v16), p16);
      check(d.lcr_we && d.lcr_val == v16, "random real LCR");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
