// pcu_tb: self-checking test of the program control unit.
// Drives decoded instructions into its Decode and Execute inputs and checks the
// next fetch address and the squash signals for: sequential flow, a taken
// branch in Decode, a condition-deferred branch resolved from Execute, calls and
// returns through the PC stack (including CallPR restoring LCR and ASTA), the
// loop counter, sleep/wake and the mode switch (PC step 1 -> 2).
module pcu_tb;
  import rpe_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wake, d_live, e_asta_we;
  dop_t d, e;
  asta_t e_asta_new, asta;
  logic [15:0] pcp, lcr;
  logic mode, stall, kill_f, kill_d, d_defer, e_take, d_take;

  pcu dut (.*);

  int checks = 0, failures = 0;
  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (pcp=%0d)", what, pcp); end
  endtask

  function automatic dop_t nop();
    dop_t o = '0;
    o.cop = COP_NOP; o.uop = UOP_NOP;
    return o;
  endfunction
  function automatic dop_t br(logic [4:0] c, logic [15:0] t, logic [15:0] ra);
    dop_t o = nop();
    o.valid = 1; o.br = 1; o.cond = c; o.target = t; o.retaddr = ra;
    return o;
  endfunction

  task automatic idle();
    @(negedge clk); d_live = 0; d = nop(); e = nop(); e_asta_we = 0;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] p;
    wake = 0; d_live = 0; d = nop(); e = nop(); e_asta_we = 0; e_asta_new = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    #1 check(pcp == 0, "first fetch address 0");
    for (int i = 1; i < 5; i++) begin @(negedge clk); #1 check(pcp == 16'(i), "sequential +1"); end
    // taken branch in Decode
    @(negedge clk); d_live = 1; d = br(CND_ALWAYS, 16'd100, 16'd0); #1;
    check(pcp == 16'd100 && kill_f && !kill_d && d_take, "jump taken in decode");
    idle(); #1 check(pcp == 16'd101, "continue after jump");
    // not taken: ASTA is zero after reset, so "R = 0" is false
    @(negedge clk); d_live = 1; d = br(CND_R_EQ, 16'd7, 16'd0); #1;
    check(pcp == 16'd102 && !kill_f, "not taken");
    // deferred: ASTA written by the instruction in Execute
    @(negedge clk); d_live = 1; d = br(CND_R_GT, 16'd200, 16'd0);
    e_asta_we = 1; e_asta_new = '{re_z: 0, re_n: 0, re_v: 0, im_z: 1, im_n: 0, im_v: 0};
    #1 check(d_defer && !kill_f && pcp == 16'd103, "branch deferred");
    @(negedge clk); e = br(CND_R_GT, 16'd200, 16'd0); e.deferred = 1;
    d_live = 1; d = br(CND_ALWAYS, 16'd999, 16'd0); e_asta_we = 0;
    #1 check(e_take && kill_d && kill_f && pcp == 16'd200, "deferred branch taken from execute");
    idle(); #1 check(pcp == 16'd201, "after deferred");
    // call and return
    @(negedge clk); d_live = 1; d = br(CND_ALWAYS, 16'd300, 16'd0); d.br = 0; d.call = 1; d.retaddr = 16'd202;
    #1 check(pcp == 16'd300, "call");
    idle();
    @(negedge clk); d_live = 1; d = br(CND_ALWAYS, 16'd0, 16'd0); d.br = 0; d.call = 1; d.pushregs = 1;
    d.target = 16'd400; d.retaddr = 16'd302;
    #1 check(pcp == 16'd400, "nested CallPR");
    // change LCR and ASTA inside the subroutine
    @(negedge clk); d = nop(); d_live = 0; e = nop(); e.valid = 1; e.lcr_we = 1; e.lcr_val = 16'd9;
    e_asta_we = 1; e_asta_new = '{re_z: 1, re_n: 0, re_v: 0, im_z: 1, im_n: 0, im_v: 0};
    idle(); #1 check(lcr == 16'd9 && asta.re_z, "LCR and ASTA changed");
    @(negedge clk); d_live = 1; d = br(CND_ALWAYS, 16'd0, 16'd0); d.br = 0; d.ret = 1;
    #1 check(pcp == 16'd302, "return from CallPR");
    idle(); #1 check(lcr == 16'd0 && !asta.re_z, "LCR and ASTA restored");
    @(negedge clk); d_live = 1; d = br(CND_ALWAYS, 16'd0, 16'd0); d.br = 0; d.ret = 1;
    #1 check(pcp == 16'd202, "return from call");
    // CallPR right behind an LCR load saves the new LCR
    @(negedge clk); d_live = 1; d = br(CND_ALWAYS, 16'd700, 16'd203); d.br = 0; d.call = 1; d.pushregs = 1;
    e = nop(); e.valid = 1; e.lcr_we = 1; e.lcr_val = 16'd5;
    idle(); e.valid = 1; e.lcr_we = 1; e.lcr_val = 16'd1;
    @(negedge clk); d = nop(); d_live = 0; e = nop();
    #1 check(lcr == 16'd1, "LCR changed in subroutine");
    @(negedge clk); d_live = 1; d = br(CND_ALWAYS, 16'd0, 16'd0); d.br = 0; d.ret = 1;
    #1 check(pcp == 16'd203, "return after CallPR");
    idle(); #1 check(lcr == 16'd5, "LCR loaded just before CallPR restored");
    // loop counter: LCR = 3 -> three taken, then falls through
    idle(); e.valid = 1; e.lcr_we = 1; e.lcr_val = 16'd3;
    @(negedge clk); e = nop();
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); d_live = 1; d = br(CND_CNT, 16'd50, 16'd0); #1;
      check(d_take == (i < 3), $sformatf("counter iteration %0d", i));
    end
    idle();
    // sleep
    @(negedge clk); d_live = 1; d = nop(); d.valid = 1; d.sleep = 1;
    idle(); p = pcp;
    for (int i = 0; i < 3; i++) begin @(negedge clk); #1 check(stall, "stalled"); end
    #1 p = pcp;
    @(negedge clk); #1 check(stall && pcp == p, "PC held while sleeping");
    wake = 1;
    @(negedge clk); wake = 0; #1 check(!stall && pcp == p + 16'd1, "woken");
    // mode switch
    @(negedge clk); d_live = 1; d = nop(); d.valid = 1; d.mode_sw = 1; d.target = 16'd600;
    #1 check(pcp == 16'd600 && kill_f, "mode switch redirect");
    idle(); #1 check(mode && pcp == 16'd602, "real mode steps by 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
