// cu_tb: self-checking test of one real computational unit.
// Random arithmetic operations are compared with a 64-bit integer model; then
// the division macro (8 step-divide operations and one add-if-negative) is run
// on random dividend/divisor pairs and its quotient and remainder compared with
// the / and % operators.
module cu_tb;
  import rpe_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en; uop_e op; logic r; logic [1:0] x; logic y; logic [3:0] shamt;
  logic [3:0] w_we, l_we; rdata_t [3:0] w_data, l_data;
  rdata_t [3:0] regs_fwd; rdata_t result; logic flag_z, flag_n, flag_v, flag_we;

  cu dut (.*);

  int checks = 0, failures = 0;
  longint m [4];

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic longint wrap16(longint v);
    return longint'($signed(v[15:0]));
  endfunction

  task automatic setreg(int i, logic [15:0] v);
    @(negedge clk);
    en = 0; op = UOP_NOP; w_we = '0; w_we[i] = 1'b1; w_data[i] = v;
    m[i] = longint'($signed(v));
    @(negedge clk);
    w_we = '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xv, yv, e;
    en = 0; op = UOP_NOP; r = 0; x = 0; y = 0; shamt = 0;
    w_we = '0; l_we = '0; w_data = '0; l_data = '0;
    for (int i = 0; i < 4; i++) m[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // random arithmetic
    for (int t = 0; t < 500; t++) begin
      setreg($urandom % 4, (t % 2) ? 16'($urandom) : 16'($signed(7'($urandom))));
      @(negedge clk);
      en = 1;
      op = uop_e'(1 + ($urandom % 10));      // ADD .. NEG
      if ($urandom % 4 == 0) op = ($urandom % 2) ? UOP_SHR : UOP_SHL;
      r = 1'($urandom); x = 2'($urandom); y = 1'($urandom); shamt = 4'($urandom);
      #1;
      xv = m[x]; yv = y ? m[2] : m[1];
      case (op)
        UOP_ADD: e = xv + yv;
        UOP_SUB: e = xv - yv;
        UOP_MUL: e = xv * yv;
        UOP_MAC: e = m[3] + xv * yv;
        UOP_MSU: e = m[3] - xv * yv;
        UOP_SQR: e = xv * xv;
        UOP_SQA: e = m[3] + xv * xv;
        UOP_SQS: e = m[3] - xv * xv;
        UOP_ABS: e = (xv < 0) ? -xv : xv;
        UOP_NEG: e = -xv;
        UOP_SHR: e = xv >>> shamt;
        default: e = wrap16(xv * (longint'(1) << shamt));
      endcase
      check(longint'(result) == wrap16(e),
            $sformatf("%s x=%0d y=%0d got %0d exp %0d", op.name(), xv, yv, result, wrap16(e)));
      check(flag_we && flag_z == (wrap16(e) == 0) && flag_n == (wrap16(e) < 0), "flags");
      if (op != UOP_SHL && op != UOP_SHR) check(flag_v == (e != wrap16(e)), "overflow flag");
      m[r ? 2 : 3] = wrap16(e);
      @(negedge clk);
      en = 0; op = UOP_NOP;
      #1;
      for (int i = 0; i < 4; i++) check(longint'(regs_fwd[i]) == m[i], "register file");
    end
    // division macro: MR = {0, a}, MX = b
    for (int t = 0; t < 60; t++) begin
      int a, b;
      a = $urandom % 256;
      b = 1 + $urandom % 127;
      setreg(3, 16'(a));
      setreg(0, 16'(b));
      for (int s = 0; s < 8; s++) begin
        @(negedge clk);
        en = 1; op = UOP_DIV; r = 0; x = 2'd0;
      end
      @(negedge clk);
      op = UOP_ADN;
      @(negedge clk);
      en = 0; op = UOP_NOP;
      #1;
      check(regs_fwd[3][7:0] == 8'(a / b) && regs_fwd[3][15:8] == 8'(a % b),
            $sformatf("divide %0d/%0d: q=%0d r=%0d", a, b, regs_fwd[3][7:0], regs_fwd[3][15:8]));
      m[3] = longint'(regs_fwd[3]);
    end
    // Writeback load forwarding: operand sees the loaded value in the same cycle
    setreg(1, 16'd7);
    @(negedge clk);
    l_we = 4'b0001; l_data[0] = 16'd11; en = 1; op = UOP_ADD; x = 2'd0; y = 1'b0; r = 1'b0;
    #1 check(result == 16'sd18, "forwarded load into X");
    @(negedge clk);
    l_we = '0; en = 0; op = UOP_NOP;
    #1 check(regs_fwd[0] == 16'sd11 && regs_fwd[3] == 16'sd18, "load and result written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
