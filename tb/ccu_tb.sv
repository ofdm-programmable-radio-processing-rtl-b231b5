// ccu_tb: self-checking test of the complex computational unit.
// Loads random register values through the Execute write port, runs every
// operation with random operand choices, and compares the result, the flags and
// the written-back register with a reference model computed here with 64-bit
// integers. Also checks Writeback-load forwarding into the operands.
module ccu_tb;
  import rpe_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cop_e op; logic c_r; logic [1:0] c_x; logic c_y; logic [7:0] shamt;
  logic w_en; logic [1:0] w_sel, w_part; cplx_t w_data;
  logic l0_en, l1_en; logic [1:0] l0_sel, l1_sel; cplx_t l0_data, l1_data;
  cplx_t [3:0] regs_fwd; cplx_t result; asta_t asta_new; logic asta_we;

  ccu dut (.*);

  int checks = 0, failures = 0;
  longint m_re [4], m_im [4];

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic longint wrap16(longint v);
    return longint'($signed(v[15:0]));
  endfunction

  function automatic longint shf(longint v, int s, bit left);
    if (left) return (s >= 16) ? 0 : wrap16(v * (longint'(1) << s));
    return (s >= 16) ? ((v < 0) ? -1 : 0) : (v >>> s);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xr, xi, yr, yi, er, ei, pr, pi;
    int dst;
    op = COP_NOP; c_r = 0; c_x = 0; c_y = 0; shamt = 0;
    w_en = 0; w_sel = 0; w_part = 0; w_data = '0;
    l0_en = 0; l1_en = 0; l0_sel = 0; l1_sel = 0; l0_data = '0; l1_data = '0;
    for (int r = 0; r < 4; r++) begin m_re[r] = 0; m_im[r] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      // randomise one register
      @(negedge clk);
      op = COP_NOP;
      w_en = 1; w_sel = 2'($urandom); w_part = 2'b11;
      w_data.re = 16'($urandom); w_data.im = 16'($urandom);
      if (t % 3 == 0) begin w_data.re = 16'($signed(8'($urandom))); w_data.im = 16'($signed(8'($urandom))); end
      m_re[w_sel] = longint'(w_data.re); m_im[w_sel] = longint'(w_data.im);
      @(negedge clk);
      w_en = 0;
      op = cop_e'(1 + ($urandom % 12));
      c_r = 1'($urandom); c_x = 2'($urandom); c_y = 1'($urandom);
      shamt = ($urandom % 4 == 0) ? 8'($urandom) : 8'($urandom % 17);
      // sometimes forward a Writeback load into an operand
      l0_en = (t % 5 == 0); l0_sel = 2'($urandom);
      l0_data.re = 16'($urandom); l0_data.im = 16'($urandom);
      if (l0_en) begin m_re[l0_sel] = longint'(l0_data.re); m_im[l0_sel] = longint'(l0_data.im); end
      #1;
      xr = m_re[c_x]; xi = m_im[c_x];
      yr = c_y ? m_re[2] : m_re[1]; yi = c_y ? m_im[2] : m_im[1];
      if (op inside {COP_SQR, COP_SQA, COP_SQS}) begin yr = xr; yi = xi; end
      pr = (xr*yr - xi*yi) >>> 15;
      pi = (xr*yi + xi*yr) >>> 15;
      case (op)
        COP_ADD: begin er = xr + yr; ei = xi + yi; end
        COP_SUB: begin er = xr - yr; ei = xi - yi; end
        COP_MUL, COP_SQR: begin er = pr; ei = pi; end
        COP_MAC, COP_SQA: begin er = m_re[3] + pr; ei = m_im[3] + pi; end
        COP_MSU, COP_SQS: begin er = m_re[3] - pr; ei = m_im[3] - pi; end
        COP_CONJ: begin er = xr; ei = -xi; end
        COP_NEG: begin er = -xr; ei = -xi; end
        COP_SHR: begin er = shf(xr, shamt, 0); ei = shf(xi, shamt, 0); end
        default: begin er = shf(xr, shamt, 1); ei = shf(xi, shamt, 1); end
      endcase
      check(longint'(result.re) == wrap16(er) && longint'(result.im) == wrap16(ei),
            $sformatf("op %s x%0d y%0d: got %0d,%0d exp %0d,%0d", op.name(), c_x, c_y,
                      result.re, result.im, wrap16(er), wrap16(ei)));
      check(asta_we && asta_new.re_z == (wrap16(er) == 0) && asta_new.im_n == (wrap16(ei) < 0),
            "flags");
      if (!(op inside {COP_SHR, COP_SHL}))
        check(asta_new.re_v == (er != wrap16(er)) && asta_new.im_v == (ei != wrap16(ei)),
              $sformatf("overflow flag op %s", op.name()));
      dst = c_r ? 2 : 3;
      m_re[dst] = wrap16(er); m_im[dst] = wrap16(ei);
      @(negedge clk);
      l0_en = 0; op = COP_NOP;
      #1;
      for (int r = 0; r < 4; r++)
        check(longint'(regs_fwd[r].re) == m_re[r] && longint'(regs_fwd[r].im) == m_im[r],
              $sformatf("register %0d after %s", r, op.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
