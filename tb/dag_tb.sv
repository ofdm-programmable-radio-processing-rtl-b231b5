// dag_tb: self-checking test of the data address generator.
// Checks linear post-modify with positive and negative M, circular buffers of
// several lengths at aligned and unaligned positions (against a model that walks
// the buffer by index), and the bit-reversed address output.
module dag_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic acc_en, acc_brev, we;
  logic [1:0] acc_idx, sel, n;
  logic [15:0] addr, val;
  logic [15:0] i_regs [4];

  dag #(.AW(16), .BREV(12)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [1:0] s, logic [1:0] k, logic [15:0] v);
    @(negedge clk); acc_en = 0; we = 1; sel = s; n = k; val = v;
    @(negedge clk); we = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acc_en = 0; acc_brev = 0; we = 0; acc_idx = 0; sel = 0; n = 0; val = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // linear buffers
    for (int k = 0; k < 4; k++) begin
      int base, m, exp;
      base = $urandom % 60000; m = int'($urandom % 61) - 30;
      wr(0, 2'(k), 16'(base)); wr(1, 2'(k), 16'(m)); wr(2, 2'(k), 16'd0);
      exp = base;
      for (int s = 0; s < 20; s++) begin
        @(negedge clk); acc_en = 1; acc_idx = 2'(k); acc_brev = 0;
        #1 check(addr == 16'(exp), $sformatf("linear I%0d step %0d: %0d vs %0d", k, s, addr, exp));
        exp = (exp + m) & 16'hFFFF;
      end
      @(negedge clk); acc_en = 0;
    end
    // circular buffers
    for (int t = 0; t < 40; t++) begin
      int len, pw, base, off, m, k;
      k = t % 4;
      len = 1 + $urandom % 100;
      pw = 1; while (pw < len) pw = pw * 2;
      base = pw * ($urandom % 16);
      off = $urandom % len;
      m = int'($urandom % len);
      if (t % 2) m = -m;
      wr(0, 2'(k), 16'(base + off)); wr(1, 2'(k), 16'(m)); wr(2, 2'(k), 16'(len));
      for (int s = 0; s < 3 * len + 5; s++) begin
        @(negedge clk); acc_en = 1; acc_idx = 2'(k); acc_brev = 0;
        #1 check(addr == 16'(base + off),
                 $sformatf("circular L=%0d M=%0d base=%0d step %0d: %0d vs %0d",
                           len, m, base, s, addr, base + off));
        off = ((off + m) % len + len) % len;
      end
      @(negedge clk); acc_en = 0;
    end
    // bit reversal of the low 12 bits
    for (int t = 0; t < 20; t++) begin
      logic [15:0] a, e;
      a = 16'($urandom);
      wr(0, 2'd1, a);
      e = a;
      for (int b = 0; b < 12; b++) e[b] = a[11-b];
      @(negedge clk); acc_brev = 1; acc_idx = 2'd1; acc_en = 0;
      #1 check(addr == e, "bit reverse");
      acc_brev = 0;
    end
    check(i_regs[1] != 16'hx, "index registers visible");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
