// gcr_tb: self-checking test of the general registers.
// Random multi-slot writes are compared with a model array; the complex view
// must pair GR(2k) and GR(2k+1) as GCR k, and the higher slot must win when two
// slots write the same register.
module gcr_tb;
  import rpe_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] we; logic [3:0][2:0] idx; rdata_t [3:0] data;
  rdata_t [7:0] gr; cplx_t [3:0] gcrs;
  gcr dut (.*);
  int checks = 0, failures = 0;
  logic [15:0] m [8];
  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    we = '0; idx = '0; data = '0;
    for (int k = 0; k < 8; k++) m[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int s = 0; s < 4; s++) begin
        we[s] = 1'($urandom); idx[s] = 3'($urandom); data[s] = 16'($urandom);
      end
      for (int s = 0; s < 4; s++) if (we[s]) m[idx[s]] = data[s];
      @(negedge clk);
      we = '0;
      #1;
      for (int k = 0; k < 8; k++) check(gr[k] == m[k], $sformatf("GR%0d", k));
      for (int k = 0; k < 4; k++) check(gcrs[k].re == m[2*k] && gcrs[k].im == m[2*k+1], "GCR pairing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
