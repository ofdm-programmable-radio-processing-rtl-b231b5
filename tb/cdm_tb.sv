// cdm_tb: complex data memory test. Fills words through the host port and the
// processor port, then reads them back and checks the one-cycle read latency
// (data appear in the cycle after the address, as in Writeback).
module cdm_tb;
  import rpe_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en, we, hwe; logic [5:0] addr, haddr; cplx_t wdata, rdata, hwdata;
  cdm #(.DEPTH(64)) dut (.*);
  int checks = 0, failures = 0;
  cplx_t m [64];
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    en = 0; we = 0; hwe = 0; addr = 0; haddr = 0; wdata = '0; hwdata = '0;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      if (a % 2) begin hwe = 1; en = 0; haddr = 6'(a); hwdata = {16'($urandom), 16'($urandom)}; m[a] = hwdata; end
      else begin hwe = 0; en = 1; we = 1; addr = 6'(a); wdata = {16'($urandom), 16'($urandom)}; m[a] = wdata; end
    end
    @(negedge clk); hwe = 0; en = 0; we = 0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk); en = 1; we = 0; addr = 6'($urandom);
      @(negedge clk); en = 0;
      checks++;
      if (rdata !== m[addr]) begin failures++; $display("FAIL read %0d", addr); end
      if (t % 7 == 0) begin
        @(negedge clk); en = 1; we = 1; wdata = {16'($urandom), 16'($urandom)}; m[addr] = wdata;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
