// imem_tb: writes random words at random addresses of a small instruction
// memory, reads them back with the one-cycle read latency, and checks that the
// output holds while read enable is low.
module imem_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  logic re, we; logic [7:0] raddr, waddr; logic [31:0] rdata, wdata;
  imem #(.DEPTH(256)) dut (.*);
  int checks = 0, failures = 0;
  logic [31:0] m [256];
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    re = 0; we = 0; raddr = 0; waddr = 0; wdata = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); we = 1; waddr = 8'(a); wdata = $urandom; m[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk); re = 1; raddr = 8'($urandom);
      @(negedge clk); re = 0;
      checks++;
      if (rdata !== m[raddr]) begin failures++; $display("FAIL read %0d", raddr); end
      raddr = raddr + 1'b1;
      @(negedge clk);
      checks++;
      if (rdata !== m[raddr - 1'b1]) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
