// io_ports_tb: checks that reads sample the input pins at the end of the
// request cycle, writes update the output registers, and that each access gives
// a one-cycle strobe on exactly the ports touched.
module io_ports_tb;
  import rpe_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  rdata_t [7:0] pin, wr_data, rd_q, pout; logic [7:0] rd_en, wr_en, rd_stb, wr_stb;
  io_ports dut (.*);
  int checks = 0, failures = 0;
  rdata_t mq [8], mo [8];
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
    pin = '0; wr_data = '0; rd_en = '0; wr_en = '0;
    for (int p = 0; p < 8; p++) begin mq[p] = 0; mo[p] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      logic [7:0] r, w;
      @(negedge clk);
      for (int p = 0; p < 8; p++) begin pin[p] = 16'($urandom); wr_data[p] = 16'($urandom); end
      r = 8'($urandom); w = 8'($urandom);
      rd_en = r; wr_en = w;
      for (int p = 0; p < 8; p++) begin
        if (r[p]) mq[p] = pin[p];
        if (w[p]) mo[p] = wr_data[p];
      end
      @(negedge clk);
      rd_en = '0; wr_en = '0;
      check(rd_stb == r && wr_stb == w, "strobes");
      for (int p = 0; p < 8; p++) check(rd_q[p] == mq[p] && pout[p] == mo[p], $sformatf("port %0d", p));
      @(negedge clk);
      check(rd_stb == 0 && wr_stb == 0, "strobe is one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
