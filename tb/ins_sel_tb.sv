// ins_sel_tb: checks the instruction select against the memory map: real mode
// passes the whole word, complex mode takes bits [31:16] at even PC and [15:0]
// at odd PC.
module ins_sel_tb;
  logic [31:0] word, ins; logic mode, pc_s;
  ins_sel dut (.*);
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [31:0] e;
    for (int t = 0; t < 200; t++) begin
      word = $urandom; mode = 1'($urandom); pc_s = 1'($urandom);
      #1;
      e = mode ? word : (pc_s ? {16'h0, word[15:0]} : {16'h0, word[31:16]});
      checks++;
      if (ins !== e) begin failures++; $display("FAIL mode=%0d pc_s=%0d", mode, pc_s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
