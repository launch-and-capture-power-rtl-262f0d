// tb_link_reg: loads random words with random gaps and checks that the lines
// change only one clock after a valid word, hold their value while idle, that
// q_valid is a one-cycle copy of in_valid, and that reset zeroes the lines.
module tb_link_reg;
  localparam int W = 32;
  logic clk = 1'b0, rst_n, in_valid, q_valid;
  logic [W-1:0] d, q;
  int checks = 0, failures = 0, holds = 0;

  link_reg #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp;
    rst_n = 1'b0; in_valid = 1'b1; d = '1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== '0 || q_valid !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    exp = '0;
    for (int k = 0; k < 3000; k++) begin
      in_valid = ($urandom % 3) != 0;
      d = $urandom;
      @(posedge clk);
      #1;
      if (in_valid) exp = d; else holds++;
      checks += 2;
      if (q !== exp) begin failures++; $display("FAIL q=%h exp=%h", q, exp); end
      if (q_valid !== in_valid) begin failures++; $display("FAIL q_valid"); end
    end
    checks++;
    if (holds == 0) begin failures++; $display("FAIL no idle cycle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
