// tb_odd_inverter: random words with inv = 0 and 1; expects only the odd bits
// to flip, built bit by bit in the testbench, and that a second pass restores
// the word.
module tb_odd_inverter;
  localparam int W = 32;
  logic [W-1:0] d, q, q2;
  logic inv;
  int checks = 0, failures = 0;

  odd_inverter #(.W(W)) dut (.d(d), .inv(inv), .q(q));
  odd_inverter #(.W(W)) dut2 (.d(q), .inv(inv), .q(q2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 1000; k++) begin
      logic [W-1:0] exp;
      d = $urandom; inv = 1'($urandom);
      #1;
      for (int i = 0; i < W; i++) exp[i] = (inv && (i % 2 == 1)) ? ~d[i] : d[i];
      checks += 2;
      if (q !== exp) begin failures++; $display("FAIL d=%h inv=%b q=%h exp=%h", d, inv, q, exp); end
      if (q2 !== d) begin failures++; $display("FAIL double inversion d=%h q2=%h", d, q2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
