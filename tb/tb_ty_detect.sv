// tb_ty_detect: exhaustive check of the pair transition-type detector.
// For all 16 combinations of current and link values it computes the pair's
// switching cost (toggling lines plus change of the line-to-line difference)
// with and without inverting the odd line, and expects ty = 1 exactly when the
// inverted cost is lower.
module tb_ty_detect;
  logic x_flip, x_keep, y_flip, y_keep, ty;
  int checks = 0, failures = 0;

  ty_detect dut (.*);

  function automatic int pair_cost(bit a0, bit b0, bit a1, bit b1);
    int self_c, dv;
    self_c = int'(a0 != a1) + int'(b0 != b1);
    dv     = (int'(a1) - int'(b1)) - (int'(a0) - int'(b0));
    return self_c + (dv < 0 ? -dv : dv);
  endfunction

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      bit exp;
      {x_flip, x_keep, y_flip, y_keep} = 4'(v);
      #1;
      exp = pair_cost(y_flip, y_keep, ~x_flip, x_keep) < pair_cost(y_flip, y_keep, x_flip, x_keep);
      checks++;
      if (ty !== exp) begin
        failures++;
        $display("FAIL x=%b%b y=%b%b ty=%b exp=%b", x_flip, x_keep, y_flip, y_keep, ty, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
