// tb_majority_voter: checks the voter at N = 31 (the 32-line link) and N = 7
// against a bit count made in the testbench, on corner cases (all zeros, all
// ones, exactly half and half plus one) and random vectors.
module tb_majority_voter;
  localparam int N1 = 31, N2 = 7;
  logic [N1-1:0] v1;
  logic [N2-1:0] v2;
  logic m1, m2;
  int checks = 0, failures = 0;

  majority_voter #(.N(N1)) dut1 (.votes(v1), .maj(m1));
  majority_voter #(.N(N2)) dut2 (.votes(v2), .maj(m2));

  function automatic bit ref_maj(logic [63:0] v, int n);
    int ones = 0;
    for (int i = 0; i < n; i++) ones += int'(v[i]);
    return ones > n - ones;
  endfunction

  task automatic check();
    #1;
    checks += 2;
    if (m1 !== ref_maj(64'(v1), N1)) begin failures++; $display("FAIL N=31 v=%h m=%b", v1, m1); end
    if (m2 !== ref_maj(64'(v2), N2)) begin failures++; $display("FAIL N=7 v=%h m=%b", v2, m2); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v1 = '0; v2 = '0; check();
    v1 = '1; v2 = '1; check();
    v1 = 31'h0000_7FFF; v2 = 7'h07; check();   // 15 of 31, 3 of 7: no majority
    v1 = 31'h0000_FFFF; v2 = 7'h0F; check();   // 16 of 31, 4 of 7: majority
    for (int k = 0; k < 2000; k++) begin
      v1 = 31'($urandom); v2 = 7'($urandom); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
