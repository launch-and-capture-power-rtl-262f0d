// tb_precomp_encoder: random and directed flits, W = 32 and W = 8. The
// testbench walks the data lines from the top down, stops at the first line
// whose value differs from the link, and expects an odd inversion exactly when
// that line is odd; then checks the whole encoded word and that the most
// significant transition is indeed removed when the encoder inverts.
module tb_precomp_encoder;
  localparam int W1 = 32, W2 = 8;
  logic [W1-2:0] x1; logic [W1-1:0] y1, e1; logic i1;
  logic [W2-2:0] x2; logic [W2-1:0] y2, e2; logic i2;
  int checks = 0, failures = 0;
  int inverted = 0;

  precomp_encoder #(.W(W1)) dut1 (.x(x1), .y(y1), .enc(e1), .inv(i1));
  precomp_encoder #(.W(W2)) dut2 (.x(x2), .y(y2), .enc(e2), .inv(i2));

  function automatic logic [63:0] ref_enc(logic [63:0] x, logic [63:0] y, int w);
    logic [63:0] r;
    bit do_inv = 1'b0;
    for (int i = w - 2; i >= 0; i--)
      if (x[i] != y[i]) begin
        do_inv = (i % 2 == 1);
        break;
      end
    r = '0;
    for (int i = 0; i < w - 1; i++) r[i] = (do_inv && (i % 2 == 1)) ? ~x[i] : x[i];
    r[w-1] = do_inv;
    return r;
  endfunction

  task automatic check();
    logic [63:0] r1, r2;
    #1;
    r1 = ref_enc(64'(x1), 64'(y1), W1);
    r2 = ref_enc(64'(x2), 64'(y2), W2);
    checks += 3;
    if (64'(e1) !== r1) begin failures++; $display("FAIL W=32 x=%h y=%h e=%h exp=%h", x1, y1, e1, r1); end
    if (64'(e2) !== r2) begin failures++; $display("FAIL W=8 x=%h y=%h e=%h exp=%h", x2, y2, e2, r2); end
    if (e1[W1-1] !== i1 || e2[W2-1] !== i2) begin failures++; $display("FAIL inversion line"); end
    if (i1) inverted++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x1 = '0; y1 = '0; x2 = '0; y2 = '0; check();           // no variation
    checks++; if (i1 || i2) begin failures++; $display("FAIL inverted without variation"); end
    x1 = 31'h4000_0000; y1 = '0; x2 = 7'h40; y2 = '0; check(); // MSB line 30 / 6 even
    checks++; if (i1 || i2) begin failures++; $display("FAIL inverted on even first variation"); end
    x1 = 31'h2000_0001; y1 = '0; x2 = 7'h21; y2 = '0; check(); // first variation line 29 / 5, odd
    checks++; if (!i1 || !i2) begin failures++; $display("FAIL no inversion on odd first variation"); end
    checks++; if (e1[29] !== y1[29]) begin failures++; $display("FAIL top transition not removed"); end
    x1 = 31'h0000_0002; y1 = 32'h8000_0000; x2 = 7'h02; y2 = 8'h80; check(); // inv line alone differs
    checks++; if (!i1 || !i2) begin failures++; $display("FAIL line 1 first variation"); end
    for (int k = 0; k < 5000; k++) begin
      x1 = 31'($urandom); y1 = $urandom; x2 = 7'($urandom); y2 = 8'($urandom);
      check();
    end
    $display("inverted %0d of %0d flits", inverted, 5004);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
