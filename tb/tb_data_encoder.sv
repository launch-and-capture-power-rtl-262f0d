// tb_data_encoder: random flits against random link words, W = 32 and W = 8.
// The expected word is built in the testbench from first principles: for each
// adjacent line pair it compares the switching cost (toggles plus change of
// the line-to-line difference) of sending the pair as is and with its odd line
// inverted, counts the pairs that gain, takes a strict majority and inverts
// the odd lines. Also checks that the inversion line carries the decision and
// that undoing the odd inversion gives back the flit.
module tb_data_encoder;
  localparam int W1 = 32, W2 = 8;
  logic [W1-2:0] x1; logic [W1-1:0] y1, e1; logic i1;
  logic [W2-2:0] x2; logic [W2-1:0] y2, e2; logic i2;
  int checks = 0, failures = 0;
  int inverted = 0;

  data_encoder #(.W(W1)) dut1 (.x(x1), .y(y1), .enc(e1), .inv(i1));
  data_encoder #(.W(W2)) dut2 (.x(x2), .y(y2), .enc(e2), .inv(i2));

  function automatic int pair_cost(bit a0, bit b0, bit a1, bit b1);
    int self_c, dv;
    self_c = int'(a0 != a1) + int'(b0 != b1);
    dv     = (int'(a1) - int'(b1)) - (int'(a0) - int'(b0));
    return self_c + (dv < 0 ? -dv : dv);
  endfunction

  // Reference encoder for a w-line link (w <= 64).
  function automatic logic [63:0] ref_enc(logic [63:0] x, logic [63:0] y, int w);
    logic [63:0] xe, xi, r;
    int gain = 0;
    xe = x; xe[w-1] = 1'b0;
    xi = xe;
    for (int i = 1; i < w; i += 2) xi[i] = ~xe[i];
    for (int p = 0; p < w - 1; p++)
      if (pair_cost(y[p], y[p+1], xi[p], xi[p+1]) < pair_cost(y[p], y[p+1], xe[p], xe[p+1]))
        gain++;
    r = (gain > (w - 1) - gain) ? xi : xe;
    for (int i = w; i < 64; i++) r[i] = 1'b0;
    return r;
  endfunction

  task automatic check();
    logic [63:0] r1, r2;
    #1;
    r1 = ref_enc(64'(x1), 64'(y1), W1);
    r2 = ref_enc(64'(x2), 64'(y2), W2);
    checks += 4;
    if (64'(e1) !== r1) begin failures++; $display("FAIL W=32 x=%h y=%h e=%h exp=%h", x1, y1, e1, r1); end
    if (64'(e2) !== r2) begin failures++; $display("FAIL W=8 x=%h y=%h e=%h exp=%h", x2, y2, e2, r2); end
    if (e1[W1-1] !== i1 || e2[W2-1] !== i2) begin failures++; $display("FAIL inversion line"); end
    if ((e1[W1-2:0] ^ (i1 ? 31'h2AAA_AAAA : 31'h0)) !== x1) begin failures++; $display("FAIL W=32 not decodable"); end
    if (i1) inverted++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // No change at all: never invert.
    x1 = '0; y1 = '0; x2 = '0; y2 = '0; check();
    // Every odd line toggles alone: inverting removes all transitions.
    x1 = 31'h2AAA_AAAA; y1 = '0; x2 = 7'h2A; y2 = '0; check();
    checks++;
    if (!i1 || !i2) begin failures++; $display("FAIL odd-only toggles not inverted"); end
    for (int k = 0; k < 5000; k++) begin
      x1 = 31'($urandom); y1 = $urandom; x2 = 7'($urandom); y2 = 8'($urandom);
      check();
    end
    checks++;
    if (inverted == 0) begin failures++; $display("FAIL never inverted"); end
    $display("inverted %0d of %0d flits", inverted, 5002);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
