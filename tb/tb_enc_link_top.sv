// tb_enc_link_top: end-to-end run of the encoded link at its default width.
//
// The same stream of random body flits, with random idle cycles, is sent three
// times: once with the majority (pairwise) encoder, once with the
// precomputation encoder, and once with the mode changed at random on every
// cycle. For every flit the testbench checks
//   * the word on the link against its own model of the selected encoder,
//     kept on its own copy of the link state,
//   * that link_valid follows in_valid by one clock and out_valid by two, and
//   * that the decoded flit equals the flit sent.
// It counts how often each mechanism happens (inversion by each encoder, a
// flit sent as is by each, a mode change in mid-stream, an idle cycle with the
// lines held, a flit equal to the link value) and fails if one never did.
// Finally it prints the switching cost (line toggles plus changes of the
// difference between neighbouring lines) of the unencoded stream and of the
// two encoded ones, and requires the majority encoder to beat the unencoded
// link on this random data.
module tb_enc_link_top;
  import link_enc_pkg::*;
  localparam int W = LINK_W;
  localparam int NFLITS = 3000;

  logic clk = 1'b0, rst_n;
  enc_mode_e mode;
  logic in_valid, link_valid, out_valid;
  logic [W-2:0] in_data, out_data;
  logic [W-1:0] link_data;

  enc_link_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_inv_maj = 0, n_plain_maj = 0, n_inv_pre = 0, n_plain_pre = 0;
  int n_mode_change = 0, n_idle = 0, n_same = 0;
  longint cost_raw = 0, cost_maj = 0, cost_pre = 0;

  logic [W-2:0] flits [NFLITS];
  logic         gaps  [NFLITS];

  // ---------------- independent reference ----------------
  function automatic int pair_cost(bit a0, bit b0, bit a1, bit b1);
    int self_c, dv;
    self_c = int'(a0 != a1) + int'(b0 != b1);
    dv     = (int'(a1) - int'(b1)) - (int'(a0) - int'(b0));
    return self_c + (dv < 0 ? -dv : dv);
  endfunction

  function automatic int word_cost(logic [W-1:0] a, logic [W-1:0] b);
    int c = 0;
    for (int i = 0; i < W; i++) c += int'(a[i] != b[i]);
    for (int p = 0; p < W - 1; p++) begin
      int dv;
      dv = (int'(b[p+1]) - int'(b[p])) - (int'(a[p+1]) - int'(a[p]));
      c += (dv < 0 ? -dv : dv);
    end
    return c;
  endfunction

  function automatic logic [W-1:0] odd_inv(logic [W-1:0] v);
    for (int i = 1; i < W; i += 2) v[i] = ~v[i];
    return v;
  endfunction

  function automatic logic [W-1:0] ref_maj(logic [W-2:0] x, logic [W-1:0] y);
    logic [W-1:0] xe, xi;
    int gain = 0;
    xe = {1'b0, x};
    xi = odd_inv(xe);
    for (int p = 0; p < W - 1; p++)
      if (pair_cost(y[p], y[p+1], xi[p], xi[p+1]) < pair_cost(y[p], y[p+1], xe[p], xe[p+1]))
        gain++;
    return (gain > (W - 1) - gain) ? xi : xe;
  endfunction

  function automatic logic [W-1:0] ref_pre(logic [W-2:0] x, logic [W-1:0] y);
    for (int i = W - 2; i >= 0; i--)
      if (x[i] != y[i]) return (i % 2 == 1) ? odd_inv({1'b0, x}) : {1'b0, x};
    return {1'b0, x};
  endfunction

  // ---------------- one pass over the stream ----------------
  // pass 0: majority, 1: precomputation, 2: random mode every cycle
  task automatic run_pass(int pass, ref longint cost);
    logic [W-1:0] model_link;
    logic [W-2:0] sent_q [$];
    enc_mode_e prev_mode;
    rst_n = 1'b0; in_valid = 1'b0; in_data = '0; mode = ENC_MAJORITY;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    model_link = '0;
    prev_mode = ENC_MAJORITY;
    for (int k = 0; k < NFLITS + 2; k++) begin
      logic exp_link_valid, exp_out_valid;
      logic [W-1:0] exp_word;
      @(negedge clk);
      // drive this cycle's input
      if (k < NFLITS) begin
        in_valid = !gaps[k];
        in_data  = flits[k];
      end else begin
        in_valid = 1'b0;
      end
      case (pass)
        0: mode = ENC_MAJORITY;
        1: mode = ENC_PRECOMP;
        default: mode = enc_mode_e'($urandom_range(0, 1));
      endcase
      if (pass == 2 && mode != prev_mode && k > 0 && k < NFLITS) n_mode_change++;
      prev_mode = mode;
      exp_word = (mode == ENC_PRECOMP) ? ref_pre(in_data, model_link) : ref_maj(in_data, model_link);
      if (in_valid) begin
        if (in_data == model_link[W-2:0]) n_same++;
        if (mode == ENC_PRECOMP) begin
          if (exp_word[W-1]) n_inv_pre++; else n_plain_pre++;
        end else begin
          if (exp_word[W-1]) n_inv_maj++; else n_plain_maj++;
        end
      end else if (k < NFLITS) n_idle++;
      exp_link_valid = in_valid;
      @(posedge clk);
      #1;
      // one clock later: the link
      checks += 2;
      if (link_valid !== exp_link_valid) begin failures++; $display("FAIL pass %0d k %0d link_valid", pass, k); end
      if (exp_link_valid) begin
        cost += longint'(word_cost(model_link, exp_word));
        model_link = exp_word;
        sent_q.push_back(in_data);
      end
      if (link_data !== model_link) begin
        failures++;
        $display("FAIL pass %0d k %0d link=%h exp=%h", pass, k, link_data, model_link);
      end
      // two clocks after a flit: the decoded output
      exp_out_valid = (k > 0 && k - 1 < NFLITS) ? !gaps[k-1] : 1'b0;
      checks++;
      if (out_valid !== exp_out_valid) begin failures++; $display("FAIL pass %0d k %0d out_valid", pass, k); end
      if (out_valid) begin
        checks++;
        if (sent_q.size() == 0) begin
          failures++; $display("FAIL output without input");
        end else begin
          logic [W-2:0] exp_flit;
          exp_flit = sent_q.pop_front();
          if (out_data !== exp_flit) begin
            failures++; $display("FAIL pass %0d k %0d out=%h exp=%h", pass, k, out_data, exp_flit);
          end
        end
      end
    end
    checks++;
    if (sent_q.size() != 0) begin failures++; $display("FAIL %0d flits not delivered", sent_q.size()); end
  endtask

  initial begin
    repeat (5 * (NFLITS + 20)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static longint cost_mix = 0;
    logic [W-1:0] raw_link;
    // stream: random flits, a few repeats, about one idle cycle in six
    for (int k = 0; k < NFLITS; k++) begin
      flits[k] = (k > 0 && $urandom_range(0, 19) == 0) ? flits[k-1] : (W - 1)'({$urandom, $urandom});
      gaps[k]  = $urandom_range(0, 5) == 0;
    end
    raw_link = '0;
    for (int k = 0; k < NFLITS; k++)
      if (!gaps[k]) begin
        cost_raw += longint'(word_cost(raw_link, {1'b0, flits[k]}));
        raw_link = {1'b0, flits[k]};
      end

    run_pass(0, cost_maj);
    run_pass(1, cost_pre);
    run_pass(2, cost_mix);

    $display("switching cost: unencoded %0d, majority %0d, precomputation %0d, mixed %0d",
             cost_raw, cost_maj, cost_pre, cost_mix);
    $display("events: inv_maj=%0d plain_maj=%0d inv_pre=%0d plain_pre=%0d mode_changes=%0d idle=%0d same=%0d",
             n_inv_maj, n_plain_maj, n_inv_pre, n_plain_pre, n_mode_change, n_idle, n_same);
    checks += 8;
    if (n_inv_maj == 0)     begin failures++; $display("FAIL majority encoder never inverted"); end
    if (n_plain_maj == 0)   begin failures++; $display("FAIL majority encoder never sent plain"); end
    if (n_inv_pre == 0)     begin failures++; $display("FAIL precomputation encoder never inverted"); end
    if (n_plain_pre == 0)   begin failures++; $display("FAIL precomputation encoder never sent plain"); end
    if (n_mode_change == 0) begin failures++; $display("FAIL no mode change"); end
    if (n_idle == 0)        begin failures++; $display("FAIL no idle cycle"); end
    if (n_same == 0)        begin failures++; $display("FAIL no repeated flit"); end
    if (cost_maj >= cost_raw) begin failures++; $display("FAIL majority encoding did not reduce switching"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
