// precomp_encoder: odd-invert link encoder with an MSB-first precomputed
// decision.
//
// Same inputs, outputs and last stage as data_encoder, but the inversion
// decision compares one line at a time instead of pairs. Starting at the
// most significant data line (W-2) and walking down to line 0, a ripple chain
// finds the first line whose current value differs from the value on the
// link. If that first variation sits on an odd line, the flit is odd-inverted
// so that this most significant transition disappears; if it sits on an even
// line, or the flit equals the link value, the flit goes out as it is. The
// rest of the flit is not examined, which is the saving of the technique.
// The published scheme describes the MSB-to-LSB scan and inversion on the first
// variation; the odd-line rule that makes the decision concrete is this
// design's reading. W must be even. Purely combinational. The inversion
// line y[W-1] is part of the port for symmetry with data_encoder but does not
// enter the decision, so lint reports that bit as unused.
module precomp_encoder #(
  parameter int unsigned W = link_enc_pkg::LINK_W
) (
  input  logic [W-2:0] x,    // body flit to send
  input  logic [W-1:0] y,    // encoded word currently on the link
  output logic [W-1:0] enc,  // encoded word to drive next
  output logic         inv   // inversion decision (equals enc[W-1])
);

  if (W < 2 || W % 2 != 0) begin : g_bad_w
    $error("precomp_encoder: W must be even and at least 2");
  end

  logic [W-1:0] xe;
  logic [W-2:0] diff;   // line differs from the link
  logic [W-1:0] seen;   // seen[i]: a variation exists on lines above i-1
  logic [W-2:0] first;  // one-hot: most significant variation

  assign xe = {1'b0, x};

  always_comb begin
    diff       = x ^ y[W-2:0];
    seen[W-1]  = 1'b0;
    for (int i = W - 2; i >= 0; i--) begin
      first[i] = diff[i] & ~seen[i+1];
      seen[i]  = seen[i+1] | diff[i];
    end
    inv = 1'b0;
    for (int i = 1; i < W - 1; i += 2) inv = inv | first[i];
  end

  odd_inverter #(.W(W)) u_inv (
    .d  (xe),
    .inv(inv),
    .q  (enc)
  );

endmodule
