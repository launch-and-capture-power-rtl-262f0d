// data_encoder: odd-invert link encoder with pairwise transition detectors.
//
// Input x is the (W-1)-bit body flit to send; y is the W-bit word now on the
// link (the previously encoded flit, y[W-1] being its inversion line). The
// flit is widened to W bits with a 0 on the inversion line and compared with
// y pair by pair: W-1 ty_detect blocks look at lines (i, i+1), i = 0..W-2,
// each deciding whether inverting the odd line of its pair would save
// switching. A majority_voter over those W-1 votes sets inv, and an
// odd_inverter flips the odd lines (the inversion line included) when inv is
// 1. This is the three-stage structure of the published scheme; the detector
// cost model and the choice to let the inversion line take part in the last
// pair are this design's. W must be even so that the inversion line is odd.
// Purely combinational: the caller registers enc onto the link.
module data_encoder #(
  parameter int unsigned W = link_enc_pkg::LINK_W
) (
  input  logic [W-2:0] x,    // body flit to send
  input  logic [W-1:0] y,    // encoded word currently on the link
  output logic [W-1:0] enc,  // encoded word to drive next
  output logic         inv   // inversion decision (equals enc[W-1])
);

  if (W < 2 || W % 2 != 0) begin : g_bad_w
    $error("data_encoder: W must be even and at least 2");
  end

  logic [W-1:0] xe;     // flit with a 0 on the inversion line
  logic [W-2:0] votes;  // one vote per adjacent pair

  assign xe = {1'b0, x};

  for (genvar p = 0; p < W - 1; p++) begin : g_pair
    // Of lines p and p+1 exactly one is odd; that is the one inversion flips.
    localparam int unsigned F = (p % 2 == 1) ? p : p + 1;
    localparam int unsigned K = (p % 2 == 1) ? p + 1 : p;
    ty_detect u_ty (
      .x_flip(xe[F]),
      .x_keep(xe[K]),
      .y_flip(y[F]),
      .y_keep(y[K]),
      .ty    (votes[p])
    );
  end

  majority_voter #(.N(W - 1)) u_vote (
    .votes(votes),
    .maj  (inv)
  );

  odd_inverter #(.W(W)) u_inv (
    .d  (xe),
    .inv(inv),
    .q  (enc)
  );

endmodule
