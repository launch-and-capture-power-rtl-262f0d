// odd_inverter: last stage of both link encoders and the core of the decoder.
//
// When inv is 1 every odd-numbered bit of the W-bit word is inverted and the
// even bits pass unchanged; when inv is 0 the word passes unchanged. Applying
// it twice with the same inv restores the word, which is what lets the
// decoder reuse the encoder's last stage. Combinational.
module odd_inverter #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] d,
  input  logic         inv,
  output logic [W-1:0] q
);

  logic [W-1:0] odd_mask;

  always_comb begin
    for (int unsigned i = 0; i < W; i++) odd_mask[i] = i[0];
    q = inv ? (d ^ odd_mask) : d;
  end

endmodule
