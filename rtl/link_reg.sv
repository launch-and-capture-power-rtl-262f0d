// link_reg: the W-line link driver register of the transmitting interface.
//
// Holds the word driven onto the link. A new encoded word is loaded on a
// clock edge where in_valid is 1 and is visible on q one clock later, with
// q_valid high for that one cycle. Between flits the lines keep their last
// value, so idle cycles cause no switching, and q also serves the encoders as
// the "previously encoded flit". Reset (synchronous, active low) drives all
// lines to 0, i.e. a not-inverted all-zero word. Holding the lines when idle
// and the reset value are this design's choices.
module link_reg #(
  parameter int unsigned W = link_enc_pkg::LINK_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] d,
  output logic         q_valid,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q       <= '0;
      q_valid <= 1'b0;
    end else begin
      q_valid <= in_valid;
      if (in_valid) q <= d;
    end
  end

endmodule
