// data_decoder: receiving side of the odd-invert link.
//
// Takes the W-bit word from the link and, when its inversion line (bit W-1)
// is high, inverts the odd data lines back; the restored (W-1)-bit body flit
// is registered, so data appears one clock after the link word, with
// out_valid following link_valid. The published scheme says the decoder "inverts the
// received flit" when the inversion bit is high; since the encoders only
// invert odd lines, only odd lines are inverted back here. Synchronous,
// active-low reset clears out_valid and out_data.
module data_decoder #(
  parameter int unsigned W = link_enc_pkg::LINK_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         link_valid,  // a new word arrived on the link
  input  logic [W-1:0] link_data,   // word on the link, inversion line on top
  output logic         out_valid,
  output logic [W-2:0] out_data     // decoded body flit
);

  logic [W-2:0] restored;

  // Odd positions of the data lines are the same in the W-1 low bits.
  odd_inverter #(.W(W - 1)) u_inv (
    .d  (link_data[W-2:0]),
    .inv(link_data[W-1]),
    .q  (restored)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= link_valid;
      if (link_valid) out_data <= restored;
    end
  end

endmodule
