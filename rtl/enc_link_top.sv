// enc_link_top: a low-power link with a selectable inversion encoder.
//
// Transmit side: a (W-1)-bit body flit enters with in_valid. Both encoders
// look at it and at the word now on the link; the mode input picks which
// decision is used, data_encoder (pairwise transition detectors and a
// majority vote) or precomp_encoder (MSB-first scan for the first variation).
// The chosen W-bit word, its top line carrying the inversion bit, is loaded
// into link_reg and driven on link_data one clock later. Receive side:
// data_decoder restores the flit from the link word and registers it, so
// out_data/out_valid follow in_data/in_valid by two clocks, one flit per
// clock, no back-pressure. Because both encoders compare against the one
// link register, the mode may change on any cycle, even mid-stream.
// Offering both decisions behind a mode pin is this design's way of holding
// the two published schemes; reset is synchronous, active low.
module enc_link_top
  import link_enc_pkg::*;
#(
  parameter int unsigned W = LINK_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  enc_mode_e    mode,        // inversion decision to use
  input  logic         in_valid,    // body flit present
  input  logic [W-2:0] in_data,     // body flit to send
  output logic [W-1:0] link_data,   // lines of the link, inversion line on top
  output logic         link_valid,  // link_data holds a new word this cycle
  output logic         out_valid,   // decoded flit present
  output logic [W-2:0] out_data     // decoded body flit
);

  logic [W-1:0] enc_maj, enc_pre, enc_sel;
  logic         inv_maj, inv_pre;

  data_encoder #(.W(W)) u_enc_maj (
    .x  (in_data),
    .y  (link_data),
    .enc(enc_maj),
    .inv(inv_maj)
  );

  precomp_encoder #(.W(W)) u_enc_pre (
    .x  (in_data),
    .y  (link_data),
    .enc(enc_pre),
    .inv(inv_pre)
  );

  assign enc_sel = (mode == ENC_PRECOMP) ? enc_pre : enc_maj;

  link_reg #(.W(W)) u_link (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(in_valid),
    .d       (enc_sel),
    .q_valid (link_valid),
    .q       (link_data)
  );

  data_decoder #(.W(W)) u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .link_valid(link_valid),
    .link_data (link_data),
    .out_valid (out_valid),
    .out_data  (out_data)
  );

`ifndef SYNTHESIS
  // The inversion line of each encoder must agree with its decision.
  always_comb begin
    assert (enc_maj[W-1] == inv_maj) else $error("majority encoder inversion line mismatch");
    assert (enc_pre[W-1] == inv_pre) else $error("precomputation encoder inversion line mismatch");
  end
`endif

endmodule
