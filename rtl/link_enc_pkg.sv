// link_enc_pkg: constants and types shared by the low-power link encoders.
//
// A w-bit link carries (w-1)-bit body flits plus one inversion line at the
// top (bit w-1). Encoders decide per flit whether to invert the odd-numbered
// lines; the decoder undoes that inversion. LINK_W is the link width w; the
// published scheme leaves it open, so 32 lines is this design's choice.
// Convention: bit 0 is even, so odd lines are 1, 3, 5, ...; with w even the
// inversion line (w-1) is itself odd, so "invert odd lines" also raises it.
package link_enc_pkg;

  // Link width w in wires, inversion line included (design choice).
  parameter int unsigned LINK_W = 32;

  // Which inversion decision drives the link.
  typedef enum logic {
    ENC_MAJORITY = 1'b0,  // pairwise transition-type detectors + majority voter
    ENC_PRECOMP  = 1'b1   // MSB-first single-bit scan (precomputation)
  } enc_mode_e;

endpackage
