// ty_detect: transition-type detector for one pair of adjacent link lines.
//
// The pair holds one odd line (the one odd inversion would flip, "flip") and
// one even line ("keep"). x_* is the current, not yet encoded, value and y_*
// the value now on the link (the previously encoded flit). The output ty is 1
// when inverting the odd line of this pair would lower the pair's switching
// cost, that is for
//   * Type I with only the odd line switching (cost 2 -> 0), and
//   * Type II, both lines switching in opposite directions (cost 4 -> 2).
// Cost here is one unit per line that toggles plus one unit per unit change of
// the voltage difference between the two lines (Type I: 1, Type II: 2,
// Type III and IV: 0). The set of types follows the published Ty block, whose
// exact table is not given; the cost weights are this design's choice.
// Purely combinational, no clock.
module ty_detect (
  input  logic x_flip,  // current value of the odd line of the pair
  input  logic x_keep,  // current value of the even line of the pair
  input  logic y_flip,  // value on the link of the odd line
  input  logic y_keep,  // value on the link of the even line
  output logic ty       // 1: odd inversion helps this pair
);

  logic d_flip;  // odd line would toggle if sent as is
  logic d_keep;  // even line would toggle if sent as is

  always_comb begin
    d_flip = x_flip ^ y_flip;
    d_keep = x_keep ^ y_keep;
    // Odd line toggles and either the even line is still (Type I) or the two
    // link values differ, which makes a double toggle opposite (Type II).
    ty     = d_flip & (~d_keep | (y_flip ^ y_keep));
  end

endmodule
