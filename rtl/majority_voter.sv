// majority_voter: second stage of the pairwise link encoder.
//
// Counts the ones among N detector outputs and raises maj when they are
// strictly more than the zeros (ones > N/2), as the published voter does.
// With N odd there is never a tie. The count is a plain adder tree (the
// published scheme gives the function, not the circuit). Combinational.
module majority_voter #(
  parameter int unsigned N = 31  // number of votes; w-1 for a w-line link
) (
  input  logic [N-1:0] votes,
  output logic         maj
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [CW-1:0] ones;

  always_comb begin
    ones = '0;
    for (int unsigned i = 0; i < N; i++) ones = ones + CW'(votes[i]);
    // ones > zeros  <=>  2*ones > N
    maj = ({1'b0, ones} << 1) > (CW + 1)'(N);
  end

endmodule
