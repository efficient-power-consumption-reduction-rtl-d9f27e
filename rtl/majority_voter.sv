// majority_voter: second stage of the scheme I encoder. It raises vote when
// more than half of its N inputs are 1 (N = W-1 pair detectors, so the rule is
// count > (W-1)/2). It counts with a ones_counter and compares twice the count
// with N, which keeps the test exact for odd and even N. Combinational.
module majority_voter #(
  parameter int unsigned N = 7
) (
  input  logic [N-1:0] votes,
  output logic         vote
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [CW-1:0] count;

  ones_counter #(.N(N)) u_count (
    .bits_in (votes),
    .count   (count)
  );

  assign vote = ({1'b0, count, 1'b0} > (CW + 2)'(N));

endmodule
