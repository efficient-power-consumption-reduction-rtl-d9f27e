// encoder_scheme1: block E of encoding scheme I (odd inversion).
//
// x is the flit to send: W-1 payload bits with a 0 in bit W-1. y is the flit
// last sent on the link, whose bit W-1 is its inversion flag. One
// pair_classifier per adjacent wire pair (W-1 of them) flags the pairs for
// which inverting the odd-numbered wire lowers the switching cost; a
// majority_voter inverts the odd wires when more than (W-1)/2 pairs are
// flagged. Odd wires are XORed with the decision and even wires pass
// unchanged, so bit W-1 (odd for even W) of z carries the decision as the
// inversion flag. Purely combinational; the register holding y sits in the
// network interface.
module encoder_scheme1 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] z,
  output logic         odd_inv
);

  if (W % 2 != 0 || W < 4) begin : g_bad_width
    $error("encoder_scheme1: W must be even and at least 4");
  end

  logic [W-2:0] ty;

  for (genvar i = 0; i < W - 1; i++) begin : g_pair
    logic t2_unused, t4_unused;
    pair_classifier #(.LO_IS_ODD(i % 2 == 1)) u_ty (
      .x  (x[i+1:i]),
      .y  (y[i+1:i]),
      .ty (ty[i]),
      .t2 (t2_unused),
      .t4 (t4_unused)
    );
  end

  majority_voter #(.N(W - 1)) u_vote (
    .votes (ty),
    .vote  (odd_inv)
  );

  for (genvar i = 0; i < W; i++) begin : g_out
    if (i % 2 == 1) begin : g_odd
      assign z[i] = x[i] ^ odd_inv;
    end else begin : g_even
      assign z[i] = x[i];
    end
  end

endmodule
