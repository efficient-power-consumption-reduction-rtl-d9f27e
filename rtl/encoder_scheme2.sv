// encoder_scheme2: block E of encoding scheme II (odd or full inversion).
//
// x is the flit to send: W-2 payload bits with 0 in bits W-2 and W-1. y is
// the flit last sent on the link. Per adjacent wire pair a pair_classifier
// reports whether odd inversion lowers the pair's cost (Ty), whether full
// inversion lowers it (T2) and whether full inversion raises it (T4**). Three
// ones_counters sum these over the W-1 pairs and module_a picks odd, full or
// no inversion. Odd wires are XORed with (half | full), even wires with full.
// Bit W-1 therefore reads 1 after either inversion and bit W-2 (even) reads
// 1 only after full inversion, which lets the decoder tell the two apart:
// reserving bit W-2 as the second flag is this implementation's choice.
// Purely combinational.
module encoder_scheme2 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] z,
  output logic         half_invert,
  output logic         full_invert
);

  if (W % 2 != 0 || W < 4) begin : g_bad_width
    $error("encoder_scheme2: W must be even and at least 4");
  end

  localparam int unsigned CW = $clog2(W);

  logic [W-2:0]  ty, t2, t4;
  logic [CW-1:0] n_odd, n_full_dec, n_full_inc;

  for (genvar i = 0; i < W - 1; i++) begin : g_pair
    pair_classifier #(.LO_IS_ODD(i % 2 == 1)) u_cls (
      .x  (x[i+1:i]),
      .y  (y[i+1:i]),
      .ty (ty[i]),
      .t2 (t2[i]),
      .t4 (t4[i])
    );
  end

  ones_counter #(.N(W - 1)) u_ones_ty (.bits_in(ty), .count(n_odd));
  ones_counter #(.N(W - 1)) u_ones_t2 (.bits_in(t2), .count(n_full_dec));
  ones_counter #(.N(W - 1)) u_ones_t4 (.bits_in(t4), .count(n_full_inc));

  module_a #(.W(W)) u_decide (
    .n_odd       (n_odd),
    .n_full_dec  (n_full_dec),
    .n_full_inc  (n_full_inc),
    .half_invert (half_invert),
    .full_invert (full_invert)
  );

  for (genvar i = 0; i < W; i++) begin : g_out
    if (i % 2 == 1) begin : g_odd
      assign z[i] = x[i] ^ (half_invert | full_invert);
    end else begin : g_even
      assign z[i] = x[i] ^ full_invert;
    end
  end

endmodule
