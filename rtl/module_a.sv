// module_a: decision stage of the scheme II encoder. It receives three
// counts over the W-1 wire pairs of the link:
//   n_odd      - pairs whose cost odd inversion lowers   (Ty),
//   n_full_dec - pairs whose cost full inversion lowers  (T2),
//   n_full_inc - pairs whose cost full inversion raises  (T4**),
// and chooses one action per flit. Odd inversion qualifies under the scheme I
// rule (n_odd > (W-1)/2); full inversion qualifies when it helps more pairs
// than it hurts (n_full_dec > n_full_inc). When both qualify the larger
// margin wins, odd inversion on a tie: margin of odd = 2*n_odd - (W-1),
// margin of full = n_full_dec - n_full_inc. The two rules and the tie-break
// are this implementation's choice; the design only names the three counts
// and the two outputs. Combinational; half_invert and full_invert are never
// both 1.
module module_a #(
  parameter int unsigned W  = 8,
  parameter int unsigned CW = $clog2(W)
) (
  input  logic [CW-1:0] n_odd,
  input  logic [CW-1:0] n_full_dec,
  input  logic [CW-1:0] n_full_inc,
  output logic          half_invert,
  output logic          full_invert
);

  localparam int SW = CW + 3;   // signed width for the margins

  logic signed [SW-1:0] odd_margin, full_margin;
  logic                 odd_ok, full_ok;

  always_comb begin
    odd_margin  = 2 * $signed({3'b000, n_odd}) - SW'(W - 1);
    full_margin = $signed({3'b000, n_full_dec}) - $signed({3'b000, n_full_inc});
    odd_ok      = odd_margin > 0;
    full_ok     = full_margin > 0;
    full_invert = full_ok && (!odd_ok || (full_margin > odd_margin));
    half_invert = odd_ok && !full_invert;
  end

endmodule
