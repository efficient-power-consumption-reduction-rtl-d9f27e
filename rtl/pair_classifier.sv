// pair_classifier: transition detector for one pair of adjacent link wires
// (the Ty, T2 and T4** blocks of the encoders).
//
// It compares the pair as it would go out now (x, from the incoming flit)
// with the pair as it went out last (y, from the previously encoded flit)
// and reports, using the cost model of scramble_pkg:
//   ty      - inverting the odd-numbered wire of the pair lowers the cost,
//   t2      - inverting both wires (full inversion) lowers the cost,
//   t4      - inverting both wires raises the cost.
// LO_IS_ODD tells which of the two wires is the odd-numbered one: pair
// (i, i+1) has its odd wire at the top when i is even and at the bottom when
// i is odd. Purely combinational.
module pair_classifier
  import scramble_pkg::*;
#(
  parameter bit LO_IS_ODD = 1'b0
) (
  input  logic [1:0] x,   // [0] = lower wire, [1] = upper wire
  input  logic [1:0] y,
  output logic       ty,
  output logic       t2,
  output logic       t4
);

  localparam logic [1:0] ODD_MASK = LO_IS_ODD ? 2'b01 : 2'b10;

  int unsigned c_plain, c_odd, c_full;

  always_comb begin
    c_plain = pair_cost(y, x);
    c_odd   = pair_cost(y, x ^ ODD_MASK);
    c_full  = pair_cost(y, ~x);
    ty = (c_odd  < c_plain);
    t2 = (c_full < c_plain);
    t4 = (c_full > c_plain);
  end

endmodule
