// ones_counter: counts the 1s among N detector outputs (the "Ones" blocks of
// the scheme II encoder). For N = W-1 detectors the count is log2(W) bits
// wide, as in the design. Purely combinational.
module ones_counter #(
  parameter int unsigned N  = 7,
  parameter int unsigned CW = $clog2(N + 1)
) (
  input  logic [N-1:0]  bits_in,
  output logic [CW-1:0] count
);

  always_comb begin
    count = '0;
    for (int unsigned i = 0; i < N; i++) begin
      count = count + CW'(bits_in[i]);
    end
  end

endmodule
