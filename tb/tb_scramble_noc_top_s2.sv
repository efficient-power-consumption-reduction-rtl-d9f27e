// tb_scramble_noc_top_s2: end-to-end test of scramble_noc_top with encoding
// scheme II (odd or full inversion) at link width 8, through tb_top_harness.
module tb_scramble_noc_top_s2;
  bit done;
  int checks, failures;

  tb_top_harness #(.SCHEME(2)) u_h (.done(done), .checks(checks), .failures(failures));

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge done) begin
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
