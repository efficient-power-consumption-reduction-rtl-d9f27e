// tb_scramble_noc_top: end-to-end test of scramble_noc_top at its default
// parameters (link width 8, encoding scheme I), through tb_top_harness:
// 3000 wormhole packets over a modelled network with back-pressure on both
// sides, checked flit by flit.
module tb_scramble_noc_top;
  bit done;
  int checks, failures;

  tb_top_harness #(.SCHEME(1)) u_h (.done(done), .checks(checks), .failures(failures));

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
