// tb_module_a: every combination of the three counts at link width 8,
// skipping those no link can produce (full-helps plus full-hurts above the
// number of pairs). Checks the decision against the reference rule and that
// the two outputs are never both set.
module tb_module_a;
  import tb_ref_pkg::*;
  logic [2:0] n_odd, n_dec, n_inc;
  logic half, full;
  int checks = 0, failures = 0;
  int seen_none = 0, seen_odd = 0, seen_full = 0;

  module_a #(.W(8)) u_dut (
    .n_odd(n_odd), .n_full_dec(n_dec), .n_full_inc(n_inc),
    .half_invert(half), .full_invert(full)
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++)
        for (int c = 0; b + c < 8; c++) begin
          n_odd = 3'(a); n_dec = 3'(b); n_inc = 3'(c); #1;
          exp = ref_decide(a, b, c, 8);
          checks++;
          if (half !== (exp == 1) || full !== (exp == 2)) begin
            failures++;
            $display("FAIL odd=%0d dec=%0d inc=%0d -> half=%b full=%b exp=%0d", a, b, c, half, full, exp);
          end
          checks++;
          if (half && full) begin failures++; $display("FAIL both set"); end
          if (exp == 0) seen_none++; else if (exp == 1) seen_odd++; else seen_full++;
        end
    // named cases
    n_odd = 3'd4; n_dec = 3'd0; n_inc = 3'd3; #1;
    checks++; if (!(half && !full)) begin failures++; $display("FAIL odd majority"); end
    n_odd = 3'd3; n_dec = 3'd2; n_inc = 3'd1; #1;
    checks++; if (!(full && !half)) begin failures++; $display("FAIL full wins"); end
    n_odd = 3'd3; n_dec = 3'd1; n_inc = 3'd1; #1;
    checks++; if (half || full) begin failures++; $display("FAIL nothing"); end
    checks++;
    if (seen_none == 0 || seen_odd == 0 || seen_full == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
