// tb_majority_voter: exhaustive test at N = 7 (link width 8, rule
// count > 3) and at N = 8 (rule count > 4, ties do not vote).
module tb_majority_voter;
  logic [6:0] v7;
  logic [7:0] v8;
  logic o7, o8;
  int checks = 0, failures = 0;

  majority_voter #(.N(7)) u7 (.votes(v7), .vote(o7));
  majority_voter #(.N(8)) u8 (.votes(v8), .vote(o8));

  function automatic int ref_pop(logic [63:0] v);
    int n = 0;
    for (int i = 0; i < 64; i++) if (v[i]) n++;
    return n;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      v7 = 7'(v); v8 = 8'(v); #1;
      checks += 2;
      if (o7 !== (ref_pop(64'(v7)) > 3)) begin failures++; $display("FAIL N=7 %b -> %b", v7, o7); end
      if (o8 !== (ref_pop(64'(v8)) > 4)) begin failures++; $display("FAIL N=8 %b -> %b", v8, o8); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
