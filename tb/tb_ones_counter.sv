// tb_ones_counter: exhaustive test at N = 7 (link width 8) and a random test
// at N = 31, comparing the count with a bit-by-bit reference.
module tb_ones_counter;
  logic [6:0]  b7;
  logic [2:0]  c7;
  logic [30:0] b31;
  logic [4:0]  c31;
  int checks = 0, failures = 0;

  ones_counter #(.N(7))  u7  (.bits_in(b7),  .count(c7));
  ones_counter #(.N(31)) u31 (.bits_in(b31), .count(c31));

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
    b31 = '0;
    for (int v = 0; v < 128; v++) begin
      b7 = 7'(v); #1;
      checks++;
      if (int'(c7) != ref_pop(64'(b7))) begin
        failures++; $display("FAIL N=7 in=%b count=%0d", b7, c7);
      end
    end
    for (int k = 0; k < 500; k++) begin
      b31 = 31'($urandom); #1;
      checks++;
      if (int'(c31) != ref_pop(64'(b31))) begin
        failures++; $display("FAIL N=31 in=%b count=%0d", b31, c31);
      end
    end
    b31 = '1; #1;
    checks++;
    if (c31 != 5'd31) begin failures++; $display("FAIL all ones"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
