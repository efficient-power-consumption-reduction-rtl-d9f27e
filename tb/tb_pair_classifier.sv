// tb_pair_classifier: exhaustive test of the pair detectors, for a pair
// whose odd wire is the upper one and for a pair whose odd wire is the lower
// one. Every (previous, next) combination of the two wires is applied and
// ty/t2/t4 are compared with costs from the reference model; a few
// transition types are also checked by name.
module tb_pair_classifier;
  import tb_ref_pkg::*;

  logic [1:0] x, y;
  logic ty_h, t2_h, t4_h, ty_l, t2_l, t4_l;
  int checks = 0, failures = 0;

  pair_classifier #(.LO_IS_ODD(1'b0)) u_hi (.x(x), .y(y), .ty(ty_h), .t2(t2_h), .t4(t4_h));
  pair_classifier #(.LO_IS_ODD(1'b1)) u_lo (.x(x), .y(y), .ty(ty_l), .t2(t2_l), .t4(t4_l));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s y=%b x=%b got=%b exp=%b", what, y, x, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0, ch, cl, cf;
    for (int yy = 0; yy < 4; yy++) begin
      for (int xx = 0; xx < 4; xx++) begin
        y = 2'(yy); x = 2'(xx);
        #1;
        c0 = ref_pair_cost(y[0], y[1], x[0], x[1]);
        ch = ref_pair_cost(y[0], y[1], x[0], !x[1]);
        cl = ref_pair_cost(y[0], y[1], !x[0], x[1]);
        cf = ref_pair_cost(y[0], y[1], !x[0], !x[1]);
        check("ty(hi odd)", ty_h, ch < c0);
        check("ty(lo odd)", ty_l, cl < c0);
        check("t2(hi odd)", t2_h, cf < c0);
        check("t2(lo odd)", t2_l, cf < c0);
        check("t4(hi odd)", t4_h, cf > c0);
        check("t4(lo odd)", t4_l, cf > c0);
      end
    end
    // Opposite toggles (01 -> 10): full inversion removes every transition.
    y = 2'b01; x = 2'b10; #1;
    check("opposite toggles: t2", t2_h, 1'b1);
    check("opposite toggles: ty", ty_h, 1'b1);
    // No transition: full inversion can only make things worse.
    y = 2'b01; x = 2'b01; #1;
    check("stable: t4", t4_h, 1'b1);
    check("stable: ty", ty_h, 1'b0);
    // Odd wire alone toggles: odd inversion cancels it.
    y = 2'b00; x = 2'b10; #1;
    check("odd wire toggles: ty", ty_h, 1'b1);
    check("odd wire toggles, lower odd: ty", ty_l, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
