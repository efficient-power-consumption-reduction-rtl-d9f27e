// tb_encoder_scheme2: the scheme II encoder at link width 8. Random flits
// (two zero flag bits on top) against random previous flits, compared with
// the reference encoder; a named full-inversion case (the previous flit is the
// complement of the new one) and a named odd-inversion case; coverage of all
// three actions; and a check that the flag bits tell the action.
module tb_encoder_scheme2;
  import tb_ref_pkg::*;
  localparam int W = 8;
  logic [W-1:0] x, y, z;
  logic half, full;
  int checks = 0, failures = 0;
  int n_act[3] = '{0, 0, 0};

  encoder_scheme2 #(.W(W)) u_dut (.x(x), .y(y), .z(z), .half_invert(half), .full_invert(full));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [63:0] ez;
    int act;
    // the previous flit is the complement of this one: full inversion
    // leaves every wire still
    y = 8'b1101_0101; x = 8'b0010_1010; #1;
    checks++; if (!(full && !half && z == 8'b1101_0101)) begin failures++; $display("FAIL full case z=%b h=%b f=%b", z, half, full); end
    // odd wires toggle alone
    y = 8'b0000_0000; x = 8'b0010_1010; #1;
    checks++; if (!(half && !full && z == 8'b1000_0000)) begin failures++; $display("FAIL odd case z=%b h=%b f=%b", z, half, full); end
    for (int k = 0; k < 5000; k++) begin
      x = {2'b00, 6'($urandom)};
      y = 8'($urandom);
      #1;
      ez = ref_enc2(64'(x), 64'(y), W, act);
      checks++;
      if (z !== ez[W-1:0] || half !== (act == 1) || full !== (act == 2)) begin
        failures++;
        $display("FAIL x=%b y=%b z=%b exp=%b act=%0d", x, y, z, ez[W-1:0], act);
      end
      checks++;
      if (z[7:6] !== (act == 2 ? 2'b11 : act == 1 ? 2'b10 : 2'b00)) begin
        failures++; $display("FAIL flags %b act %0d", z[7:6], act);
      end
      n_act[act]++;
    end
    checks++;
    if (n_act[0] == 0 || n_act[1] == 0 || n_act[2] == 0) begin failures++; $display("FAIL coverage"); end
    $display("none=%0d odd=%0d full=%0d", n_act[0], n_act[1], n_act[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
