// tb_encoder_scheme1: the scheme I encoder at link width 8.
// First the operating point of the published waveform: incoming flit
// 1010_1111 against previous flit 0000_1111 flags the top three pairs only,
// so there is no inversion and z equals x. Then random flits (inversion bit
// 0) against random previous flits, compared with the reference encoder,
// and a check that odd-inverted flits decode back by inverting odd bits.
module tb_encoder_scheme1;
  import tb_ref_pkg::*;
  localparam int W = 8;
  logic [W-1:0] x, y, z;
  logic inv;
  int checks = 0, failures = 0, n_inv = 0;

  encoder_scheme1 #(.W(W)) u_dut (.x(x), .y(y), .z(z), .odd_inv(inv));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [63:0] ez;
    bit einv;
    x = 8'b1010_1111; y = 8'b0000_1111; #1;
    checks++; if (u_dut.ty !== 7'b111_0000) begin failures++; $display("FAIL waveform ty=%b", u_dut.ty); end
    checks++; if (inv !== 1'b0) begin failures++; $display("FAIL waveform inv"); end
    checks++; if (z !== 8'b1010_1111) begin failures++; $display("FAIL waveform z=%b", z); end
    // every pair's odd wire toggling alone: all pairs flagged, invert
    x = 8'b0010_1010; y = 8'b0000_0000; #1;
    checks++; if (!(inv && z == 8'b1000_0000)) begin failures++; $display("FAIL all-odd z=%b inv=%b", z, inv); end
    for (int k = 0; k < 5000; k++) begin
      x = {1'b0, 7'($urandom)};
      y = 8'($urandom);
      #1;
      ez = ref_enc1(64'(x), 64'(y), W, einv);
      checks++;
      if (z !== ez[W-1:0] || inv !== einv) begin
        failures++;
        $display("FAIL x=%b y=%b z=%b exp=%b", x, y, z, ez[W-1:0]);
      end
      checks++;
      if (((z ^ (z[W-1] ? 8'hAA : 8'h00)) & 8'h7F) !== x[6:0]) begin
        failures++; $display("FAIL not invertible");
      end
      if (inv) n_inv++;
    end
    checks++;
    if (n_inv == 0) begin failures++; $display("FAIL no inversion seen"); end
    $display("inversions: %0d of 5000", n_inv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
