// tb_ni_decoder: decoders for scheme I and scheme II at link width 8. Random
// payloads are encoded by the reference encoders against a random previous
// flit, put on the decoders' link inputs with a random kind, and the payload
// that comes out must be the one that went in (head flits are sent raw).
// The handshake and kind must pass straight through.
module tb_ni_decoder;
  import scramble_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 8;

  logic        lv, lr1, lr2, ov1, ov2, oready;
  flit_kind_e  lk, ok1, ok2;
  logic [W-1:0] lf1, lf2;
  logic [W-2:0] op1;
  logic [W-3:0] op2;
  int checks = 0, failures = 0;
  int n_act1[2] = '{0, 0};
  int n_act2[3] = '{0, 0, 0};

  ni_decoder #(.W(W), .SCHEME(1)) u_d1 (
    .link_valid(lv), .link_ready(lr1), .link_kind(lk), .link_flit(lf1),
    .out_valid(ov1), .out_ready(oready), .out_kind(ok1), .out_payload(op1));
  ni_decoder #(.W(W), .SCHEME(2)) u_d2 (
    .link_valid(lv), .link_ready(lr2), .link_kind(lk), .link_flit(lf2),
    .out_valid(ov2), .out_ready(oready), .out_kind(ok2), .out_payload(op2));

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [63:0] p1, p2, y, e1, e2;
    bit inv;
    int act;
    for (int k = 0; k < 4000; k++) begin
      p1 = 64'((W-1)'($urandom));
      p2 = 64'((W-2)'($urandom));
      y  = 64'(W'($urandom));
      lk = flit_kind_e'($urandom_range(0, 2));
      lv = 1'($urandom); oready = 1'($urandom);
      if (lk == FLIT_HEAD) begin
        e1 = p1; e2 = p2; inv = 0; act = 0;
      end else begin
        e1 = ref_enc1(p1, y, W, inv);
        e2 = ref_enc2(p2, y, W, act);
        n_act1[int'(inv)]++;
        n_act2[act]++;
      end
      lf1 = e1[W-1:0]; lf2 = e2[W-1:0];
      #1;
      check("scheme I payload", op1 == p1[W-2:0]);
      check("scheme II payload", op2 == p2[W-3:0]);
      check("handshake", ov1 == lv && ov2 == lv && lr1 == oready && lr2 == oready);
      check("kind", ok1 == lk && ok2 == lk);
    end
    // a head flit whose top bit is 1 must not be decoded
    lk = FLIT_HEAD; lf1 = 8'b1000_0010; lf2 = 8'b1100_0010; #1;
    check("head scheme I raw", op1 == 7'b000_0010);
    check("head scheme II raw", op2 == 6'b00_0010);
    check("coverage", n_act1[1] > 0 && n_act2[1] > 0 && n_act2[2] > 0 && n_act2[0] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
