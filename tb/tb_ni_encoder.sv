// tb_ni_encoder: the sending network interface with scheme I at link width
// 8. Random flits of random kind are offered with random gaps while the
// link accepts at random. At every rising edge the reference model updates
// the expected link register (head flits raw, others encoded against the
// previous link flit) and the expected valid bit; half a cycle later the
// outputs are compared. Also checked: reset values, in_ready, the reported
// action, that the link flit holds while stalled, and that the register's
// gated clock pulses exactly once per loaded flit. A second instance with
// scheme II runs on the same handshake (its payload is the lower W-2 bits)
// and is checked the same way, including its full inversions.
module tb_ni_encoder;
  import scramble_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 8;

  logic clk = 1'b0, rst_n = 1'b1;
  logic in_valid, in_ready, link_valid, link_ready, load;
  flit_kind_e in_kind, link_kind;
  logic [W-2:0] in_payload;
  logic [W-1:0] link_flit;
  inv_action_e action;
  logic in_ready2, link_valid2, load2;
  flit_kind_e link_kind2;
  logic [W-1:0] link_flit2;
  inv_action_e action2;
  int n_full2 = 0, n_odd2 = 0;

  int checks = 0, failures = 0;
  int n_load = 0, n_gclk = 0, n_stall = 0, n_idle = 0, n_odd = 0, n_head = 0;

  ni_encoder #(.W(W), .SCHEME(1)) u_dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_kind(in_kind), .in_payload(in_payload),
    .link_valid(link_valid), .link_ready(link_ready), .link_kind(link_kind), .link_flit(link_flit),
    .load(load), .action(action)
  );

  ni_encoder #(.W(W), .SCHEME(2)) u_dut2 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready2), .in_kind(in_kind), .in_payload(in_payload[W-3:0]),
    .link_valid(link_valid2), .link_ready(link_ready), .link_kind(link_kind2), .link_flit(link_flit2),
    .load(load2), .action(action2)
  );

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask


  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge u_dut.gclk) n_gclk++;

  bit [63:0] exp_flit = '0, exp_flit2 = '0;
  flit_kind_e exp_kind = FLIT_HEAD;
  bit exp_valid = 1'b0;

  // Expected state after the coming rising edge, worked out from the inputs
  // applied in the low phase before it.
  task automatic predict();
    bit inv;
    int act;
    bit [63:0] x, e;
    if (in_valid && in_ready) begin
      x = 64'(in_payload);
      inv = 1'b0;
      e = (in_kind == FLIT_HEAD) ? x : ref_enc1(x, exp_flit, W, inv);
      check("action", action == (inv ? INV_ODD : INV_NONE));
      if (inv) n_odd++;
      if (in_kind == FLIT_HEAD) n_head++;
      exp_flit = e; exp_kind = in_kind; exp_valid = 1'b1;
      x = 64'(in_payload[W-3:0]);
      act = 0;
      e = (in_kind == FLIT_HEAD) ? x : ref_enc2(x, exp_flit2, W, act);
      check("action, scheme II", action2 == (act == 2 ? INV_FULL : act == 1 ? INV_ODD : INV_NONE));
      if (act == 2) n_full2++;
      if (act == 1) n_odd2++;
      exp_flit2 = e;
      n_load++;
    end else begin
      if (link_ready) exp_valid = 1'b0;
      if (in_valid) n_stall++; else n_idle++;
    end
  endtask

  initial begin
    in_valid = 1'b0; in_kind = FLIT_HEAD; in_payload = '0; link_ready = 1'b0;
    #1 rst_n = 1'b0;
    #22;
    check("reset link flit", link_flit == '0);
    check("reset valid", link_valid == 1'b0);
    rst_n = 1'b1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      check("link flit", link_flit == exp_flit[W-1:0]);
      check("link kind", link_kind == exp_kind);
      check("link valid", link_valid == exp_valid);
      check("link flit, scheme II", link_flit2 == exp_flit2[W-1:0]);
      check("link kind and valid, scheme II", link_kind2 == exp_kind && link_valid2 == exp_valid);
      in_valid   = ($urandom_range(0, 9) < 7);
      in_kind    = flit_kind_e'($urandom_range(0, 2));
      in_payload = (W-1)'($urandom);
      link_ready = ($urandom_range(0, 9) < 6);
      #1;
      check("in_ready", in_ready == (!link_valid || link_ready));
      check("load", load == (in_valid && in_ready));
      check("scheme II handshake", in_ready2 == in_ready && load2 == load);
      predict();
    end
    @(negedge clk);
    check("gated clock pulses once per load", n_gclk == n_load);
    check("stalls seen", n_stall > 0);
    check("idle cycles seen", n_idle > 0);
    check("odd inversions seen", n_odd > 0);
    check("head flits seen", n_head > 0);
    check("scheme II odd and full inversions seen", n_odd2 > 0 && n_full2 > 0);
    $display("loads=%0d gclk=%0d stalls=%0d idle=%0d odd=%0d head=%0d", n_load, n_gclk, n_stall, n_idle, n_odd, n_head);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
