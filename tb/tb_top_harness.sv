// tb_top_harness: end-to-end stimulus and scoreboard for scramble_noc_top.
//
// A packet source offers wormhole packets (one head flit, 1 to 6 body flits,
// one tail flit, random payloads) with random gaps, holding each flit until
// it is accepted. The network between the two interfaces is modelled by a
// small FIFO standing for a router input buffer (DEPTH flits); the receiving
// core applies random back-pressure. Every flit that leaves the receiving
// interface must equal, in order, the flit that entered the sending one.
//
// Counted mechanisms (each must occur at least once): odd inversion, no
// inversion of an encoded flit, full inversion (scheme II only), raw head
// flit, stall of the source (in_valid with in_ready low), gated clock idle
// (a cycle without load), back-pressure from the network FIFO, back-pressure
// from the receiving core. The gated clock of the link register must pulse
// once per loaded flit. The switching measure of the wires, with and
// without encoding, is reported; the encoded one must be the smaller.
module tb_top_harness
  import scramble_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int unsigned SCHEME  = 1,
  parameter int unsigned PACKETS = 3000
) (
  output bit done,
  output int checks,
  output int failures
);
  localparam int unsigned W     = 8;
  localparam int unsigned PW    = (SCHEME == 2) ? W - 2 : W - 1;
  localparam int unsigned DEPTH = 2;

  logic clk = 1'b0, rst_n = 1'b1;
  logic in_valid = 1'b0, in_ready;
  flit_kind_e in_kind = FLIT_HEAD;
  logic [PW-1:0] in_payload = '0;
  logic tx_valid, tx_ready, tx_load;
  flit_kind_e tx_kind;
  logic [W-1:0] tx_flit;
  inv_action_e tx_action;
  logic rx_valid, rx_ready;
  flit_kind_e rx_kind;
  logic [W-1:0] rx_flit;
  logic out_valid, out_ready = 1'b0;
  flit_kind_e out_kind;
  logic [PW-1:0] out_payload;

  if (SCHEME == 2) begin : g_s2
    scramble_noc_top #(.SCHEME(2)) u_dut (
      .clk, .rst_n, .in_valid, .in_ready, .in_kind, .in_payload,
      .tx_link_valid(tx_valid), .tx_link_ready(tx_ready), .tx_link_kind(tx_kind),
      .tx_link_flit(tx_flit), .tx_load, .tx_action,
      .rx_link_valid(rx_valid), .rx_link_ready(rx_ready), .rx_link_kind(rx_kind),
      .rx_link_flit(rx_flit), .out_valid, .out_ready, .out_kind, .out_payload);
  end else begin : g_s1
    scramble_noc_top u_dut (
      .clk, .rst_n, .in_valid, .in_ready, .in_kind, .in_payload,
      .tx_link_valid(tx_valid), .tx_link_ready(tx_ready), .tx_link_kind(tx_kind),
      .tx_link_flit(tx_flit), .tx_load, .tx_action,
      .rx_link_valid(rx_valid), .rx_link_ready(rx_ready), .rx_link_kind(rx_kind),
      .rx_link_flit(rx_flit), .out_valid, .out_ready, .out_kind, .out_payload);
  end

  always #5 clk = ~clk;

  // gated clock pulses of the sending interface's link register
  int n_gclk = 0;
  if (SCHEME == 2) begin : g_cnt2
    always @(posedge g_s2.u_dut.u_tx_ni.gclk) n_gclk++;
  end else begin : g_cnt1
    always @(posedge g_s1.u_dut.u_tx_ni.gclk) n_gclk++;
  end

  // network model: FIFO of link flits
  typedef struct packed { flit_kind_e kind; logic [W-1:0] flit; } link_word_t;
  link_word_t fifo[$];
  assign tx_ready = (fifo.size() < DEPTH);
  assign rx_valid = (fifo.size() > 0);
  assign rx_kind  = (fifo.size() > 0) ? fifo[0].kind : FLIT_HEAD;
  assign rx_flit  = (fifo.size() > 0) ? fifo[0].flit : '0;

  typedef struct packed { flit_kind_e kind; logic [PW-1:0] payload; } core_word_t;
  core_word_t sent[$];

  int n_odd = 0, n_none = 0, n_full = 0, n_head = 0, n_stall = 0, n_idle = 0;
  int n_net_bp = 0, n_core_bp = 0, n_loads = 0, n_recv = 0;
  int cost_enc = 0, cost_raw = 0;
  bit [63:0] prev_link = '0, prev_raw = '0;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int body_left, packets_left;
    bit acc, push, pop;
    link_word_t pushed;
    checks = 0; failures = 0; done = 0;
    #1 rst_n = 1'b0;
    #12 rst_n = 1'b1;
    packets_left = PACKETS;
    body_left = -1;   // -1: next flit is a head
    while (packets_left > 0 || in_valid || fifo.size() > 0) begin
      @(negedge clk);
      // the link wires as they stand this cycle
      cost_enc += ref_link_cost(prev_link, 64'(tx_flit), W);
      prev_link = 64'(tx_flit);
      // source: a new flit only once the previous one was taken
      if (!in_valid && packets_left > 0 && $urandom_range(0, 9) < 8) begin
        in_valid = 1'b1;
        in_payload = PW'($urandom);
        if (body_left < 0) begin
          in_kind = FLIT_HEAD;
          body_left = $urandom_range(1, 6);
        end else if (body_left > 0) begin
          in_kind = FLIT_BODY;
          body_left--;
        end else begin
          in_kind = FLIT_TAIL;
          body_left = -1;
          packets_left--;
        end
      end
      out_ready = ($urandom_range(0, 9) < 7);
      #1;
      acc  = in_valid && in_ready;
      push = tx_valid && tx_ready;
      pop  = rx_valid && rx_ready;
      check("load reported", tx_load == acc);
      check("receiving interface passes back-pressure", rx_ready == out_ready);
      check("receiving interface valid", out_valid == rx_valid);
      if (in_valid && !in_ready) n_stall++;
      if (!acc) n_idle++;
      if (tx_valid && !tx_ready) n_net_bp++;
      if (rx_valid && !out_ready) n_core_bp++;
      if (acc) begin
        sent.push_back('{in_kind, in_payload});
        n_loads++;
        cost_raw += ref_link_cost(prev_raw, 64'(in_payload), W);
        prev_raw = 64'(in_payload);
        if (in_kind == FLIT_HEAD) begin
          n_head++;
          check("head not encoded", tx_action == INV_NONE);
        end else begin
          case (tx_action)
            INV_ODD:  n_odd++;
            INV_FULL: n_full++;
            default:  n_none++;
          endcase
        end
      end
      if (pop) begin
        check("nothing unexpected received", sent.size() > 0);
        if (sent.size() > 0) begin
          check("kind in order", out_kind == sent[0].kind);
          check("payload in order", out_payload == sent[0].payload);
          void'(sent.pop_front());
        end
        n_recv++;
      end
      pushed = '{tx_kind, tx_flit};
      @(posedge clk);
      #1;
      if (pop) void'(fifo.pop_front());
      if (push) fifo.push_back(pushed);
      if (acc) begin
        in_valid = 1'b0;
        check("flit on the link one cycle after acceptance", tx_valid);
      end
    end
    repeat (3) @(negedge clk);
    check("all flits delivered", sent.size() == 0 && n_recv == n_loads);
    check("gated clock pulses once per load", n_gclk == n_loads);
    check("odd inversion happened", n_odd > 0);
    check("encoded flit left as is", n_none > 0);
    check("full inversion happened", SCHEME != 2 || n_full > 0);
    check("raw head flit", n_head > 0);
    check("source stalled", n_stall > 0);
    check("clock gated idle cycles", n_idle > 0);
    check("network back-pressure", n_net_bp > 0);
    check("core back-pressure", n_core_bp > 0);
    check("encoding lowers link switching", cost_enc < cost_raw);
    $display("scheme %0d: flits=%0d heads=%0d odd=%0d full=%0d none=%0d stall=%0d idle=%0d net_bp=%0d core_bp=%0d",
             SCHEME, n_loads, n_head, n_odd, n_full, n_none, n_stall, n_idle, n_net_bp, n_core_bp);
    $display("switching measure: encoded=%0d unencoded=%0d", cost_enc, cost_raw);
    done = 1'b1;
  end
endmodule
