// ni_encoder: encoding side of a network interface (the sending NI).
//
// Flits enter with a valid/ready handshake as PW payload bits plus a kind
// (head, body, tail). Body and tail flits are padded with the reserved zero
// flag bit(s) and encoded by block E against the flit last put on the link;
// head flits are put on the link unencoded so that routers can read them.
// The link register is also the "previous encoded" register the encoder
// compares against. It is clocked by a gated clock that pulses only in cycles
// where a flit is loaded (load = in_valid && in_ready), so it consumes no
// clock power while the link is idle or stalled.
//
// SCHEME = 1 selects odd inversion (PW = W-1), SCHEME = 2 selects odd or
// full inversion (PW = W-2, bit W-2 being the second flag).
//
// Timing: a flit accepted at a rising clock edge is on link_flit from that
// edge on (one cycle latency) and stays there until link_ready is seen high
// at a rising edge. in_ready = !link_valid || link_ready. Reset is
// asynchronous and active low; it clears the link register to all zeros.
module ni_encoder
  import scramble_pkg::*;
#(
  parameter int unsigned W      = 8,
  parameter int unsigned SCHEME = 1,
  localparam int unsigned PW    = (SCHEME == 2) ? W - 2 : W - 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // flits from the core
  input  logic          in_valid,
  output logic          in_ready,
  input  flit_kind_e    in_kind,
  input  logic [PW-1:0] in_payload,
  // link towards the router
  output logic          link_valid,
  input  logic          link_ready,
  output flit_kind_e    link_kind,
  output logic [W-1:0]  link_flit,
  // activity report: the action taken for the flit loaded this cycle
  output logic          load,
  output inv_action_e   action
);

  if (SCHEME != 1 && SCHEME != 2) begin : g_bad_scheme
    $error("ni_encoder: SCHEME must be 1 or 2");
  end

  logic [W-1:0] x, z, flit_next;
  logic         gclk;
  logic         half_inv, full_inv;

  assign in_ready = !link_valid || link_ready;
  assign load     = in_valid && in_ready;
  assign x        = W'(in_payload);

  if (SCHEME == 2) begin : g_s2
    encoder_scheme2 #(.W(W)) u_enc (
      .x (x), .y (link_flit), .z (z),
      .half_invert (half_inv), .full_invert (full_inv)
    );
  end else begin : g_s1
    encoder_scheme1 #(.W(W)) u_enc (
      .x (x), .y (link_flit), .z (z), .odd_inv (half_inv)
    );
    assign full_inv = 1'b0;
  end

  always_comb begin
    if (in_kind == FLIT_HEAD) begin
      flit_next = x;
      action    = INV_NONE;
    end else begin
      flit_next = z;
      action    = full_inv ? INV_FULL : (half_inv ? INV_ODD : INV_NONE);
    end
  end

  clock_gate u_cg (
    .clk  (clk),
    .en   (load),
    .gclk (gclk)
  );

  // Link / previous-encoded register on the gated clock.
  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) begin
      link_flit <= '0;
      link_kind <= FLIT_HEAD;
    end else begin
      link_flit <= flit_next;
      link_kind <= in_kind;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          link_valid <= 1'b0;
    else if (load)       link_valid <= 1'b1;
    else if (link_ready) link_valid <= 1'b0;
  end

endmodule
