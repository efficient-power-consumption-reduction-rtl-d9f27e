// scramble_noc_top: one end-to-end encoded connection of a network on chip.
//
// A sending network interface (ni_encoder: clock-gated encoder E with its
// previous-encoded register) puts flits on the link, and a receiving network
// interface (ni_decoder) restores them. Everything between the two, routers
// and inter-router links, is left unchanged by the scheme and sits outside
// this module: tx_link_* go to the network, rx_link_* come from it. In a
// wormhole network the body flits of one packet follow each other on every
// link of their path, so the encoding made at the source keeps its effect on
// each link and can be undone at the destination alone.
//
// Timing: one cycle from in_* to tx_link_*; rx_link_* to out_* is
// combinational. SCHEME selects encoding scheme I (1) or II (2).
module scramble_noc_top
  import scramble_pkg::*;
#(
  parameter int unsigned W      = 8,
  parameter int unsigned SCHEME = 1,
  localparam int unsigned PW    = (SCHEME == 2) ? W - 2 : W - 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // sending core
  input  logic          in_valid,
  output logic          in_ready,
  input  flit_kind_e    in_kind,
  input  logic [PW-1:0] in_payload,
  // into the network
  output logic          tx_link_valid,
  input  logic          tx_link_ready,
  output flit_kind_e    tx_link_kind,
  output logic [W-1:0]  tx_link_flit,
  output logic          tx_load,
  output inv_action_e   tx_action,
  // out of the network
  input  logic          rx_link_valid,
  output logic          rx_link_ready,
  input  flit_kind_e    rx_link_kind,
  input  logic [W-1:0]  rx_link_flit,
  // receiving core
  output logic          out_valid,
  input  logic          out_ready,
  output flit_kind_e    out_kind,
  output logic [PW-1:0] out_payload
);

  ni_encoder #(.W(W), .SCHEME(SCHEME)) u_tx_ni (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .in_kind    (in_kind),
    .in_payload (in_payload),
    .link_valid (tx_link_valid),
    .link_ready (tx_link_ready),
    .link_kind  (tx_link_kind),
    .link_flit  (tx_link_flit),
    .load       (tx_load),
    .action     (tx_action)
  );

  ni_decoder #(.W(W), .SCHEME(SCHEME)) u_rx_ni (
    .link_valid  (rx_link_valid),
    .link_ready  (rx_link_ready),
    .link_kind   (rx_link_kind),
    .link_flit   (rx_link_flit),
    .out_valid   (out_valid),
    .out_ready   (out_ready),
    .out_kind    (out_kind),
    .out_payload (out_payload)
  );

endmodule
