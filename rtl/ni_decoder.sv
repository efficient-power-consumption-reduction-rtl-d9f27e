// ni_decoder: decoding side of a network interface (the receiving NI).
//
// Body and tail flits are restored from the inversion flag(s) they carry:
// with SCHEME = 1, when bit W-1 is 1 the odd-numbered bits are inverted back;
// with SCHEME = 2, bit W-1 = 1 means an inversion happened and bit W-2 tells
// a full inversion (1) from an odd one (0). Head flits pass unchanged. The
// flag bits are dropped, leaving PW payload bits.
//
// Timing: purely combinational, zero latency; the valid/ready handshake and
// the kind pass straight through (out_valid = link_valid,
// link_ready = out_ready).
module ni_decoder
  import scramble_pkg::*;
#(
  parameter int unsigned W      = 8,
  parameter int unsigned SCHEME = 1,
  localparam int unsigned PW    = (SCHEME == 2) ? W - 2 : W - 1
) (
  // link from the router
  input  logic          link_valid,
  output logic          link_ready,
  input  flit_kind_e    link_kind,
  input  logic [W-1:0]  link_flit,
  // flits to the core
  output logic          out_valid,
  input  logic          out_ready,
  output flit_kind_e    out_kind,
  output logic [PW-1:0] out_payload
);

  if (SCHEME != 1 && SCHEME != 2) begin : g_bad_scheme
    $error("ni_decoder: SCHEME must be 1 or 2");
  end

  logic         inv, full;
  logic [PW-1:0] mask;

  assign out_valid  = link_valid;
  assign link_ready = out_ready;
  assign out_kind   = link_kind;

  always_comb begin
    inv  = (link_kind != FLIT_HEAD) && link_flit[W-1];
    full = (SCHEME == 2) && link_flit[W-2];
    for (int unsigned i = 0; i < PW; i++) begin
      mask[i] = inv && (full || (i % 2 == 1));
    end
    out_payload = link_flit[PW-1:0] ^ mask;
  end

endmodule
