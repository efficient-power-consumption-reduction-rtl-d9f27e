// scramble_pkg: types and the link cost model shared by the encoders, the
// decoder and their testbenches.
//
// A link of W wires carries one flit per cycle. The cost of a transfer on a
// pair of adjacent wires is modelled as the number of the pair's wires that
// toggle (self switching) plus the pair's coupling weight: 1 when exactly one
// of the two wires toggles, 2 when both toggle in opposite directions, 0 when
// both toggle the same way or neither does. The coupling weights 1 and 2 are
// the design's; adding the pair's self switching with weight 1 is this
// implementation's choice.
//
// Flit kinds travel beside the data (sideband), as the routers of a wormhole
// network need them anyway: head flits carry routing information and cross
// the link unencoded, body and tail flits are encoded.
package scramble_pkg;

  typedef enum logic [1:0] {
    FLIT_HEAD = 2'd0,
    FLIT_BODY = 2'd1,
    FLIT_TAIL = 2'd2
  } flit_kind_e;

  // Inversion action an encoder chooses for one flit.
  typedef enum logic [1:0] {
    INV_NONE = 2'd0,
    INV_ODD  = 2'd1,
    INV_FULL = 2'd2
  } inv_action_e;

  // Coupling weight of the transition prev -> next on one wire pair.
  function automatic int unsigned pair_coupling(logic [1:0] prev, logic [1:0] next);
    logic [1:0] tog;
    tog = prev ^ next;
    if (tog[0] != tog[1]) return 1;                        // one wire toggles
    if (tog[0] && tog[1] && (next[0] != next[1])) return 2; // opposite toggles
    return 0;
  endfunction

  // Cost of the transition prev -> next on one wire pair (self + coupling).
  function automatic int unsigned pair_cost(logic [1:0] prev, logic [1:0] next);
    logic [1:0] tog;
    tog = prev ^ next;
    return int'(tog[0]) + int'(tog[1]) + pair_coupling(prev, next);
  endfunction

  // Switching measure of a whole transfer on a w-wire link (w <= 64): every
  // wire toggle counts 1, every adjacent pair adds its coupling weight.
  function automatic int unsigned link_cost(logic [63:0] prev, logic [63:0] next, int unsigned w);
    int unsigned c;
    c = 0;
    for (int unsigned i = 0; i < w; i++) begin
      if (prev[i] != next[i]) c += 1;
      if (i + 1 < w) c += pair_coupling({prev[i+1], prev[i]}, {next[i+1], next[i]});
    end
    return c;
  endfunction

endpackage
