# Clock-gated odd/full-invert link encoding for a network on chip

In a network on chip, much of the power goes into the wires between routers.
Each wire costs energy when it toggles (self switching), and each pair of
neighbouring wires costs more when the two toggle differently (coupling).
This design cuts both. It encodes each flit in the network interface (NI) of
the sending core and decodes it in the NI of the receiving core. Routers and
links stay exactly as they are.

The encoder compares every flit with the flit that was last put on the link.
It then decides whether to send it as is, with its odd-numbered bits
inverted, or (in scheme II) with all bits inverted. One or two spare bits of
the flit tell the receiver what was done.

The register that holds the last encoded flit is clocked through a clock
gate, so it draws no clock power in cycles where no flit is loaded.

In a wormhole network, the body flits of a packet follow each other on every
link of their path. An encoding chosen at the source therefore works on every
link the packet crosses, and only the destination has to undo it.

## Flit format on the link

The link is `W` wires wide (default 8).

| scheme | payload bits | bit W-1 | bit W-2 | meaning of the flags |
|---|---|---|---|---|
| I  | `W-1` (bits 0..W-2) | inv | payload | inv = 1: odd bits inverted |
| II | `W-2` (bits 0..W-3) | inv | full | 00 none, 10 odd inversion, 11 full inversion |

Rules for the encoder's input:

- The encoder sees the payload zero-extended to `W` bits. The flag positions
  are 0 before encoding.
- Inverting the odd bits, or all bits, sets the flags by itself. Bit `W-1` is
  odd and bit `W-2` is even, so `W` must be even; elaboration stops otherwise.
- Head flits carry the routing information and cross the link raw.
- Flit kind (head, body, tail) travels as a 2-bit sideband beside the data.
  The decoder uses it to leave head flits alone.

## The cost model and the pair detectors

Everything the encoder decides comes from one measure, used pair by pair.
Take two adjacent wires, their values in the last flit `y` and in the
candidate flit `x`:

    cost = (wires that toggle) + coupling
    coupling = 1 if exactly one wire toggles
               2 if both toggle in opposite directions
               0 if both toggle the same way or neither toggles

`pair_classifier` applies this measure to one pair, for the flit as it is, for
the flit with the pair's odd wire inverted, and for the flit fully inverted.
It raises three flags:

- `ty`: odd inversion lowers the cost.
- `t2`: full inversion lowers the cost.
- `t4`: full inversion raises the cost.

Pairs overlap: for a link of `W` wires, pair `i` is wires `i` and `i+1`, with
`i = 0..W-2`. That gives `W-1` detectors. In pair `i` the odd wire is the
upper one when `i` is even and the lower one when `i` is odd, which the
`LO_IS_ODD` parameter selects.

Three examples show how the measure behaves:

- Two wires toggling in opposite directions (01 -> 10) cost 4. Fully inverted
  they do not move at all, so `t2` fires.
- A lone odd wire that toggles costs 2. Inverting it removes the transition,
  so `ty` fires.
- A stable pair can only get worse under full inversion, so `t4` fires.

The coupling weights 1 and 2 come from the encoding literature this scheme
builds on. Counting the self toggles with weight 1 as well is this
implementation's choice. Change `pair_cost` in `rtl/scramble_pkg.sv` to
re-weight it. The testbenches use their own copy of the measure, written
differently, in `tb/tb_ref_pkg.sv`.

A worked point: new flit `x = 1010_1111` against last flit `y = 0000_1111`.
Only the top three pairs (bits 4..7) are better with odd inversion. That is
3 of 7, not a majority, so the flit goes out as is. `tb_encoder_scheme1`
checks exactly this case.

## Scheme I: odd inversion (`encoder_scheme1`)

1. `W-1` pair detectors produce `ty`.
2. `majority_voter` decides to invert when more than `(W-1)/2` of them are 1.
   It computes `2*count > W-1`.
3. An XOR stage inverts all odd bits when the vote is 1, including bit
   `W-1`, which becomes the inversion flag. Even bits pass through.

## Scheme II: odd or full inversion (`encoder_scheme2`, `module_a`)

Each pair gives `ty`, `t2` and `t4`. Three `ones_counter`s sum them over the
`W-1` pairs, each into `log2(W)` bits. `module_a` then chooses the action:

- Odd inversion qualifies when `n_odd > (W-1)/2`, the scheme I rule. Its
  margin is `2*n_odd - (W-1)`.
- Full inversion qualifies when it helps more pairs than it hurts, that is
  `n_full_dec > n_full_inc`. Its margin is `n_full_dec - n_full_inc`.
- When both qualify, the larger margin wins; on a tie, odd inversion wins.
- `half_invert` and `full_invert` are never both 1.

This rule is an implementation choice. The design only fixes the three
counts and the two outputs.

The output stage XORs odd bits with `half | full` and even bits with `full`.
One flag bit could not tell "odd" from "full", so scheme II reserves bit
`W-2` as a second flag and carries one payload bit less than scheme I.

## Clock gating (`clock_gate`, inside `ni_encoder`)

In `ni_encoder`, the `W`-bit link register is clocked by
`gclk = clk AND load`, where `load = in_valid && in_ready`. That register is
also the "previous encoded flit" the encoder compares against.

The enable passes through a latch that is transparent while `clk` is low
(the usual integrated clock-gate cell). A `load` that changes during the high
phase therefore cannot make a runt pulse or a false edge. Two consequences:

- When the link is idle or stalled, the register gets no clock edges.
- The gated clock pulses exactly once per accepted flit, which both NI and
  top-level testbenches count.

The valid bit of the link stays on the free-running clock, because it must
fall when the link drains.

For an FPGA target, replace `clock_gate` with the vendor's clock-enable
buffer. For an ASIC, replace it with the library ICG cell.

## Network interfaces and timing

`ni_encoder` (sending side):

- Input: valid/ready, kind, payload of `PW = W-1` (scheme I) or `W-2`
  (scheme II) bits.
- `in_ready = !link_valid || link_ready`.
- A flit accepted at a rising edge is on `link_flit` right after that edge
  (one cycle of latency). It stays there until `link_ready` is seen.
- `load` and `action` (none/odd/full) report what the encoder did. They are
  useful for activity counting.
- Reset is asynchronous and active low. It clears the link register to zero
  and the valid bit to 0.

`ni_decoder` (receiving side):

- Combinational, zero latency.
- Undoes the inversion shown by the flags of body and tail flits and drops
  the flag bits.
- Passes valid, ready and kind straight through.

`scramble_noc_top` holds one of each:

- `in_*` are the sending core's port.
- `tx_link_*` go into the network and `rx_link_*` come out of it.
- `out_*` are the receiving core's port.

In a real system, the tx side of one core's NI and the rx side of another's
are joined by routers, which are not part of this design. Connecting
`tx_link_*` straight to `rx_link_*` gives a single encoded link.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `W` | 8 | encoders, NIs, top | link width in wires, even, at least 4 |
| `SCHEME` | 1 | NIs, top | 1 = odd inversion, 2 = odd or full inversion |
| `N`, `CW` | 7, 3 | `ones_counter`, `majority_voter` | number of inputs, count width |
| `LO_IS_ODD` | 0 | `pair_classifier` | which wire of the pair is odd-numbered |

The default width of 8 matches the 8-bit link of the reference simulation the
design was shown with. Everything is written for general even `W`. The
package's `link_cost` helper accepts up to 64 wires.

## Files

- `rtl/scramble_pkg.sv`: flit kind and action enums, the cost model.
- `rtl/pair_classifier.sv`, `rtl/ones_counter.sv`, `rtl/majority_voter.sv`,
  `rtl/module_a.sv`: the stages of the encoders.
- `rtl/encoder_scheme1.sv`, `rtl/encoder_scheme2.sv`: the combinational
  encoders.
- `rtl/clock_gate.sv`, `rtl/ni_encoder.sv`, `rtl/ni_decoder.sv`,
  `rtl/scramble_noc_top.sv`: clock gate, the two interfaces and the top.
- `tb/tb_*.sv`: one self-checking testbench per module. Also:
  - `tb/tb_ref_pkg.sv`: the reference models.
  - `tb/tb_top_harness.sv`: the shared end-to-end harness.
  - `tb/tb_scramble_noc_top.sv` (scheme I) and `tb/tb_scramble_noc_top_s2.sv`
    (scheme II): the end-to-end tests.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
Each has a watchdog. Example with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
      rtl/scramble_pkg.sv tb/tb_ref_pkg.sv tb/tb_scramble_noc_top.sv \
      --top-module tb_scramble_noc_top -o sim
    ./obj_dir/sim

Swap in another `tb/tb_<module>.sv` and top-module name to run a single
module's test.

## What the tests establish

- **Small blocks.** The pair detectors, counters, voter and `module_a` are
  tested exhaustively. The encoders are tested on 5000 random flit pairs each,
  against an independent reference encoder. The scheme II test covers all
  three actions.
- **Clock gate.** Its test moves the enable at random times, also while the
  clock is high. It checks that the gated clock rises exactly on the
  qualifying clock edges.
- **End to end.** At the default parameters, each end-to-end test sends 3000
  wormhole packets (about 16,400 flits) through a 2-flit FIFO standing for
  the network. Both sides apply random back-pressure, and every flit must
  arrive intact and in order. Each test also requires every mechanism to
  occur at least once: odd inversion, full inversion (scheme II), raw head
  flits, source stalls, gated idle cycles, and back-pressure from each side.
- **Switching.** On random payloads, the switching measure of the wires drops
  from 139,595 to 129,589 with scheme I (about 7%). With scheme II it drops
  from 118,748 to 105,570 (about 11%). Random data is close to the worst case
  for such codes. The tests only require the encoded figure to be the lower
  one.
- **Fault copies.** Each block's testbench was also run against a copy of the
  block with one deliberate fault, and each of those runs fails.

## Where this implementation makes its own choices

- The exact set of transition types that fire each detector. These follow
  from the cost model above, not from a published table.
- `module_a`'s decision rule and its tie-break.
- The second flag bit of scheme II, which costs one payload bit.
- The enable latch in the clock gate. A bare AND gate can glitch.
- Head flits sent unencoded, flit kind as sideband, the valid/ready
  handshake, reset behaviour, and a single clock gate for the whole link
  register rather than one per bit.

Not part of this RTL:

- A third encoding scheme that the original work mentions but does not
  describe.
- The routers themselves.
- Any power figure in real units. The switching measure above counts
  transitions; it is not a power estimate.
