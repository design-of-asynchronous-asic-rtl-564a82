# Clockless column readout for a CMOS pixel sensor

A monolithic pixel sensor with sparse readout has to find, among hundreds of
pixels in a column, the few that were hit, and ship their addresses to the end
of the column. The usual answer is a clocked priority encoder with global
nets spanning the column. This design does the same job without a clock: each
hit pixel raises a request, and a tree of small asynchronous *fixed priority
arbiters* (FPA) merges the requests level by level, building the pixel address
on the way. Only the branches that carry a hit switch, so power follows the
hit rate, and every controller runs at its own pace rather than at a clock
rate.

The RTL covers one double column of 512 pixels:

```
 hit[511:0] ──► 512 send units ──► FPA tree (LEVELS levels) ──► req_out / addr_out[8:0]
 fe_reset   ◄──  (pixel reset)  ◄── acknowledges            ◄── ack_out_n (end of column)
```

| file | role |
|---|---|
| `rtl/fpa_readout.sv` | top: send units + tree, one column |
| `rtl/fpa_tree.sv` | the arbiter tree, `CTRL_SIZE` address bits per level |
| `rtl/fpa_node.sv` | one arbiter controller, 2**SIZE inputs to 1 output |
| `rtl/c_element.sv` | Muller C element with reset (the rendez-vous) |
| `rtl/send_unit.sv` | per-pixel hit-to-request interface |

## The handshake

Every link in the design, pixel to first level, level to level, and root to
end of column, is a 4-phase (return-to-zero) bundled-data channel:

* `req` goes high when the data (the partial address) is valid;
* the receiver stores the data and pulls its acknowledge **low**
  (acknowledges are active low: high means idle and ready);
* the sender drops `req`; the receiver raises the acknowledge again when it has
  finished its own part of the cycle.

The data must be stable while `req` is high. At the root, `addr_out` is valid
from the rising edge of `req_out` until `req_out` falls. The end-of-column
logic drives `ack_out_n` low after it has taken the address, and high again
after `req_out` has fallen.

## Inside an arbiter controller (`fpa_node`)

This is the part that takes the most care. A controller with `N = 2**SIZE`
inputs has four parts:

1. **Rendez-vous.** A C element joins two conditions: "an input wants
   service" (`go`) and "the next level is ready" (`ack_out_n` high). Its output
   is `req_out`. It rises only when both hold, and falls only when both are
   withdrawn. Between handshakes `go` is the OR of all requests. During a
   handshake it is the request of the granted input only.
2. **Priority memory.** On the rising edge of `req_out` the controller stores
   the one-hot index of the highest-numbered active request (`gnt_q`). It
   clears it when `req_out` falls. A second copy (`keep_q`), reset to all ones
   instead of zero, feeds `go`, so `go` never dips while the grant is being
   stored.
3. **Data memory.** On the same edge it stores `{index, data_in[index]}`. The
   winner's index becomes the top `SIZE` bits of the address that goes on.
   Between handshakes the memory is transparent: `data_out` already shows the
   value it will store, so nothing moves at the edge.
4. **Acknowledge coder.** `ack_in_n = ~gnt_q`. The winner is acknowledged as
   soon as its address is stored, **not** when the address reaches the end of
   the column.

Point 4 makes the tree a pipeline. A pixel is released, and reset, as soon as
the first-level controller holds its index. Each controller then waits only
for its parent. Several pixels can therefore be acknowledged at the same time,
at most one per first-level controller. Inputs that lose an arbitration keep
their request high and win a later one. No request is ever dropped.

The order of events on one channel:

```
req_in[i] ↑  →  req_out ↑, data stored, ack_in_n[i] ↓
req_in[i] ↓  (the input may change its data now)
ack_out_n ↓  (next level has stored the data)
             →  req_out ↓, ack_in_n[i] ↑
ack_out_n ↑  →  next grant may start
```

## The tree (`fpa_tree`) and the controller size

With `NPIX = 512` the tree can be built three ways. All three give the same
function and differ only in physical cost:

| `CTRL_SIZE` | structure | controllers |
|---|---|---|
| 1 | 9 levels of 2-to-1 | 511 |
| 3 (default) | 3 levels of 8-to-1 | 73 |
| 9 | 1 level of 512-to-1 | 1 |

The default is 3. In the layout study behind this design, that size fitted a
20 µm pixel pitch and routed without congestion. The 2-to-1 tree was the
fastest but congested the routing. Each level adds `CTRL_SIZE` address bits.
The level next to the pixels gives the least significant bits, and the root
gives the most significant.

`NPIX` must be a power of `2**CTRL_SIZE`. The tree stops elaboration with an
error otherwise.

**Priority.** Inside one controller the highest index wins. Across the tree
the order is *not* strictly by address. A subtree that has just been served
re-arms its request only after its parent's handshake ends. By then the parent
may already have granted a sibling. Under sustained load, service therefore
rotates between subtrees.

## Send units (`send_unit`)

A rising edge on `hit[i]` sets a flag, and the flag is the pixel's request.
The first-level acknowledge clears the flag and holds `fe_reset[i]` high, for
resetting the pixel front end. Two cases follow from this:

* A second hit while the first still waits is **merged** with it, and the pixel
  is read once.
* A hit edge that arrives while the pixel is acknowledged (`fe_reset` high) is
  **lost**.

The tree only fixes where send units sit. The circuit inside them is this
design's own choice: the simplest one that gives a clean request and a pixel
reset.

## What is not here

* **Analog and digital pixel front ends.** The top takes each pixel's
  discriminated hit as an input and gives back `fe_reset`.
* **Line readout, end-of-column logic and serializer.** They are only named in
  the architecture, so the root handshake is brought out as ports.
* **Time stamping.** The design is said to allow ns-level time stamps, but no
  circuit for them is defined.
* **Matched delays.** In silicon, bundled data needs each request path to be
  slower than its data path. That is a timing constraint on the layout, not a
  function the RTL can express.

## Departures and choices to be aware of

* The gate-level netlist of the 2-to-1 controller is not copied. The
  controller is rebuilt from its named parts: OR of requests, priority
  memory, C element, data memory and acknowledge coder. It keeps the
  handshake order of the original timing diagram.
* "Highest index wins" is a reading of the controller's block diagram, where
  only input 1's request feeds the priority memory.
* The 8-to-1 and 512-to-1 controllers use the same structure with a wider
  priority choice and multiplexer.
* All state uses one active-low asynchronous reset.

## Synthesis notes

This is clockless logic, and a standard synchronous flow will complain about
it:

* `c_element` is written as a latch, and `req_out` closes a loop through it.
  These are the intended state element and feedback.
* The memories are flip-flops clocked by `req_out`, with clear terms. Some
  synthesis front ends reject a flip-flop with more than one asynchronous
  clear or load, as used in `fpa_node` and `send_unit`. Map those to cells
  with set and reset pins by hand, or split the clear term.
* Timing closure needs asynchronous-aware constraints: matched request delays
  and relative timing between request and data.

## Simulation

All modules are zero-delay. Events that are simultaneous in simulation would
be ordered by gate delays in silicon. Keep these rules in mind:

* **Reset needs a falling edge.** The resets are asynchronous and
  edge-triggered in the flip-flops. Start `rst_n` high, pull it low, then
  release it. A reset that is low from time 0 may not clear everything.
* **Avoid simultaneous stimulus.** Do not change a request in the same
  instant as an acknowledge that concerns it. The testbenches keep such
  events at least one time unit apart. Read time and bandwidth are not
  modelled.

Building and running one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fpa_readout \
    -y rtl -y tb +libext+.sv tb/tb_fpa_readout.sv
./obj_dir/Vtb_fpa_readout
```

Each testbench prints `TB_RESULT checks=N failures=M`.

| testbench | what it does |
|---|---|
| `tb_c_element` | truth table, reset, random walk against a model |
| `tb_send_unit` | hit, acknowledge, hit during acknowledge, reset, random sequence |
| `tb_fpa_node` | 8-to-1 controller, about 300 requests from random senders. Checks highest-index priority, data, a single acknowledge, stable data and handshake order |
| `tb_fpa_tree` | 512-pixel trees of size 1, 3 and 9 side by side. All pixels fire at once, then random hits. Every request must come out exactly once |
| `tb_fpa_readout` | top at its default size (512 pixels, size 3), end to end. See below |

The phases of `tb_fpa_readout` are:

1. All 512 pixels fire at once.
2. 940 hits spread over 100 µs, the load of one column at about 3.2 GHz/cm².
3. 98 hits over 100 µs, about 0.33 GHz/cm².
4. A dense burst on 16 pixels.

A reference model predicts, per pixel, how many reads must come out. It
tracks the merged and lost hits and checks one pixel reset per read. The
testbench fails unless contested grants, merged hits, lost hits and pixel
resets all occur. In these testbenches one time unit stands for 1 ns.

To change the design size, set `NPIX` and `CTRL_SIZE` on `fpa_readout`. For
example, `#(.NPIX(64), .CTRL_SIZE(3))` gives two levels of 8-to-1, and
`#(.NPIX(64), .CTRL_SIZE(2))` gives three levels of 4-to-1.
