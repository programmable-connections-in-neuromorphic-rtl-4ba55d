# A programmable relay for grids of neuromorphic chips

A neuromorphic system that outgrows one die can be built as a row of identical
chips. Each chip holds one layer of neurons, and a "columnar" circuit links
the neurons at the same position on different chips. Spikes travel between
the chips as small packets that every chip relays to its neighbour. This RTL
is the relay block of such a chip, with a small on-chip look-up table that
makes the chip-to-chip connections programmable:

* Every packet carries, in its first word, the position of the chip it came
  from, counted relative to the chip that receives it. Each relay decrements
  this number before passing the packet on.
* The relay looks up the decremented number in a 256-entry table. The entry
  says whether this chip wants spikes from that source (bit K), and which of
  the four pixels of a colour group should get them (the two AP bits). Since
  the connectivity is assumed to be the same at every position (translation
  invariant), one entry per relative source chip is all the table needs.
* The same packet mechanism writes the table. A packet whose first word
  arrives as 0 underflows when it is decremented. That marks this chip as
  the target, and the packet's next two words are written into the table
  (address and data) instead of being looked up.

In the original circuit the relay is asynchronous (quasi-delay-insensitive),
with 1-of-4 coded channels and four-phase handshakes. This version is a
single-clock design. Every channel between the relay's processes is a
valid/ready pair, and only the chip pads keep the 1-of-4 four-phase protocol,
through small clocked interfaces.

## Packets

A packet is a sequence of 10-bit words. Bit 0 of every word is the tail bit:
it is 1 only in the last word of a packet. Two kinds of packet exist:

| word | programming packet                         | address event                          |
|------|--------------------------------------------|----------------------------------------|
| 0    | head: target chip, bits 9:2 (0 at target)  | head: relative source chip, bits 9:2   |
| 1    | table address, bits 9:2                    | row address, bits 9:1                  |
| 2    | table data: K = bit 4, AP = bits 3:2       | column address, bits 9:1 (one or more) |
| last | tail (bit 0 = 1)                           | tail (bit 0 = 1)                       |

Chip numbers are 8-bit two's-complement values. Row and column fields are
9 bits wide, enough for the 240 x 320 groups of the pixel array the relay was
made for. On the pads each word is five 1-of-4 sets. Set *s* carries bits
2s+1:2s, and the code is 00→0001, 01→0010, 10→0100, 11→1000. A set with no
wire high is neutral.

## What happens to a packet

```
 in pads ─ qdi_rx ─ fifo ─ dec ─ fifo ─ split ─L─ fifo ─ qdi_tx ─ out pads
                           │ dctl        │M
                           │C           fifo
                          fifo           │Q
                           │U        word_switch
                           └──▶ mctl ◀──A─┤
                                 │  │     ├─B──▶ filter ─P─▶ sram
                                 │  └─ J ─┼─C──▶ send ──D──▶ receiver
                                 └─ ma, W, R ───────────────▶ sram
```

1. **Head detection and decrement.** `dctl` keeps one bit that marks "the
   next word starts a packet". The bit is set by every tail word, and also
   out of reset. `dec` subtracts this bit from the chip field of each word, so
   only head words change. The borrow out of the top bit is the underflow. It
   is sent once per packet on channel C and reaches the memory controller
   through its own FIFO.
2. **Forwarding.** `split` copies every word to the off-chip path L and to
   the memory path M. All packets leave on the output pads with the
   decremented head, including programming packets and packets this chip
   uses.
3. **Memory path.** `word_switch` hands each memory-path word to whichever of
   three consumers asks for it: the memory controller (`mctl`, port A),
   `filter` (port B) or `send` (port C). Only one asks at a time.

## The memory controller

`mctl` does most of the work, and its sequences are the part to understand
before changing anything. It waits until both the underflow bit (channel U)
and the head word (port A) are available, and takes them together.

**Programming (underflow = 1).** The head word, which is always −1 at this
point, is dropped.

| state | action |
|-------|--------|
| ADDR  | Take word 1 from port A and latch its chip field (bits 9:2) as the table address `ma`. |
| WRITE | Raise F to `filter` and W to `sram` together. `filter` passes word 2 from port B to the SRAM data input. The SRAM writes when command and data meet, and both handshakes finish in that clock. |
| ERASE | Raise E. `filter` drops words up to and including the tail word. |

**Look-up (underflow = 0).** The chip field of the decremented head is
latched as `ma`.

| state | action |
|-------|--------|
| READ  | One-clock read strobe. |
| RWAIT | The 16-bit entry arrives one clock later. |
| SEND  | If bit 4 (K) is set, start `send` with the entry (J). `send` takes the row, column and tail words from port C and delivers each one with the entry's bits 3:2 appended. J finishes with the tail word. |
| ERASE | If K is clear, `filter` drops the rest of the packet. |

The look-up always uses the decremented head, as the relay's specification
defines it. A recorded test of the original chip programs table address 11
and then sends an event whose head arrives as 11, which this rule would look
up at entry 10. The workload testbench (`tb_fig8_grid`) therefore sends its
event with head 12.

Two consequences follow from the rules and are not guarded against:

* A programming packet that passes through a chip it does not target is
  looked up there like an event. Its source entry for that chip should have
  K clear.
* A programming packet needs at least three words before its tail.

The table is not reset: an entry must be written before it is read.

## From asynchronous processes to clocked logic

The original relay is eight concurrent processes joined by handshake
channels. The clocked version keeps those processes as modules and those
channels as valid/ready pairs. The following changed on the way; each is
this design's choice:

* **MCTL.** Its two handshake processes (address/write and read) and the
  address latch are merged into one state machine (`mctl`). The asynchronous
  "triangular" handshakes between controller, SRAM and SEND or FILTER become
  a read strobe, a registered read, and then J or E.
* **FILTER.** Its two deletion ports (one for programming, one for filtered
  look-ups) are a single E channel, because the two uses never overlap.
* **DEC's borrow output.** It is sent only for head words. The controller
  reads one underflow per packet.
* **SWITCH.** The probe of a pending request becomes a request line per port
  (`a_req`, `b_req`, `c_req`) plus a ready line. A selected consumer
  therefore sees its word even while it stalls: SEND shows a word while the
  receiver is busy.
* **Buffering.** The FIFOs sit where the original block diagram places
  them, and are two words deep (their depth is not specified). `split` has
  a one-word register per branch, so the core moves one word per clock.
* **Pad interfaces.** `qdi_rx` passes every input wire through a `SYNC`-stage
  synchroniser. In a four-phase 1-of-4 protocol each wire changes only once
  per phase, so a set that reads as valid after synchronisation already holds
  its final symbol. `vn` turns the sets into a word-valid state: every set
  valid sets it, every set neutral clears it. `qdi_tx` drives the sets from
  flip-flops and synchronises the acknowledge. With prompt partners a word
  takes 2·(SYNC+2) = 8 clocks to come in and 2·SYNC+3 = 7 clocks to go out.
  The original chip's burst rate (62.9 MHz, asynchronous) has no counterpart
  in cycles. In this version the pads, not the core, limit the rate.

## Parameters

| module | parameter    | default | meaning |
|--------|--------------|---------|---------|
| prog_y | `FIFO_DEPTH` | 2       | depth of the five datapath FIFOs (own choice) |
| prog_y | `SYNC`       | 2       | synchroniser depth at the pads, at least 2 (own choice) |
| prog_y | `DEPTH`      | 256     | table entries, one per relative chip address |
| prog_y | `KW`         | 16      | table word width; a stored 10-bit word is zero-extended |

Word and field widths are fixed by the packet format and live in
`rtl/grid_pkg.sv`, together with the 1-of-4 encode and decode functions.

## Interface of `prog_y`

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `in_d[4:0][3:0]`, `in_ack` | in / out | 1-of-4 input pads from the previous chip, and their acknowledge |
| `out_d[4:0][3:0]`, `out_ack` | out / in | 1-of-4 output pads to the next chip, and their acknowledge |
| `rcv_valid`, `rcv_ready`, `rcv_data` | out / in / out | delivered words for the receiver array: `{word[9:0], ap[1:0]}` |
| `rx_err` | out | a 1-of-4 input set had more than one wire high |

The receiver array (analog pixels), the merge path that injects the chip's
own spikes into the grid, and the pad cells are outside this RTL.

## Files

`rtl/`: `grid_pkg` (constants, types, 1-of-4 functions), `vn`, `qdi_rx`,
`qdi_tx`, `fifo`, `dctl`, `dec`, `split`, `word_switch`, `mctl`, `filter`,
`send`, `sram`, and the top `prog_y`.

`tb/`: one self-checking testbench per module (`tb_<module>`), plus the
two grid testbenches `tb_grid_chain` and `tb_fig8_grid`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_prog_y` runs the top at its default sizes. It drives both pads with
  four-phase models and checks the forwarded and delivered words against a
  reference model. The traffic is random programming packets (for this chip
  and for farther ones) and address events with one to four columns, run
  with a slow next chip and a stalling receiver. It also counts that table
  writes, deliveries, filtered look-ups, underflows, relayed programming
  packets, output back-pressure, receiver stalls and a full input FIFO all
  occur. A final burst of 40 columns, with no delays anywhere, checks that the
  input pads keep their 8-clock rhythm, so the core never slows them down.
* `tb_grid_chain` chains three relays. It programs each chip's table through
  the chain and then sends random address events, checking every chip's
  deliveries and the words behind the last chip against a model that walks
  each packet hop by hop.
* `tb_fig8_grid` chains two relays like the original two-chip functional
  test. It checks the words behind the second chip bit for bit against the
  recorded 1-of-4 symbols, and checks that the first chip filters or
  delivers as its entry says.

## Simulating

With Verilator 5, for example the top-level test:

```
verilator --binary --timing --assert -y rtl +libext+.sv \
          rtl/grid_pkg.sv tb/tb_prog_y.sv --top-module tb_prog_y -o sim
obj_dir/sim +verilator+rand+reset+2
```

`-y rtl` lets Verilator find each module in `rtl/<module>.sv`; the package
is named first because the modules import it. Any other testbench is run
the same way with its own `--top-module`. The random-reset option starts uninitialised state at random values. The
testbenches reset or write everything they read.
