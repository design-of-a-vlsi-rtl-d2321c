# Buffered five-port router with a CDMA physical link

This is a small network-on-chip router in SystemVerilog. Eight-bit flits enter
at five ports: local (C), north, south, east and west. Each input has its own
FIFO. A round-robin arbiter lets one FIFO at a time through a crossbar. Every
output port has an added buffer. These output buffers are what the design
adds to a plain FIFO/arbiter/crossbar router: the crossbar can hand a flit to
a full-speed buffer even when the next stage is slow.

The next stage here is slow on purpose. The four neighbour outputs do not
get four separate links. They share one link by code-division multiple
access (CDMA). Each port's words are spread with its own orthogonal code,
and the spread chips of all four ports are added into one small number per
clock. A receiver recovers each port's word by correlating the sum with that
port's code. A CDMA word takes 64 clocks to send, and the output buffers
absorb that.

The RTL follows a published description of a "VLSI router with buffer" and
of the CDMA transmitter, receiver and crossbar used as its physical layer.
That description gives the blocks and how they connect. It does not give
most widths, depths, encodings or timing. Those are filled in here and listed
under [Departures and choices](#departures-and-choices).

## Block structure

```
             +------------------------------- router ------------------------------+
 in C  ----> | FIFO --+                                       +--> out buf C ------+----> local_*
 in N  ----> | FIFO --+--> rr_arbiter (one grant per clock)    +--> out buf N --+   |
 in S  ----> | FIFO --+                                       +--> out buf S --+   |
 in E  ----> | FIFO --+--> crossbar (mux of the granted head,  +--> out buf E --+   |
 in W  ----> | FIFO --+     demux to the selected output) -----+--> out buf W --+   |
             +--------------------------------------------------------------- | --+
                                                                              v
                             cdma_tx: 4 x (PISO -> XOR with code) -> adder -> chan_sum, chan_sync
                                                                              |
                             cdma_rx: code generator synced by chan_sync,     v
                                      4 x (despreader -> SIPO) ------------> rx_valid[4], rx_data[4]
```

| Module | Role |
|---|---|
| `router_pkg` | widths, port numbering, flit struct, select mapping, Walsh chip function |
| `fifo` | synchronous FIFO: input buffers and output buffers |
| `rr_arbiter` | round-robin arbiter, one grant per clock |
| `crossbar` | multiplexer and demultiplexer, one link per clock |
| `router` | five input FIFOs, arbiter, crossbar, five output buffers |
| `pn_code` | chip and bit counters and one code chip per user |
| `piso` | parallel-to-serial register, one per transmitting user |
| `cdma_tx` | spreads and adds four users into the channel |
| `cdma_despreader` | zero/one accumulators and comparator for one user |
| `sipo` | serial-to-parallel register, one per receiving user |
| `cdma_rx` | code generator plus four despreaders and SIPOs |
| `cdma_router_top` | router plus CDMA link, the top level |

## Flits and routing

A flit is 8 data bits plus a 2-bit output select (`router_pkg::flit_t`).
The crossbar has only two select lines, so a select cannot name all five
ports. Here it names one of the four ports other than the one the flit
arrived on, counting cyclically from the next port:

    dest = (src + 1 + sel) mod 5,   ports numbered C=0, N=1, S=2, E=3, W=4

| from \ sel | 0 | 1 | 2 | 3 |
|---|---|---|---|---|
| C | N | S | E | W |
| N | S | E | W | C |
| S | E | W | C | N |
| E | W | C | N | S |
| W | C | N | S | E |

A flit never returns to the port it came from. The router does not compute
routes itself: whoever injects a flit picks its select. For a mesh node that
would be a dimension-order decision made at the previous hop.

## Arbitration, crossbar and buffering

An input FIFO requests the crossbar when two things hold: it is not empty,
and the output buffer its head flit is heading for is not full. So a flit
waits in its input FIFO instead of being dropped, and a blocked output holds
back only the inputs that want it.

The arbiter keeps a pointer to the port with the highest priority. Each
clock it grants the first requesting port at or after the pointer. The
pointer then moves to the port after the one granted. With all five ports
requesting, the grants go C, N, S, E, W, C, … Only one flit moves through
the crossbar per clock. The grant pops the input FIFO, and the crossbar's
write strobe pushes the flit into the output buffer in the same clock.

Timing of the router alone:

- Latency through an idle router is 2 clocks. A flit accepted at clock t
  (`in_valid && in_ready`) appears on `out_data` with `out_valid` at t+2.
- Throughput is one flit per clock in total over all ports.
- `in_ready` is "input FIFO not full". `out_valid` is "output buffer not
  empty". A word moves when valid and ready are both high.
- `rst` is synchronous and active high. It empties every buffer, so buffered
  data is lost.

Both buffer depths are parameters (`IN_DEPTH`, `OUT_DEPTH`, default 8).

## The CDMA link

This part takes the most explaining.

### Spreading

Each of the four users (N, S, E, W, in that order as users 1..4) has a
spreading code of SF = 8 chips. User u uses row u+1 of the 8×8
Walsh–Hadamard matrix. Chip i of row r is `parity(r & i)`:

| user | row | chips 0..7 |
|---|---|---|
| 1 (N) | 1 | 0 1 0 1 0 1 0 1 |
| 2 (S) | 2 | 0 0 1 1 0 0 1 1 |
| 3 (E) | 3 | 0 1 1 0 0 1 1 0 |
| 4 (W) | 4 | 0 0 0 0 1 1 1 1 |

Row 0 (all zeros) is not used, because decoding needs codes with as many
ones as zeros. So an SF-chip code supports at most SF−1 users. All codes are
mutually orthogonal: the link is not overloaded with more users than
orthogonal codes.

A word is sent MSB first. Each bit is held for 8 clocks, and in each clock
it is XORed with the user's chip. The channel value is the number of users
whose encoded chip is 1:

    S(i) = sum over active users j of  d(j) XOR C(j, i)        (0..4, 3 bits)

A user with nothing to send contributes 0 to every chip.

### Decoding with two accumulators

For one user x, the receiver adds each channel sample into one of two
accumulators. The chip C(x,i) chooses which. Samples at chips where
C(x,i) = 0 go to the *zero* accumulator, and those where C(x,i) = 1 go to
the *one* accumulator. Over one bit (8 chips):

- Every other user j's code has exactly two ones among the four chips
  where code x is 1, and two among the four where code x is 0. Whatever bit
  j sends, it therefore adds 2 to each accumulator.
- If x sends 0, its encoded chips equal its code, so it adds 4 to the one
  accumulator and 0 to the zero accumulator. If x sends 1, the opposite
  happens.

So `bit = (zero > one)`. The two sums differ by exactly 4 when x is active
and are equal when x is idle. Equal sums are therefore reported as "no
signal". A word is delivered (`rx_valid`) only if all 8 of its bits showed
the signal.

### Framing and synchronisation

All users share one frame of 8 bits × 8 chips = 64 clocks. In the last clock
of a frame, `usr_ready` is high for every user. Each user whose output
buffer holds a word hands it over then. That word is spread over the whole
next frame. The transmitter registers its channel outputs. `chan_sync` is
high with the first chip of every frame. The receiver's code generator is
forced to chip 0 of bit 0 whenever `chan_sync` is high, so the receiver locks
on at any frame start, including after gaps.

Timing of the link:

- A word goes from the transmitter's hand-over to `rx_valid` in
  **67 clocks**: the 64-clock frame, one register in the transmitter and two
  in the receiver (the bit decision, then the word flag).
- Each neighbour port carries one word per 64 clocks. That is one data bit
  per 8 clocks, or a transaction rate of clock/SF.
- `rx_valid[u]` is a one-clock pulse. `rx_data[u]` holds the word until the
  next one.

The local port C does not use the link. Its output buffer drives `local_*`
directly.

## Top-level interface (`cdma_router_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock (rising edge), synchronous active-high reset |
| `in_valid[5]`, `in_ready[5]` | in / out | 1 each | input handshakes for C, N, S, E, W |
| `in_data[5]`, `in_sel[5]` | in | 8, 2 each | flit data and output select |
| `local_valid`, `local_ready`, `local_data` | out / in / out | 1, 1, 8 | local output |
| `chan_sum`, `chan_sync` | out | 3, 1 | the shared CDMA channel |
| `rx_valid[4]`, `rx_data[4]` | out | 1, 8 each | words recovered for N, S, E, W |

Parameters: `IN_DEPTH` = 8, `OUT_DEPTH` = 8, `SF` = 8. `cdma_tx`,
`cdma_rx` and `pn_code` also take `N_USERS` (4) and `DATA_W` (8). Keep
`N_USERS < SF` and SF a power of two.

At the default sizes the design has 254 flip-flop bits and 720 bits of buffer
memory. It easily fits the Artix-7 200T class of FPGA the original design
was built on.

## Departures and choices

These follow the original description:

- Five ports C, N, S, E, W.
- 8-bit data.
- One input FIFO per port, with read/write pointers, a counter and full and
  empty flags.
- A round-robin arbiter.
- A crossbar built as a mux plus a demux, carrying one link at a time, with
  a 2-bit select.
- A buffer added at each output port.
- A CDMA transmitter with four users: PISO, per-user code, XOR spreading and
  an adder.
- A receiver with per-user despreading, SIPO and comparator.
- A decoder built from zero and one accumulators.
- Transaction rate = clock / code length.
- Reset deletes data.

These are this design's own choices, where the description is silent:

- **Codes.** The original calls the codes "PN sequences" and also says
  classical CDMA uses Walsh–Hadamard codes. Walsh codes are used, because
  pseudo-noise codes are not orthogonal and would leave interference. The
  code length of 8 is chosen here.
- **Channel width.** The channel sum is given as log2(M) bits, which would
  be 2 bits for four users. The sum of four one-bit chips reaches 4, so the
  channel here is 3 bits.
- **Receiver structure.** The receiver figure shows two SIPOs per user
  feeding a comparator. Here that pair is taken to be the zero/one
  accumulators of the CDMA crossbar decoder. A single SIPO rebuilds the
  word from the decided bits.
- **Select encoding.** The relative mapping in the table above is chosen
  here.
- **Routing.** The description names mesh topology and routing strategies
  but gives no routing algorithm. The router only follows the select.
- **Which ports use CDMA.** The description makes CDMA the router's physical
  layer but does not say which ports use it. The four neighbour ports use
  it, matching the four transmitter users. The receiver sits inside the top
  level so the link can be tested end to end; in a network it would sit in
  the neighbouring router.
- **Protocol.** The frame structure, `chan_sync`, silent idle users and the
  "all bits present" rule are all chosen here.
- **Sizes and handshakes.** Buffer depths, the valid/ready handshakes, show-ahead FIFOs, one
  clock domain and MSB-first bit order are chosen here.
- **Clock edge.** The waveform description says data moves while the clock
  is low. All registers here use the rising edge.

The original's FPGA results are not reproduced by this RTL: 15 LUTs,
4.233 ns and 4.420 W. A design with ten 8-entry buffers and a CDMA
transceiver is far larger than 15 LUTs.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/router_pkg.sv \
          tb/cdma_router_top_tb.sv --top-module cdma_router_top_tb -o sim
./obj_dir/sim
```

Substitute any other `*_tb` for a single block. `router_pkg.sv` must come
first on the command line. The other files are found through `-Irtl`.

The end-to-end test `cdma_router_top_tb` runs the top at its default
parameters for about 13,000 clocks. Every flit carries its source port in
bits 7:5 and a sequence number in bits 4:0. A scoreboard checks each word at
the local output and at the CDMA receiver for port, order and content. It
also checks the 67-clock link latency and that the pattern 1010_1110 crosses
the router in 2 clocks. It counts, and requires at least once, each of these:

- a full input FIFO
- a full output buffer
- arbiter contention
- a CDMA frame shared by several users
- an idle CDMA user
- local back-pressure
- a reset that deletes buffered data

The block testbenches compare against independent models: queue models for
the buffers and a pointer model for the arbiter. The Walsh matrix is built
by Sylvester doubling, and the channel sums are computed directly from the
spreading equation.

## Changing the design

- **Deeper buffers.** Set `IN_DEPTH` / `OUT_DEPTH`. Any depth ≥ 1 works; it
  need not be a power of two.
- **Longer codes.** Set `SF` to 16, for example. The frame becomes
  8 × SF clocks and the link latency 8 × SF + 3.
- **Wider flits.** Change `DATA_W` in `router_pkg`. The testbenches assume 8
  bits, with the source port in bits 7:5.
- **More ports.** `NPORTS`, `SEL_W` and `dest_port` in `router_pkg` go
  together. The number of CDMA users in the top is `NPORTS − 1`.
