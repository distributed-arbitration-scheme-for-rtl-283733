# Token-ring arbitration for a dynamic on-chip CDMA bus

A CDMA bus lets several processing elements (PEs) send at the same time over
one shared set of wires. Each sender spreads each data bit over N "chips"
using its own orthogonal code, the codes are summed onto the bus, and each
receiver recovers the bits by correlating the sum with the sender's code. In
a *static* CDMA bus every PE owns a code of its own. That needs M codes of
length M for M PEs, so each stream gets only 1/M bit per chip interval.

This design is a *dynamic* CDMA bus. M PEs share N < M codes (N channels),
so a stream runs at 1/N bit per chip interval. The price is arbitration:
someone must decide which sender may talk to which receiver, and with which
code. Here that is done without a central arbiter. A ring of M small
identical elements, one per PE, passes M tokens round the ring, one hop per
clock. Each token belongs to one PE as a destination. The state written into
the tokens does three things:

- it reserves receivers;
- it tells receivers when to start and stop;
- it moves ownership of codes from idle PEs to PEs that want to send.

The defaults are 16 PEs and 8 codes (M = 2N), with 1-byte data words.

## The bus: Walsh codes and the sum-chip

The N codes are the rows of an N×N Walsh–Hadamard matrix (N a power of two).
Chip `c` of code `w` is the parity of the bitwise AND of `w` and `c`. A 1
stands for −1 and a 0 for +1. A stream sends data bit `b` during N
consecutive chip intervals (one "packet"), and the chip it sends is
`b XOR code_chip`.

The central encoder (`cdma_encoder`) gives every one of the N channels a
chip in every chip interval:

- A channel whose code is in use sends the chip of its stream.
- A channel whose code is idle sends the chip for data bit 0. That is the
  plain code chip.

The bus carries the *number* of channels whose chip is 1. This count runs
from 0 to N, so the bus is k = 1 + log2 N wires wide (4 wires for N = 8).
Because idle channels are always present, a receiver with code `w` that sees
K ones in a chip where its code chip is `s` adds `(N − 2K)` when `s = 0` and
`−(N − 2K)` when `s = 1`. After N chips, the cross terms of the other codes
cancel exactly, so the total is `+N` for data bit 0 and `−N` for data bit 1.
The decoder (`cdma_decoder`) takes the sign of the total.

All packets are aligned. A free-running chip counter and the token counters
start together at reset, and the ring length M is a multiple of N, so every
ring interval (M clocks) holds exactly M/N whole packets.

## The arbitration ring

### Token and element state

A token is `{R, L, C, S, CW, ID}`, packed in that order from the MSB down:

| field | width | meaning |
|---|---|---|
| R | 1 | the owner of this token (as a receiver) is reserved by a sender |
| L | 1 | the sender has finished: the receiver must stop |
| C | 1 | CW holds a valid code identifier |
| S | 1 | a sender is searching for a free code |
| CW | log2 N | code identifier |
| ID | log2 M | identifier of the sending PE |

The bit order is this design's choice.

Each element holds:

- a token register (TR);
- a down-counter modulo M. It starts at the element's own number, so it
  always names the token that is in the TR. Element `i` holds token
  `(i − k) mod M` at clock `k`, and every element holds its own token at
  the start of a ring interval.
- a code register R_CW with two flags:
  - V: this PE owns a code.
  - B: the code is in use.

Every clock, the token in the TR goes through the element's combinational
logic and is written into the next element's TR. First the receive
process acts on it, then the transmit process, so one token can be changed
by both in the same hop.

### Receive process

- On any token with `S = 1, C = 0`: if this element owns a code it is not
  using (`V = 1, B = 0`), it writes the code into CW, sets C, clears S
  and gives up ownership (`V = 0`). This is the hand-over.
- On its own token: `R = 1, S = 0, C = 0, L = 0` while the receiver is idle
  means "start". The element loads CW (the code to despread with) and ID
  (the sender), and turns its receiver on. `L = 1` means "stop".

### Transmit process

The transmit side (state machine in `ring_arbiter_element`) goes through
these steps:

1. **Reserve.** When the PE requests a stream to destination `j`, wait until
   token `j` passes with `R = 0`, then set R.
   - If the element owns a code, write it to CW in the same hop.
   - If it does not, set S. The token now goes round the ring as a search
     request.
   
   If token `j` arrives with `R = 1`, the destination is busy and the
   element keeps waiting. Because tokens move round the ring, the nearest
   upstream requester wins each pass, and no element can win twice in a
   row against a waiting one. This gives round-robin fairness.
2. **Search.** On later passes of token `j`, look for `C = 1`. Some idle
   owner has put its code there. Take it: `V = 1`, and R_CW gets CW. If the
   token comes back with `S = 1, C = 0`, no code was free in that whole
   lap. The search stays open for another lap.
3. **Announce.** Clear S and C, write the own number into ID, and set B.
   Token `j` now carries the start command to the destination, which it
   reaches within the same ring interval.
4. **Transmit** from the next ring-interval boundary. Send
   `len × 8 × P_BYTES` bits, N chips each, then clear B. The code stays
   owned and can be reused or handed over.
5. **Terminate in two steps.** On the next pass of token `j`, set L, so the
   destination stops. On the pass after that, clear R and L, which releases
   the destination. `tx_done` pulses.

With an idle destination and a code already owned, the destination token
is reserved within one ring interval of the request, and the stream starts
at the next ring boundary after that: at most two ring intervals after the
request. Without a code it starts one ring interval later. This matches
the delay the scheme is designed for: on average one ring interval of
arbitration, plus one more interval for a code search.

### Code ownership

After reset, PEs `0..C−1` own codes `0..C−1`. Here `C = cw_count`, an input
(1..N) that is sampled while reset is held. Ownership then only moves by
hand-over, so the number of owned codes plus codes in flight in C-tokens is
constant. `ring_arbiter` checks this with an assertion. A PE may keep a code
as long as it likes, which makes back-to-back streams cheap. Codes stay
unique because:

- a code is handed over only by its owner, and only when its B flag is
  clear;
- a code in a C-token is picked up only by the one searcher that set S.

### Stopping the receiver, and the word constraint

The stop command travels in the destination's own token. So the receiver
stops one ring interval after the sender has finished. During that time
it decodes garbage: whatever is now on that code, zeros if it is idle. The
node discards any partly assembled word. The stop arrives exactly at a ring
boundary, and the sender also finished at one, so the extra bits number
exactly M/N. If M/N is a whole number of words, the last garbage word
completes in the very cycle the stop is seen, and it is dropped as well
(`rx_discard` pulses in both cases).

For this to remove exactly the garbage, the word (8·P_BYTES bits) must be
at least as long as the tail (M/N bits), and either a whole multiple of it
or at least twice as long. The design asserts at elaboration:

- `8·P_BYTES·N ≥ M`;
- either `8·P_BYTES·N` is a multiple of M, or it is at least 2M.

At the defaults (8·1·8 = 64 ≥ 16) there is ample margin. M = 16 with
N = 1 needs `P_BYTES = 2`.

## Modules

| module | role |
|---|---|
| `cdma_pkg` | width helpers (`id_width`, `sum_width`), Walsh chip function |
| `walsh_chip_gen` | one chip of a Walsh code, `^(code & chip_index)` |
| `cdma_encoder` | spreads all N channels and registers the k-bit sum-chip; asserts that no two active senders share a code |
| `cdma_decoder` | correlates the sum-chip with one code and returns one bit per packet |
| `ring_arbiter_element` | token register, counter, R_CW, receive and transmit processes |
| `ring_arbiter` | M elements wired in a ring (element m feeds m+1 mod M) |
| `sync_fifo` | show-ahead FIFO used for the transmit and receive buffers |
| `cdma_node` | per-PE bus interface: transmit byte FIFO, serializer, decoder, deserializer, receive buffer |
| `cdma_bus_system` | top: ring arbiter, M nodes, encoder, chip counter |

### Parameters of `cdma_bus_system`

| parameter | default | meaning |
|---|---|---|
| M | 16 | number of PEs and ring elements |
| N | 8 | number of codes (channels), a power of two dividing M |
| P_BYTES | 1 | bytes per data word; the receiver assembles and discards whole words |
| LW | 8 | width of the stream length (in words) |
| TX_DEPTH | 16 | bytes in each transmit FIFO |
| RX_DEPTH | 8 | words in each receive buffer |

### Using the top

All per-PE ports are arrays indexed by PE number. Reset (`rst_n`) is active
low and synchronous.

1. Write the whole stream into the PE's transmit FIFO (`tx_wr`,
   `tx_wdata`, `tx_full`, `tx_level`). Bytes are sent least significant bit
   first.
2. Raise `tx_req` with `tx_dest` and `tx_len`, the number of words
   (at least 1). Hold the request until `tx_ready` shows it was taken.
   `tx_done` pulses when the destination is released.
3. At the receiver, words come out of `rx_valid`/`rx_word`/`rx_word_src`
   and are removed with `rx_pop`. The receive buffer has no back-pressure
   onto the bus, so the PE must drain it; overrun is an assertion failure.

`sum_chip`, the code flags (`cw_valid`, `cw_busy`, `cw_id`), `rx_start` and
`rx_stop`, and the `ev_*` pulses are there for observation:

- `ev_dest_busy`: destination found reserved;
- `ev_search`: code search started;
- `ev_cw_give` / `ev_cw_take`: hand-over;
- `ev_cw_none`: a search lap found no free code.

Timing: the encoder adds one clock of latency. The node delays its chip
index by one clock to match. `rx_on` from the element is already
registered, so it lines up with the delayed sum-chip.

## What follows the scheme and what is this design's own

These follow the published scheme:

- token fields and their roles;
- one token per PE, passed one hop per clock;
- the per-element token register, counter, and code register with V and B;
- the receive process acting before the transmit process;
- reservation on the destination's token, and code search by a token that
  laps the ring;
- the start at the next ring interval, and the two-step termination;
- discarding of partial words;
- k-bit sum-chip encoding with idle channels sending 0;
- M = 16, N = 8 as the main size.

These are choices made here, because the scheme leaves them open or states
them differently:

- **B is cleared after the last chip.** In the published procedure nothing
  ever clears B, which would lock a code to its first user. With B cleared,
  a code can be handed over once its stream has ended.
- **The start condition also needs L = 0 and an idle receiver.** This
  stops a token that is still carrying a stop from being read as a new
  start.
- **Initial ownership**: PEs 0..C−1 own codes 0..C−1, where C comes from
  the `cw_count` pin sampled at reset. How the codes are first assigned is
  left open in the scheme.
- **Bit order** (LSB first), **word assembly** with the source ID stored per
  word, **FIFO depths** and the **req/ready handshake** are interface choices.
- The **word-size constraint** above is derived here. The scheme only says
  that partial words are discarded.
- **Size.** Yosys counts 51 flip-flops per ring element. The published
  element has 23 flip-flops and 26 LUTs. The difference is logic this
  element keeps that the published one may leave to the PE:
  - the stream-length counter;
  - the receive state (code, source, on flag);
  - the transmit state machine.
  
  Clock frequency was not measured.
- The PEs themselves (processors that produce and use the data) are not
  part of this RTL. The testbenches play their role.

## Measured behaviour

`tb_workloads` runs the top at its defaults with 64-bit streams (8 one-byte
words), as in the published evaluation. BT is the bus throughput: delivered
data bits per chip interval, where the bus capacity is 1. DSL is the mean
stream latency from request to last bit delivered, in chip intervals.

| traffic | this RTL | published figures (approx.) |
|---|---|---|
| saturated, uniform | BT 0.948, DSL ≈ 1046 | BT ≈ 0.94, DSL ≈ 1080 |
| saturated, hotspot h = 10 % | BT 0.873 | BT ≈ 0.79 |
| saturated, hotspot h = 20 % | BT 0.653 | BT ≈ 0.57 |
| Poisson λ = 0.02 bit/chip per PE | BT 0.33, DSL ≈ 609 | DSL ≈ 590 |
| Poisson λ = 0.08 bit/chip per PE | BT 0.94 | BT ≈ 0.94 |

The uniform and light-load numbers agree closely. The hotspot throughput
here is 0.08 to 0.1 higher than published. One possible cause is that the
published model uses a different hotspot choice or stream length. The
published figures were read off plots.

`tb_bus_size_sweep` runs the same saturated uniform traffic on eight
system sizes side by side. The published curves show that throughput peaks
when the bus width is about half the number of PEs. Narrow buses lose time
handing the few codes around, and wide ones sit idle because too many
senders want the same receiver:

| M | N | BT here | BT published (approx.) | DSL here | DSL published (approx.) |
|---|---|---|---|---|---|
| 16 | 1 | 0.796 | 0.775 | 1204 | |
| 16 | 4 | 0.937 | 0.925 | 1063 | |
| 16 | 8 | 0.952 | 0.94 | 1040 | 1080 |
| 16 | 16 | 0.607 | 0.59 | 1607 | |
| 8 | 8 | 0.628 | 0.61 | 795 | 840 |
| 32 | 8 | 0.937 | 0.93 | 2102 | 2190 |
| 4 | 4 | 0.692 | 0.67 | 358 | |
| 8 | 4 | 0.935 | 0.935 | 529 | |

M = 16 with N = 1 uses 2-byte words (see the word constraint above). The
Poisson-load curves are simulated only at M = 16.

## Simulating

Each testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it does |
|---|---|
| `tb_walsh_chip_gen` | every chip against the Walsh matrix built by recursive doubling |
| `tb_cdma_encoder` | random channel sets against a reference sum (M = 6, N = 4) |
| `tb_cdma_decoder` | sums of random streams on all codes, decoded bit by bit, plus correlation values |
| `tb_sync_fifo` | random push/pop against a queue model |
| `tb_ring_arbiter_element` | one element in a delay-line ring: reservation, start timing, search and hand-over, termination |
| `tb_ring_arbiter` | 8 elements, 2 codes: round robin, code shortage, random traffic, single-code mode, uniqueness of codes |
| `tb_cdma_node` | serializer bit order and timing, reception and discard of partial words |
| `tb_cdma_bus_system` | top at default parameters: directed start-time checks, saturated and hotspot traffic. Every word is checked, and every arbitration event must occur at least once |
| `tb_workloads` | the traffic patterns in the table above, with throughput and latency bounds |
| `tb_bus_size_sweep` | saturated traffic on eight sizes at once (through the helper `sat_traffic_bench`), compared with the published curves |

With Verilator 5, compile the package first and let Verilator find the
other modules in `rtl/` (and the helper bench in `tb/`):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/cdma_pkg.sv tb/tb_cdma_bus_system.sv --top-module tb_cdma_bus_system
./obj_dir/Vtb_cdma_bus_system
```

Use the same command for any other testbench. Testbenches run in seconds
to a minute. `tb_bus_size_sweep` takes a few minutes to compile, because it
elaborates eight systems. Verilator is a two-state simulator, so
everything that is read is reset or initialised. The testbenches use
`$urandom` only.

To try another size, change `M`, `N` and `P_BYTES` in a testbench's
localparams. The elaboration checks reject sizes that break the rules:

- N must be a power of two that divides M;
- the word constraint above must hold.
