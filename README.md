# SpaceWire codec and router with a double-data-rate line interface

SpaceWire (ECSS-E-50-12A) links send data and strobe on two wire pairs (DS encoding).
On each bit, exactly one of the two signals changes. A conventional codec clocks its
transmitter at the bit rate and recovers the receive clock as `D xor S`. This RTL
instead runs the whole codec at **half the bit rate**. Its system clock tops out at
200 MHz, and every clock carries two line bits, one on each clock phase. That gives
400 Mb/s without a 400 MHz clock. The design follows the architecture published as
*Design and Implementation of Synthesizable SpaceWire Cores* (Space Research Group,
University of Alcalá):

* a **codec**: a transmitter, a receiver and the link initialisation state machine,
  plus a 56-character receive buffer;
* a **router**: a switch matrix with logical addressing, a constant routing table and
  wormhole routing, for 3 to 8 ports (4 by default);
* a **router node** (the top level, `spw_router_node`): the router with one codec on each
  port, the hub of a star network.

All of it is plain synthesizable SystemVerilog with no vendor primitives.

## Why two bits per clock works: the even and odd flows

Every SpaceWire character has an even number of bits:

| character | bits on the wire (first bit first) | length |
|---|---|---|
| FCT | P 1 0 0 | 4 |
| EOP / EEP | P 1 0 1 / P 1 1 0 | 4 |
| ESC | P 1 1 1 | 4 |
| NULL | ESC + FCT | 8 |
| data | P 0 d0 … d7 | 10 |
| time-code | ESC + data character | 14 |

The line starts with D = S = 0, and the first bit sent is always a zero parity bit, so
the strobe toggles on it. From then on every bit toggles `D xor S` once. As a result:

* the parity bit of every character is at an even position (bit 0, 2, 4, …);
* `D xor S` is **high during every even bit and low during every odd bit**.

The transmitter therefore emits the stream as two flows, even bits and odd bits, one
pair per clock. It sends the even bit in the clock's high phase and the odd bit in the
low phase. The strobe needs no state at all. For the line to satisfy "D xor S = 1 on
even bits, 0 on odd bits", the strobe must be

```
S_even = D_even xor 1 = not D_even
S_odd  = D_odd  xor 0 = D_odd
```

That is two inverters' worth of logic instead of a toggle flip-flop that has to see
every bit.

At the receiver, the recovered clock `rxclk = D xor S` runs at half the bit rate. Its
rising edge starts an even bit and its falling edge starts an odd bit. `spw_rx` takes D
at each rising edge (the even bit) and at each falling edge (the odd bit). It writes the
`{even, odd}` pair into a small dual-clock FIFO at the falling edge. Because characters
are always an even number of bits long, a pair never straddles two characters, so the
decoder on the system clock works on whole pairs and never needs to realign.

### The DDR output register (`spw_ddr_out`)

A clock-selected multiplexer in front of two flip-flops glitches when the selected
flip-flop updates on the same edge. The receiver at the far end is clocked by
`D xor S`, so such a glitch would be taken as two clock edges. The output register
therefore uses two flip-flops whose outputs are XORed:

* the rising-edge flop stores `d_even xor r_neg`;
* the falling-edge flop stores `d_odd xor r_pos`.

The XOR shows `d_even` after the rising edge and `d_odd` after the falling edge. Only
one flop changes per edge, so each line output changes at most once per clock edge.
The odd bit is taken at the rising edge too, and held for the falling edge. On an FPGA
this module can be swapped for the device's DDR output cell.

## The codec (`spw_codec`)

```
             tx_valid/tx_data, tick_in           rx_valid/rx_data, tick_out
                        │                                  ▲
                        ▼                                  │
   tx_div ──►  ┌──────────────┐  fct_req/ack  ┌──────────────────┐
               │   spw_tx     │◄──────────────│  spw_rx_buffer   │ 56 N-chars
               │ even/odd     │   got_fct     │  + credit        │
               │ pairs        │◄──────┐       └──────────────────┘
               └──────┬───────┘       │                 ▲ N-chars
          2 x spw_ddr_out             │       ┌─────────┴────────┐
               D_out, S_out           └───────│     spw_rx       │◄── D_in, S_in
                                              └─────────┬────────┘
                              enables ┌──────────────┐  │ events, errors
                             ◄────────│ spw_link_fsm │◄─┘
             link_start/disable/auto ►└──────────────┘──► link_state
```

### Transmitter (`spw_tx`)

The transmitter loads the next character whenever the previous one has left. It picks
one by the standard's priority:

1. a queued time-code, in Run;
2. an FCT the receive buffer asked for, in Connecting or Run;
3. a host N-char, in Run and only with transmit credit;
4. otherwise a NULL.

Parity is odd over the previous character's data or control bits plus the current P and
F bits. A running XOR of the last character's data bits supplies it. The transmit
credit counter lives here:

* a received FCT adds 8;
* each N-char sent takes 1;
* credit above 56 raises `credit_error`.

**Rate.** `tx_div = 0` selects DDR mode: one pair per clock, 400 Mb/s at 200 MHz.
`tx_div = N > 0` holds each bit for N whole clocks (200/N Mb/s), and both halves of the
clock then carry the same bit. Until the link reaches Run the codec forces `INIT_DIV`
(20, which is 10 Mb/s at 200 MHz), as the standard's start-up rate requires. In Run it
uses the host's `tx_div`. The setting is sampled only at character boundaries, so a
rate change never splits a pair. Rates between 200 and 400 Mb/s are not available.

**Latency.** The pair is registered in `spw_tx` and goes out through `spw_ddr_out` one
clock later. After `tx_enable` rises, the first bit reaches the line about three clocks
later.

### Receiver (`spw_rx`)

The receiver works in four stages:

1. **Capture.** This runs on `rxclk` and `~rxclk`, as described above. It is held in
   asynchronous reset while `rx_enable` is low.
2. **Clock crossing.** An 8-entry FIFO of 2-bit pairs with Gray-coded pointers
   (`spw_async_fifo`). The system clock reads up to two pairs per clock, so the system
   clock must be at least a quarter of the incoming bit rate. At 400 Mb/s against
   200 MHz the reader has twice the rate it needs, so a sender whose clock runs faster
   than the receiver's cannot fill the FIFO. The decoder steps through two pairs in one
   clock; since every character is at least two pairs long, at most one character
   completes per clock. The second pair is not taken if the first one raised an error.
   If the FIFO ever overflows, this is reported as a disconnect.
3. **First NULL.** Until a NULL has been seen, the decoder slides a four-pair window over
   the stream looking for `x111 0100` (ESC then FCT; the FCT's parity bit after an ESC is
   always 0). So a receiver enabled in the middle of a stream locks onto the next NULL.
   Parity and escape errors count only after this point.
4. **Decode.** This stage assembles characters and checks parity. It turns ESC+FCT into
   NULL and ESC+data into a time-code. ESC followed by ESC, EOP or EEP is an escape error.

**Disconnect.** After the first bit, the receiver watches two things for activity: the
recovered clock level (through a synchroniser) and the FIFO write pointer. The pointer
changes on every pair even when the line is too fast to sample. If neither changes for
`DISC_CYCLES` system clocks (170 = 850 ns), the receiver raises `disc_err`. Errors are
sticky and stop decoding until the state machine resets the receiver.

### Link initialisation (`spw_link_fsm`)

This is the standard's state machine:

`ErrorReset –6.4 µs→ ErrorWait –12.8 µs→ Ready –enabled→ Started –NULL→ Connecting –FCT→ Run`

* Started and Connecting time out after 12.8 µs.
* The link falls back to ErrorReset on:
  * any receive error;
  * a credit error;
  * `link_disable` in Run;
  * a character the state does not allow yet (FCT before Connecting, or an N-char or
    time-code before Run).
* "Enabled" means `!link_disable && (link_start || (autostart && NULL seen))`.
* A NULL seen in Ready is remembered.
* The timers are clock counts (1280 and 2560 at 200 MHz) and can be set by parameter.

### Receive buffer and flow control (`spw_rx_buffer`)

The receive buffer is a 56-word FIFO of N-chars. `outstanding` counts the N-chars the far
end may still send on FCTs already granted. While
`outstanding + 8 + stored ≤ 56`, the buffer asks the transmitter for an FCT. Each FCT
sent adds 8 to `outstanding`, and each N-char received takes 1. An N-char arriving with
nothing outstanding is a credit error. An empty buffer thus grants exactly 7 FCTs.

## The router (`spw_router`)

**Addressing.** The first data character of a packet is its logical address, 32 to 255.
The routing table is a constant parameter, `ROUTES`, with 224 four-bit entries, one per
logical address. The default sends address `32+k` to port `k` and marks every other
address as unroutable. The header stays on the packet (no header deletion).

**Wormhole routing.** Each input has a small controller with four states: idle, wait for
port, forward, discard.

* It looks up the header and requests the output.
* Once the output's arbiter (`spw_router_arbiter`) grants it, the controller connects the
  input straight through to the output, combinationally, until the EOP or EEP has
  passed. Then it releases the port.
* Each output arbiter is round-robin and keeps the grant for the whole packet.

**Busy output.** The input just stops reading. The codec's 56-character buffer then
fills and stops granting FCTs, and the sending node is held back by its own credit
counter. Nothing is lost, and no other port is affected.

**Bad packets.**
* A packet whose address is not in the table is read and discarded up to its end
  marker. That includes path addresses 0–31, since path addressing is not implemented.
* A lone end marker is discarded.

`dropped` pulses once per discarded packet. `blocked` shows inputs whose header is
waiting for a busy port.

**Timing.** A header offered to an idle router reaches its output 3 clocks later:

1. lookup;
2. arbitration;
3. switch.

After that, one N-char per clock passes through.

`NPORTS` may be 3 to 8. An elaboration-time assertion rejects other values.

## Router node (`spw_router_node`, top level)

`spw_router_node` has one `spw_codec` per port. Each codec's receive side feeds the
router input of that port, and the router output feeds the codec's transmitter; the
interfaces match, so there is no glue. Per port, the top level brings out:

* the line (`d_in`, `s_in`, `d_out`, `s_out`);
* link control (`link_start`, `link_disable`, `autostart`, `tx_div`);
* status (`link_state`, `running`, `link_error`);
* the codec's time-code ports, which the router does not use;
* the router's `blocked` and `dropped` flags.

The whole node runs on one clock and one active-low asynchronous reset.

### Host / port word

The host interface and the router ports use the same 9-bit word, `spw_pkg::nchar_t`:

* `{ctrl, data[7:0]}`;
* `ctrl = 1` marks an end of packet: `data[0] = 0` is an EOP, `1` is an EEP.

All handshakes are valid/ready: a word moves on a clock edge where both are high.
`ready` may depend on `valid`.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NPORTS` | 4 | router ports, 3..8 |
| `ROUTES` | 32+k → k | logical address → port table, 224 entries |
| `RXBUF_DEPTH` | 56 | receive buffer, N-chars |
| `INIT_DIV` | 20 | clocks per bit before Run (10 Mb/s at 200 MHz) |
| `T_6U4`, `T_12U8` | 1280, 2560 | state machine timers, clocks |
| `DISC_CYCLES` | 170 | disconnect timeout, clocks (850 ns) |

Timing constants assume the 200 MHz clock. Scale them for another frequency.

## Where this RTL departs from, or adds to, the published design

These parts follow the published design:

* even/odd flows and the strobe equations;
* DDR at both ends, with a clock at half the bit rate;
* the 56-character receive buffer;
* logical addressing with a constant table;
* wormhole routing;
* stalling on a busy output;
* 3 to 8 ports, 4 by default.

These parts come from the SpaceWire standard, because the published design only names
them:

* character set and parity;
* the link state machine and its timers;
* credit counting;
* the disconnect timeout;
* the first-NULL search.

These are choices of this RTL:

* the host handshake and word format;
* the `tx_div` rate encoding (DDR or whole clocks per bit);
* the XOR-based DDR register;
* the pair FIFO between the recovered clock and the system clock, and the activity
  detector;
* round-robin arbitration;
* the default routing table;
* dropping unroutable packets;
* keeping the header.

Not implemented:

* **Path addressing.** The published design lists it as future work.
* **Time-code distribution in the router.**
* **Host bus interfaces** (RMAP, DMA, AMBA). These are also future work in the
  published design.
* **Insertion of an EEP** into a packet cut off by a link error.
* **Clock generation** (PLL/DLL). The published design also keeps this outside the core.

Limitations:

* The receive FIFO needs `f_clk ≥ bit rate / 4` (see above).
* The receiver's capture stage is reset asynchronously when `rx_enable` falls, and is
  released without synchronisation to the line.
* Timing closure at 200 MHz has not been checked on any device.
* The published prototype's gate count (4952 gates on a Spartan-IIE) is not comparable
  with a generic synthesis of this RTL.

## Verification

Every block has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_spw_tx` | independent decoder of the pair stream: strobe rule, parity, NULL/FCT/data/EOP/EEP/time-code encodings and priority, 8 N-chars per FCT, credit error, slow-mode bit length |
| `tb_spw_ddr_out` | even bit in the high phase, odd bit in the low phase, no glitches |
| `tb_spw_rx` | behavioural DS encoder at 10 Mb/s and 400 Mb/s; lock in mid-stream; parity, escape and disconnect errors (850 ns) |
| `tb_spw_link_fsm` | exact 6.4/12.8 µs timing, every transition, autostart |
| `tb_spw_rx_buffer` | 7 FCTs into an empty buffer, FCT again after 8 reads, order, credit error |
| `tb_spw_codec` | two codecs on separate clocks: start-up time, packets longer than the buffer both ways at 10 Mb/s and 400 Mb/s, time-code, throughput, a sender with a 4 % faster clock, cut line and restart |
| `tb_spw_router` | routing, 3-clock header latency, 1 char/clock, blocking, drops, EEP |
| `tb_spw_router_node` | default top with four nodes end to end: routing to every port, wormhole stall, drops, EEP, time-codes, flow-control back-pressure, DDR rate |
| `tb_spw_router_star8` | the same with eight ports |

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl rtl/spw_pkg.sv tb/tb_spw_router_node.sv \
          --top-module tb_spw_router_node -y rtl -y tb
./obj_dir/Vtb_spw_router_node
```

Every testbench runs in seconds. The end-to-end test simulates about 1 ms of link time.
