# Ethernet fronthaul endpoint for a C-RAN: IQ samples straight into 10G Ethernet frames

In a centralised radio access network (C-RAN) the baseband unit (BBU) and the
remote radio head (RRH) are far apart. The fronthaul link between them carries
digitised IQ radio samples. This link is usually CPRI, a synchronous TDM link.
This design replaces CPRI with plain 10 Gigabit Ethernet: the IQ words the
LTE baseband logic (the "EUTRA module") produces go straight into the payload
of fixed-size Ethernet frames. Nothing is encapsulated and no protocol sits on
top.

The EUTRA module was written for a CPRI core. It expects CPRI timing: a
*basic frame* of IQ data at a fixed rate, with flags that say when to send and
when a received basic frame starts. The endpoint therefore has two jobs:

* move 32-bit IQ words at 30.72 MHz into 64-bit AXI4-Stream beats at
  156.25 MHz for a 10G Ethernet MAC, and back again;
* rebuild the CPRI-style flags `iq_tx_enable` and `basic_frame_first_word`
  around that stream, so the EUTRA module runs unchanged.

The same module, `fronthaul_endpoint`, is used at both ends of the link.

```
             30.72 MHz (eutra_clk)            |            156.25 MHz (eth_clk)
                                              |
 iq_tx ──► latency_injector ──► tx_fifo ══════╪══► framer ────► m_axis  (to MAC TX)
            ▲                  32→64 bit      |
 iq_tx_enable ◄─┐              (or iq_counter_gen in test mode)
                │                             |
          data_if_ctrl                        |
                │                             |
 iq_rx ◄────────┴──────────── rx_fifo ◄═══════╪═══ deframer ◄──── s_axis (from MAC RX)
 basic_frame_first_word       64→32 bit       |      │ fn/hdr/crc errors, drop_full
        │                 (or iq_seq_checker in test mode)
        ▼
   latency_meter  ◄── lat_trigger_in          ══ = clock-domain crossing
```

The 10G Ethernet MAC, PCS/PMA, transceivers and SFP optics are not part of
this RTL. Neither are the EUTRA module, the host interface and the clock
generation. The MAC's user-side AXI4-Stream appears as the `m_*` / `s_*`
ports. The EUTRA interface appears as `iq_tx`, `iq_tx_enable`, `iq_rx` and
`basic_frame_first_word`.

## Clock domains and the two FIFOs

There are exactly two clock domains in an endpoint:

| domain | clock | logic |
|---|---|---|
| EUTRA | `eutra_clk`, 30.72 MHz | FIFO write (TX) / read (RX) side, `data_if_ctrl`, `latency_injector`, `latency_meter`, `iq_counter_gen`, `iq_seq_checker` |
| 10GE  | `eth_clk`, 156.25 MHz | FIFO read (TX) / write (RX) side, `framer`, `deframer` |

The only crossings are the two FIFOs, plus the latency trigger, which arrives
on its own wire. Each FIFO is an asynchronous FIFO with width conversion. The
defaults are 4096 × 64 bit, which is 8192 × 32 bit:

* **Storage** is one array of `DEPTH64` 64-bit entries. It is written in one
  domain and read in the other, so a synthesiser maps it onto a true
  dual-clock block RAM.
* **Pointers** are `log2(DEPTH64)+1` bits wide. The extra bit tells full from
  empty. Each pointer is kept in binary and in Gray code. The Gray copy is
  registered in its own domain. It then passes through a two-flop
  synchroniser (`cdc_sync`) into the other domain, where it is converted back
  to binary. Only one bit of a Gray pointer changes per step. A pointer
  sampled during a change is therefore either the old value or the new one,
  never a mix.
* **Flags are conservative.** Each side sees the other side's pointer a few
  cycles late. The write side may think the FIFO is fuller than it is, and
  the read side may think it is emptier. Neither can overrun or underrun the
  memory.
* **Width conversion.**
  * `tx_fifo` holds the first 32-bit word of a pair in a register. It writes
    `{second, first}` as one entry. The first IQ word therefore lands in bits
    [31:0]. That is the first byte group the MAC sends, since the MAC's
    `tdata` is little-endian.
  * `rx_fifo` does the reverse: it delivers bits [31:0] of each entry first.
    A frame's payload therefore comes out in the order it went in.
* **First-word-fall-through read.** `dout` is valid whenever `empty` is low,
  and `rd_en` consumes it. The output register holds one entry itself, so a
  FIFO can hold `DEPTH64 + 1` entries. The read-side flags count that entry;
  the write side sees it as free room.
* **Programmable flags** are set at one Ethernet frame of payload, which is
  8 × 64 bit (`FRAME_WORDS64`):
  * `prog_empty` (read domain): fewer than 8 entries stored. The framer
    starts a frame only when this is low, so it never runs dry in the middle
    of a frame.
  * `prog_full` (write domain): fewer than 8 entries free. The deframer
    accepts a frame only when this is low.
  * `rx_fifo` also gives `rd_level`, the number of 32-bit words stored as the
    read side sees it. The Data Interface Controller uses it.
* **Reset.** Both sides have synchronous, active-high resets. Hold both
  together for a few cycles of the slower clock, so that both pointer copies
  and their synchronisers clear.

The original hardware used the vendor FIFO generator for these two FIFOs.
The Gray-code structure, the FWFT port and the exact flag thresholds are this
implementation's own. The 4096-entry depth matches the 8192 32-bit words
quoted for the original; the 64-bit depth was also once given as 4098, which
is not a power of two and does not match 8192/2.

## The Ethernet frame

Every frame is 80 bytes before the MAC adds preamble and FCS: 10 beats of
64 bits with `tkeep = 8'hFF` on every beat.

| beat | bits [63:48] | bits [47:32] | bits [31:16] | bits [15:0] |
|---|---|---|---|---|
| 0 | SA[15:0] | DA[47:32] | DA[31:16] | DA[15:0] |
| 1 | frame counter | Length/Type = `0x0040` | SA[47:32] | SA[31:16] |
| 2–9 | IQ words 2k+1 (bits 63:32), 2k (bits 31:0) | | | |

(`tlast` is on beat 9.)

* **Addresses.** DA and SA are parameters. The defaults are
  `48'hA1111111111B` and `48'hC2222222222D`. Both ends use the same pair, and
  the receiver checks the received frame against its own pair. Two identical
  endpoints therefore accept each other's frames.
* **Length/Type.** This field holds 64, the payload length in bytes.
* **Frame counter.** The two bytes left in beat 1 hold a 16-bit frame
  counter. It keeps the payload aligned to 64-bit beats, and it lets the
  receiver detect lost frames. It is 1 for the first frame after reset and
  wraps at 16 bits.
* **Payload.** It is 64 bytes: 16 IQ words, i.e. two basic frames. This size
  balances padding and header overhead against latency. A smaller payload
  would waste more bandwidth on headers; a larger one would add filling time.

### Framer (`framer`, 10GE domain)

The framer is a four-state machine: IDLE, HDR0, HDR1, PAY.

* In **IDLE** it waits for `prog_empty` to go low.
* **HDR0** presents beat 0 with `tvalid` high. Following the AXI4-Stream
  rule, it holds the beat until `tready`.
* **HDR1** presents beat 1. The first payload entry is already waiting at
  the FIFO's first-word-fall-through `dout`.
* **PAY** passes eight FIFO entries through. `fifo_rd_en` equals `tready`,
  so each entry is popped in the cycle the MAC takes it.

Back-pressure from `tready` can stall any beat. The framer then holds the beat
and the FIFO waits. After `tlast` the framer spends one cycle in IDLE, so a
frame takes at least 11 cycles. At 156.25 MHz that is 14.2 M frames/s. The
IQ stream of one 30.72 MHz antenna needs 1.92 M frames/s.

## Receiving: De-Framer and its error handling

The MAC's receive stream has no `tready`. The deframer must take every beat
and decide per frame what to keep. It has five states: SYNC, HDR0, HDR1, PAY
and SKIP.

* **SYNC.** After reset it ignores everything up to and including a beat
  with `tlast`. It therefore never takes the middle of a frame for a header.
  The next valid beat is treated as beat 0.
* **HDR0/HDR1** compare DA, SA and the Length/Type field with the expected
  values.
  * At HDR1 the deframer also samples the RX FIFO's `prog_full`. This is the
    only writer of that FIFO, so room seen here cannot shrink before the end
    of the frame.
  * It also checks the frame counter against the previous counter + 1.
* **PAY** writes the eight payload beats into the RX FIFO as they arrive.
  Gaps in `tvalid` are allowed.
* **SKIP** discards the rest of a rejected frame until `tlast`.

Each outcome is a one-cycle pulse in the 10GE domain:

| pulse | cause | what happens to the payload |
|---|---|---|
| `frame_ok` | good header, room, 10 beats, `tuser` high at `tlast` (the counter check is separate) | written |
| `fn_error` | counter ≠ previous + 1 (a frame was lost or reordered) | written, if the frame is otherwise good |
| `hdr_error` | wrong address/length field, `tlast` not on beat 9, or a partial last beat (`tkeep` ≠ `8'hFF`) | not written (or cut short); resynchronise on `tlast` |
| `crc_error` | MAC ended the frame with `tuser` low (bad FCS) | already written, **kept** |
| `drop_full` | RX FIFO had no room for a whole frame | not written |

The first frame after reset only loads the counter. After an error the
counter takes the received value, so a single lost frame gives a single
`fn_error`.

Keeping payload with a bad FCS is deliberate. The alternative is to buffer
every frame until its FCS is known, which adds a frame of latency. The IQ
stream is sample-timed, so one corrupted basic frame does less harm than a
missing one, which would shift every later sample. A dropped frame (for
`hdr_error` or `drop_full`) removes 16 words from the stream. The Data
Interface Controller does not fill the gap.

## Data Interface Controller: basic-frame timing

A CPRI basic frame carries 16 words of 16 bits. The EUTRA module has a
32-bit IQ bus, so here a basic frame is **8 words in 8 consecutive
`eutra_clk` cycles**. That is one basic frame every 260.4 ns, the CPRI rate
of 3.84 MHz. `data_if_ctrl` runs a free-running phase counter from 0 to 7 and
uses it for both directions.

```
phase                   7   0   1   2   3   4   5   6   7   0   1
iq_tx_enable           ‾‾‾|___________________________|‾‾‾|_______
iq_tx (from EUTRA)        | w0| w1| w2| w3| w4| w5| w6| w7| w0'
tx_wr_en                  |‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾|  (next frame if room)
rx_rd_en                  |‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾|
iq_rx (to EUTRA)              | r0| r1| r2| r3| r4| r5| r6| r7|
basic_frame_first_word    ____|‾‾‾|___________________________
```

**TX.** `iq_tx_enable` is high in phase 7. The EUTRA module answers with the
next basic frame on `iq_tx` during phases 0–7, and `tx_wr_en` writes those
eight words into the TX FIFO. The decision is made once, at `iq_tx_enable`,
from the TX FIFO's `prog_full`. If there is no room, the whole basic frame is
not written and `tx_drop` pulses. The FIFO therefore only ever holds whole
basic frames.

**RX.** The decision to deliver a basic frame is made at the same phase.
* **Start.** Streaming starts once the RX FIFO holds a whole Ethernet frame
  (`prog_empty` low, 16 words). This gives half a frame of slack against
  jitter in frame arrival.
* **Continue.** While streaming, each period needs at least 8 words
  (`rd_level ≥ 8`). Otherwise `rx_underflow` pulses, `rx_streaming` drops,
  and the controller waits for the start condition again.
* **Output.** During a delivered period (phases 0–7) `rx_rd_en` pops one word per
  cycle. `iq_rx` and `basic_frame_first_word` are registered, so they appear
  one cycle later, in phases 1–0. The flag is high in exactly the cycle that
  carries the first word of the basic frame.
  Outside delivered periods `iq_rx` is zero.

`enable` low stops both directions: there are no flags and no FIFO access.

These cycle relations are the ones the original EUTRA interface used. The
first TX word follows `iq_tx_enable` by one cycle, and
`basic_frame_first_word` comes with the first RX word. The start and continue
thresholds and the drop and underflow policies are this implementation's
choices. A different EUTRA module may expect another offset. Changing it is
one line: the phase compared in `data_if_ctrl`.

## Clocking and FIFO overflow

The link carries no clock. Each end writes its RX FIFO at the rate the far
end sends, and reads it at its own `eutra_clk`. If the two 30.72 MHz clocks
differ, one end's RX FIFO slowly fills and the other end's slowly empties.
The original system showed exactly this when each board derived its own
30.72 MHz: after a while `basic_frame_first_word` no longer matched the
received basic frames. The cure was one common 30.72 MHz clock distributed to
both ends. This design assumes the same: `eutra_clk` must be frequency-locked
between the two endpoints. The 156.25 MHz MAC clocks may differ, since the
Ethernet side runs much faster than the IQ stream.

If they are not locked, the design does not hide it:
* the fuller side drops whole Ethernet frames (`drop_full`);
* the starved side stops streaming (`rx_underflow`), and resumes on a
  basic-frame boundary once data is back.

The end-to-end test reproduces this with one EUTRA clock 20% slow. With a
realistic 50 ppm offset, the 8192-word FIFO would take about 5 s to fill.
No depth fixes a permanent rate difference.

## Link test mode

With `test_mode` high, the EUTRA path is replaced by a link test:
* `iq_counter_gen` writes an incrementing 32-bit counter into the TX FIFO
  whenever `prog_full` is low. The counter advances only on a write, so
  back-pressure loses no value.
* `iq_seq_checker` drains the RX FIFO. It checks that each word is the
  previous one plus 1.
* A mismatch lights `chk_err_led`, which stays lit until `chk_clear_btn` is
  pressed. The button passes a two-flop synchroniser and clears the LED
  while held.
* A mismatch also increments `chk_err_count`, which saturates at 65535.
  The checker then re-locks on the received value.
* `chk_active` is high in each cycle in which a received word is checked.
* `chk_err_btn` inserts an error on purpose, to prove the checker works.
  A press (synchronised, rising edge) makes the counter skip one value at
  its next write. The far-end checker then reports exactly one error, and
  `chk_err_inserted` pulses at the source.

The original design used this as a separate bring-up design before the
EUTRA module was connected. Here it is a mode of the same endpoint. Change
`test_mode` only while both resets are held, because the two sources feed the
same FIFOs.

## Latency measurement

The BBU has to know the fronthaul delay to align its TX and RX paths. An
endpoint measures it with two halves:

* **RRH side, `latency_injector`.**
  * Pressing `lat_btn` (synchronised, rising edge) arms the injector.
  * At the next `iq_tx_enable` it replaces the EUTRA data with one basic frame
    (8 words) of `0x55555555`.
  * It holds `lat_trigger_out` high for the same 8 cycles. That wire goes
    straight to the BBU, outside the fibre.
* **BBU side, `latency_meter`.**
  * `lat_trigger_in` passes through a 2-flop synchroniser.
  * On its rising edge the meter starts counting `eutra_clk` cycles, and it
    stops at the first `iq_rx == 0x55555555`.
  * The count starts at `SYNC_STAGES + 1`. `latency` is therefore the number
    of clock edges from the one that raised the trigger at the RRH to the one
    that put the first sequence word on `iq_rx`.
  * This assumes the two ends share `eutra_clk`, which is needed anyway (see
    above).
  * The counter is 16 bits and saturates.
  * `latency_valid` holds the result, and `latency_busy` shows a measurement
    in progress.

Every endpoint contains both halves. The BBU→RRH direction is measured the
same way with the roles swapped: the BBU's `lat_btn` and `lat_trigger_out`
drive the RRH's meter.

The original system counted the same interval with an on-chip logic analyser
and got 3032 cycles (RRH→BBU) and 3036 cycles (BBU→RRH) over 20 km of fibre,
about 100 µs each way. In simulation, with a 100 µs link model (3072 EUTRA
cycles), the meter reads **3097** cycles in each direction. The other 25 cycles are
spent in the two endpoints: the TX FIFO filling to a whole frame, the
synchronisers of both FIFOs, frame transmission and the words already
waiting in the RX FIFO. The model's delay is a round 100 µs. Neither the
exact fibre length nor the real MAC and PHY latency is modelled, so the
reading is not expected to match 3032.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `fronthaul_endpoint`, `framer`, `deframer` | `DEST_MAC`, `SRC_MAC` | `48'hA1111111111B`, `48'hC2222222222D` | addresses sent and expected |
| `fronthaul_endpoint` | `FIFO_DEPTH64` | 4096 | depth of both FIFOs in 64-bit entries (power of two) |
| `tx_fifo`, `rx_fifo` | `DEPTH64`, `FRAME_WORDS64` | 4096, 8 | depth; threshold of the programmable flags |
| `framer`, `deframer` | `NWORDS` | 8 | payload beats per frame |
| `data_if_ctrl` | `BF_WORDS` | 8 | words per basic frame |
| `latency_injector` | `NWORDS` | 8 | words of the known sequence |
| `latency_meter` | `CW`, `SYNC_STAGES` | 16, 2 | counter width, trigger synchroniser depth |

The payload size (`fh_pkg::PAYLOAD_WORDS`), the Length/Type value and the
known sequence are constants in `rtl/fh_pkg.sv`. The package also has the two
functions that build header beats 0 and 1. The framer and deframer share
them.

## How far it can be trusted, and where it departs from the original

* **Follows the original:**
  * the block structure (framer, deframer, two dual-clock width-converting
    FIFOs, Data Interface Controller);
  * the frame layout, with addresses, Length/Type 0x0040, a 16-bit frame
    counter in the two spare bytes and 64 bytes of payload;
  * the one-frame FIFO thresholds;
  * the tlast-based receive synchronisation and the tuser CRC flag;
  * the 8-word basic frame, and the two EUTRA flags;
  * the counter/checker link test with LED and clear button;
  * the 0x55 latency procedure.
* **This design's own choices:**
  * the FIFO internals (the original used vendor FIFOs);
  * the error and drop policies of the deframer and the controller;
  * the RX start threshold, and zero on `iq_rx` between basic frames;
  * the on-chip latency counter;
  * combining the link test and the latency logic into one endpoint;
  * synchronous active-high resets.
* **Not here:**
  * the 10G Ethernet MAC/PCS/PMA and transceivers;
  * the EUTRA module;
  * the host-side DMA and soft processor;
  * the control-and-management Ethernet link;
  * the clock generation (MMCMs, external jitter cleaners);
  * the RF front end.

  They connect through the ports described above.
* **Verification:** the testbenches listed below, in two-state simulation.
  The design has not been run on hardware with a real MAC.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself, with a watchdog in case it
hangs. With Verilator 5:

```sh
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal \
          -y rtl -y tb --top-module tb_fronthaul_endpoint \
          rtl/fh_pkg.sv tb/tb_fronthaul_endpoint.sv
./obj_dir/Vtb_fronthaul_endpoint
```

To run another test, substitute `tb_framer`, `tb_deframer`, `tb_tx_fifo`,
`tb_rx_fifo`, `tb_data_if_ctrl`, `tb_iq_counter_gen`, `tb_iq_seq_checker`,
`tb_latency_injector` or `tb_latency_meter`. `-y` lets Verilator find the
modules. The package must come first.

**`tb_fronthaul_endpoint`** is the end-to-end test. It runs two endpoints at
their default parameters, an RRH and a BBU, joined by two `fh_link_model`
instances. These are behavioural models of a MAC plus 100 µs of fibre. They
add random `tready` back-pressure. On request they drop a frame, send one
with a bad FCS or corrupt its DA. The test takes about 1 s of wall time and
goes through six phases:

1. test mode with a dropped frame, then an inserted error, each lighting
   the LED, followed by the clear;
2. the mode switch to EUTRA traffic, under back-pressure;
3. the latency measurement in both directions, each checked against the
   testbench's own cycle count;
4. CRC, header and lost-frame errors;
5. the MAC holding `tready` low (TX drop, RX underflow, recovery);
6. a 20% EUTRA clock mismatch (RX FIFO overflow).

It counts each mechanism and fails if one never happened.

Throughout, EUTRA models at both ends send tagged basic frames. The receiver
checks that each arrives whole and in order, with `basic_frame_first_word`
on its first word, except where a phase loses frames on purpose.

All testbenches, the unit tests included, run their blocks at the default
parameters, so the FIFO tests fill and empty the full 4096-entry depth.

## Files

| file | contents |
|---|---|
| `rtl/fh_pkg.sv` | shared constants and header-beat functions |
| `rtl/cdc_sync.sv` | multi-flop synchroniser |
| `rtl/tx_fifo.sv`, `rtl/rx_fifo.sv` | dual-clock width-converting FIFOs |
| `rtl/framer.sv`, `rtl/deframer.sv` | AXI4-Stream frame build / check |
| `rtl/data_if_ctrl.sv` | basic-frame timing and EUTRA flags |
| `rtl/iq_counter_gen.sv`, `rtl/iq_seq_checker.sv` | link test source and checker |
| `rtl/latency_injector.sv`, `rtl/latency_meter.sv` | latency measurement |
| `rtl/fronthaul_endpoint.sv` | top level: one endpoint |
| `tb/tb_*.sv` | testbenches; `tb/fh_link_model.sv` is the MAC + fibre model |
