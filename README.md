# Broadcast appliance controller over an OQPSK link

This design switches electrical appliances (lights, fans, air conditioners) on
the floors of an office building from one central point. A host computer
writes a 32-bit command word. A transmitter modem scrambles the word with a
pseudo-noise (PN) sequence and broadcasts it as an Offset-QPSK (OQPSK) carrier.
Each floor has a receiver station that demodulates and descrambles every word
it hears. The station acts only on words that carry its own floor ID; those set
the on/off state of its 16 appliances. The aim is to save power by switching
off equipment that people leave running.

The RTL has a transmitter, three floor stations and a top level that wires them
together on one clock and one reset. It is written in synthesizable
SystemVerilog (IEEE 1800-2017). It follows a published FPGA design of such a
system: that design fixes the block structure, the signal chain, the word
format, the floor IDs and the 64 × 6-bit carrier table. It does not give the
modulator and demodulator insides, the scrambler polynomial, the bit rate or
the synchronisation, so the choices made for those here are marked below.

```
            msgin[31:0]
                 |
        +--------v---------+   txout[5:0]   +-----------------+
        |  modem_tx        |---------+----->| floor_receiver  |--> floor1[15:0], msout1[31:0]
        |  P2S -> PN xor   |         |      | ID 16'h1111     |
        |  -> OQPSK mod    |         +----->| floor_receiver  |--> floor2[15:0], msout2[31:0]
        +------------------+         |      | ID 16'h2222     |
                                     +----->| floor_receiver  |--> floor3[15:0], msout3[31:0]
                                            | ID 16'h3333     |
                                            +-----------------+
   clk and rst (synchronous, active high) go to every block
```

## The command word

| bits    | meaning                                                          |
|---------|------------------------------------------------------------------|
| [31:16] | floor ID: `16'h1111`, `16'h2222` or `16'h3333` for floors 1 to 3 |
| [15:0]  | appliance states for that floor, bit *n* drives appliance *n*, 1 = on |

The word goes out MSB first, so the ID is sent before the appliance bits. A
word whose ID belongs to no floor is received by every station and ignored by
all of them. A floor keeps its appliance outputs until a word for that floor
arrives. Reset turns every appliance off.

## Transmitter (`modem_tx`)

The transmitter sends frames back to back for as long as it runs. A frame is 32
bit periods, and one bit period is `SPB` clock cycles (64 by default). At the
start of each frame the transmitter loads `msgin` into the parallel-to-serial
register `p2s`, so `msgin` needs to be stable only around frame boundaries.
Each serial bit `msgout` is xored with one chip `pnout` of the PN generator
`pn_lfsr` to give the scrambled bit `scr`. The PN generator is a 7-bit LFSR,
x^7 + x^6 + 1, seeded with all ones (period 127). It runs on from frame to
frame and is not restarted.

The modulator `oqpsk_mod` puts even-numbered bits on the I rail and
odd-numbered bits on the Q rail. Each rail holds its bit for two bit periods.
The two rails therefore change half a symbol apart, which is what makes the
modulation *offset* QPSK: the carrier never jumps by 180°. The line sample is

    txout = 32 + 31 * (I*cos(wt) + Q*sin(wt)) / sqrt(2),     bit 1 -> +1, bit 0 -> -1

This takes no multiplier. I·cos + Q·sin is a cosine shifted by ±45° or ±135°,
so the sample is a single read of the 64-entry cosine table `sine_rom` at the
address *carrier phase + offset*:

| I Q | phase shift | table offset (of 64) |
|-----|-------------|----------------------|
| 1 0 | +45°        | 8                    |
| 0 0 | +135°       | 24                   |
| 0 1 | −135°       | 40                   |
| 1 1 | −45°        | 56                   |

The carrier phase advances by one table step per clock, so one carrier period
is 64 clocks. With `SPB = 64`, each bit lasts exactly one carrier period.
`txout` is unsigned 6-bit (offset binary) with zero level 32. The table holds
`32 + round(31*cos(2*pi*k/64))`, so samples lie between 1 and 63. Before the
first bit the line idles at 32.

## Receiver stations (`floor_receiver` = `modem_rx` + `rcu`)

### How the receiver stays in step

The receivers do not recover the carrier, the bit clock or the PN phase from
the signal. Every block runs from the same clock and is reset by the same
`rst`. Each receiver therefore runs its own copy of the transmitter's bit
timer (`bit_timer`), started a fixed `LINK_LATENCY` cycles later, and its own
copy of the PN generator, reset together with the transmitter's. With the
default latency of 1 (the receiver input is wired straight to the
transmitter's output register), the receiver's local carrier phase, rail
select and bit boundaries match the incoming samples exactly.

This is the design's strongest assumption and its most important limit. It
works for the on-chip connection modelled here, but a real radio link would
need carrier and timing recovery plus a frame marker, and this design has none
of them (see *Departures and limits*). If you add delay between transmitter and
receivers, set `LINK_LATENCY` to match it.

### Demodulator (`oqpsk_demod`)

Each sample, taken relative to 32, is multiplied by the local cosine (I
reference) and the local sine (Q reference). The two references come from two
more copies of the cosine table, the sine being read at address + 48, a −90°
shift. One accumulator per rail sums the products. Each rail's bit lasts two
bit periods, and the two rails' windows are staggered by one period. So at
every bit boundary, one rail's window has just closed. That rail's accumulator
is sliced by its sign (≥ 0 gives 1) and restarted with the current product,
while the other accumulator keeps summing. Every window spans whole carrier
periods, so the other rail's half-way change cancels out of the sum. The
decided bit `dmodout` comes out with a one-cycle strobe. No bit comes out for
the first two boundaries after reset, because no full window has closed yet.

The accumulators are wide enough for 2·`SPB` products of ±31 × ±31. The
testbench shows that decisions stay correct with ±6 LSB of added noise.

### Descrambler, word assembly, floor-ID check

Each decided bit is xored with the receiver's PN chip to give `mout`. The PN
generator steps once per decided bit. `s2p` shifts in 32 bits, MSB first, and
presents the word on `rxout` (`msout1..3` at the top) with a one-cycle
`rx_valid` strobe. The frame count starts at reset, so word *k* on the line is
word *k* at the receiver.

The remote control unit `rcu` copies each word into `reg1`. In the next cycle
it compares `reg1[31:16]` with its `FLOOR_ID`. On a match it loads
`reg1[15:0]` into the `floor` outputs and pulses `id_match`. On a mismatch it
leaves `floor` unchanged.

## Timing

The table counts cycles from the first rising edge after `rst` is released,
for the default `SPB = 64`:

| event                                                   | cycle              |
|---------------------------------------------------------|--------------------|
| `msgin` sampled for frame *k*                           | 2048·k             |
| bit *j* of frame *k* starts (`tick`, `scr` valid)       | 1 + 2048·k + 64·j  |
| first sample of that bit on `txout`                     | 2 + 2048·k + 64·j  |
| that bit decided (`dmodout` strobe)                     | 131 + 2048·k + 64·j |
| word *k* on `msout1..3`, `rx_valid`                     | 2116 + 2048·k      |
| `floor1..3` updated, `id_match`                         | 2118 + 2048·k      |

A frame takes 32·SPB = 2048 cycles. At the 148.5 MHz clock reported for the
published implementation, that is 2.32 Mbit/s on the line and about 72,500 commands per
second. The end-to-end latency is 2118 cycles, about 14.3 µs.

## Parameters

| name                     | default                        | where                                  | origin |
|--------------------------|--------------------------------|----------------------------------------|--------|
| `MSG_W`, `ID_W`, `APPL_W`| 32, 16, 16                     | `iesda_pkg`                            | published design |
| `N_FLOORS`, `FLOOR_IDS`  | 3; 1111, 2222, 3333 (hex)      | `iesda_pkg`                            | published design |
| `SAMPLE_W`, `PHASE_W`    | 6, 6 (64 × 6-bit table)        | `iesda_pkg`                            | published design |
| `LFSR_W`, `LFSR_SEED`    | 7, all ones; taps 7 and 6      | `iesda_pkg`, `pn_lfsr`                 | this design |
| `SPB`                    | 64 cycles per bit (multiple of 64) | `iesda_top`, `modem_tx`, `modem_rx`, ... | this design |
| `LINK_LATENCY`           | 1                              | `floor_receiver`, `modem_rx`           | this design |

## Departures and limits

- **Synchronisation**: this is the main limit. Carrier phase, bit timing,
  frame alignment and PN phase all come from the shared reset, as described
  above. The receivers cannot join a transmission that is already running,
  and they cannot tolerate an unknown delay or a frequency offset.
- **No radio**: the published system places its modems on different floors
  and calls them Zigbee modems. The IEEE 802.15.4 physical layer (chip
  spreading, half-sine pulse shaping, preamble and frame format) and the RF
  front end are not part of this RTL. Like the published RTL-level design, it
  connects `txout` to the receivers directly.
- **Modulation details** are this design's own: one carrier period per bit,
  rectangular (not half-sine) rail shaping, and the phase mapping above.
  Sample values shown for the published implementation are not reproduced.
- **Size**: each demodulator uses two extra copies of the 64 × 6 table and two
  small multipliers, so the design has more memory and flip-flops than the
  single table and roughly 300 flip-flops reported for the published
  implementation.
- **No handshake with the host**: `msgin` is sampled at every frame start, and
  the same word is resent until it changes. Resending a word is harmless,
  because applying it again sets the same appliance states.

## Files

RTL (`rtl/`), bottom-up:

- `iesda_pkg.sv`: widths, floor IDs, PN seed, `iq_t` and the I/Q-to-phase mapping
- `sine_rom.sv`: 64 × 6 cosine table
- `pn_lfsr.sv`: PN generator
- `p2s.sv`, `s2p.sv`: serialiser and deserialiser
- `bit_timer.sv`: per-bit cycle counter with I/Q rail select
- `oqpsk_mod.sv`, `oqpsk_demod.sv`: modulator and correlator demodulator
- `modem_tx.sv`, `modem_rx.sv`: transmitter and receiver modems
- `rcu.sv`: floor-ID check and appliance register
- `floor_receiver.sv`: one floor station
- `iesda_top.sv`: top level

Testbenches (`tb/`): there is one `tb_<module>.sv` per module, except
`bit_timer` (which the modem testbenches cover). `tb_model_pkg.sv` is a
floating-point reference model of the line signal, used by the modem
testbenches. `tb_iesda_top` runs the whole system at its default parameters.
It sends the three floor commands `32'h11113245`, `32'h22224534` and
`32'h3333026F`, then an unknown ID, then random words. It checks every
received word, its arrival cycle and all appliance outputs. It also confirms
that every mechanism occurs at least once: a match on each floor, a word
ignored by a floor, a word ignored by all floors, each of the four I/Q
phases, and a PN chip that inverts a bit. `tb_floor_commands` runs each
floor command on its own, starting from reset, and checks that only the
addressed floor switches. `tb_modem_rx` also runs a second receiver with
`LINK_LATENCY = 4` on a line delayed by three cycles. Each testbench prints
`TB_RESULT checks=N failures=M`.

## Simulating

Any testbench builds with plain Verilator 5. For example, the full system:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/iesda_pkg.sv tb/tb_model_pkg.sv tb/tb_iesda_top.sv \
    --top-module tb_iesda_top -Mdir obj_top
./obj_top/Vtb_iesda_top
```

Pass the package files first and let `-Irtl -Itb` find the remaining modules.
The full-system run takes well under a second.

## Changing it

- **More floors**: raise `N_FLOORS` and extend `FLOOR_IDS` in `iesda_pkg`,
  then add the matching output ports in `iesda_top`.
- **Slower bit rate**: set `SPB` to a larger multiple of 64. The accumulator
  width follows automatically.
- **Another PN polynomial**: change the `TAP_A`/`TAP_B` values passed in
  `modem_tx` and `modem_rx` (keep them equal), and the model in
  `tb_model_pkg`.
