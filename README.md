# S_eRT: a secure, private 125 kHz passive RFID tag core

A battery-less low-frequency RFID tag can prove who it is without telling an
eavesdropper anything. This RTL is the digital core of such a tag. The tag
holds a secret 128-bit key and never sends a fixed identifier.

For each challenge it proceeds as follows:

1. The reader sends a 64-bit random number Nr.
2. The tag draws its own fresh 64-bit random number Nt from an on-chip true
   random generator.
3. The tag computes `X = AES-128(key, Nr || Nt)`.
4. The tag answers with `Nt` and the first 64 bits of `X`, which serve as the
   message authentication code (MAC).

The reader tries every key in its database until one reproduces the MAC. It
then repeats the exchange with a second Nr. Two MAC matches rule out a chance
64-bit collision ("double challenge-response"). Every bit on the air looks
random to anyone without the key, so tags cannot be tracked. The tag never
writes to its NVRAM during authentication. That matters because EEPROM writes
are slow and power hungry, and it allows one-time-programmable tags.

The hard constraints are the power budget (a few µW from the field) and the
clock. The only clock is the 125 kHz field sinusoid, taken from a weak supply.
Most of the design follows from these two constraints.

## Block map

```
 FIELD_CLOCK ─┬─► clock_clean ──► clk (every flip-flop of the core)
 DELAYED_CLK ─┘        │
                       └─► rng ◄── ring_osc ×2 (gated ~2 GHz oscillators)
                            │
 GAP_DETECT ──► rx_decoder ─┴─► protocol_ctrl ──► aes8 (byte-serial AES-128)
                                   │    │
 MEM_CLK / MEM_DATA ◄─► nvram_if ◄─┘    └──► tx_manchester ──► MODULATION
 SECURITY_OVERRIDE ───────────────────────┘
```

| File | Role |
|---|---|
| `rtl/rfid_pkg.sv` | Shared opcodes, the configuration-word struct, air-interface timing constants, and GF(2^8) / S-box / MixColumns functions |
| `rtl/clock_clean.sv` | Turns the ragged field clock into a clean core clock |
| `rtl/ring_osc.sv` | Behavioural model of one gated fast ring oscillator (simulation only) |
| `rtl/rng.sv` | True random bit generator: oscillator-jitter sampling plus an LFSR corrector |
| `rtl/rx_decoder.sv` | Reader-to-tag demodulator (on-off keying, pulse-interval coded) |
| `rtl/tx_manchester.sv` | 128-bit reply register and Manchester encoder with sync token and anti-collision silences |
| `rtl/aes8.sv` | AES-128 encryption, 8-bit datapath, one S-box shared by data and key schedule |
| `rtl/nvram_if.sv` | 8-bit RAM-style port onto the two-wire serial NVRAM |
| `rtl/protocol_ctrl.sv` | Global controller: boot, nonce collection, command decoding, write protection, timeouts |
| `rtl/sert_top.sv` | Top level with pad-level ports |

Outside the core are:

- the analogue front end, which provides rectifier, field clock, gap detector
  and load modulator;
- the NVRAM itself;
- the regulator;
- the RC delay that produces `DELAYED_CLK`.

The top's ports go to these parts.

## Clock cleaning

As the field sinusoid rises slowly through the logic threshold, the core's own
current draw moves the supply. The clock input can then cross the threshold
several times, and each extra crossing would clock the whole core.

`clock_clean` is a single flip-flop. Its D input is tied to 1 and it is clocked
by the raw field clock, so the first crossing sets it and later crossings
change nothing. It is cleared asynchronously only:

- in the short window after a falling edge, while `FIELD_CLOCK` is already low
  but the RC-delayed copy `DELAYED_CLK` is still high; or
- during reset.

The result is one rising edge per field cycle. The same two signals also define
the oscillator windows of the random generator.

## Random number generator

A tag needs a fresh Nt after every power-up. It must arrive within tens of
milliseconds and cost almost no power, and no state may be kept in NVRAM.

The design works as follows:

- **Fast oscillators.** Two fast (~2 GHz) ring oscillators run only in short
  windows around the clock edges. One runs after the rising edge
  (`FIELD_CLOCK` high, `DELAYED_CLK` low) and the other after the falling edge.
  The two windows can never overlap, so the oscillators never run at the same
  time and cannot lock to each other.
- **Jitter bits.** Each oscillator clocks a toggle flip-flop. The flip-flop
  ends each window holding the parity of the oscillator cycles counted, and
  that parity is set by jitter.
- **LFSR corrector.** Once per core clock both parities are XORed into the
  feedback of an 8-bit LFSR with taps `0xB8` (x^8+x^6+x^5+x^4+1).
- **Restart counter.** If the LFSR ever reaches the all-zero state, it is
  reloaded from a free-running counter that cycles 1..255.

The controller takes one Nt bit every 64 clocks, so 64 bits take 4096 clocks
(about 33 ms).

The generator is enabled in three cases:

- while Nt is gathered;
- optionally during encryption, when configuration bit `rng_noise` is set,
  to mask the AES power signature;
- in anti-collision mode, during each reply's sync token, to draw the next
  silence length.

`ring_osc.sv` is a behavioural model. It toggles every `HALF_PERIOD_PS`
picoseconds plus a random 0..`JITTER_PS` picoseconds. It exists so that the
generator and the top can be simulated. On silicon it is a hand-placed ring,
and a synthesis run reports its gated feedback as a latch.

## Air interface

**Reader to tag** (`rx_decoder`). The reader briefly switches its field off,
and the front end reports each gap on `GAP_DETECT`. A bit is carried in the
time between the starts of successive gaps:

| Interval | Meaning |
|---|---|
| 21 clocks | `0` |
| 33 clocks | `1` |
| threshold | 27 clocks |
| no gap for 48 clocks | end of frame |

The first gap of a frame only marks its start. The gap input passes a two-flop
synchroniser, so decoded bits appear 3 clocks after the gap.

These numbers give the required average of RF/27. They also reproduce the
11.1 / 14.3 / 17.4 ms (minimum / typical / maximum) reception time of a 66-bit
IV command.

**Commands.** A frame is a 2-bit opcode followed by its argument, sent first
bit first.

| Opcode | Command | Argument | Effect |
|---|---|---|---|
| `00` | CFG(m) | 8 bits | Write configuration word to NVRAM and register (needs write-enable or override) |
| `01` | KEY(k) | 128 bits | Write new key to NVRAM (needs write-enable or override); used after the next reset |
| `10` | IV(Nr) | 64 bits | Challenge: encrypt and start replying |
| `11` | SILENCE | 2 bits (ignored) | Stop replying; the tag restarts and draws a new Nt |

The configuration word (`cfg_t`) has three defined bits:

- bit 0: `write_en`;
- bit 1: `anticoll`;
- bit 2: `rng_noise`.

**Tag to reader** (`tx_manchester`). Data is Manchester coded with 16 clocks
per half bit, which is a data rate of RF/32. A `1` is sent high then low, and a
`0` low then high.

Each message is:

- a sync token of 4 bit times: 2 bit times high, then 2 bit times low. Manchester
  data never holds a level that long;
- 128 data bits: Nt (64 bits), then the MAC (64 bits).

A message lasts 4224 clocks, about 33.8 ms. It is repeated until SILENCE
arrives. In anti-collision mode each message is followed by 1 to 16 silent
message periods. The count comes from the random generator, so tags that
collide once drift apart.

## AES engine

`aes8` holds two 16-byte memories, state and key. It has one S-box, computed as
the GF(2^8) inverse (a^254) followed by the affine map, with no ROM table. The
S-box is shared between SubBytes and the key schedule. The round key is
expanded in place, so the key memory must be reloaded before every encryption.
The controller does this from NVRAM at every reset.

Per round, the schedule is:

| Clocks | Work |
|---|---|
| 4 | S-box of the four key bytes for RotWord/SubWord, plus Rcon |
| 16 | SubBytes, one state byte per clock; the matching round-key byte is updated in the same clock |
| 1 | ShiftRows, done as a permutation of the whole memory |
| 4 | MixColumns + AddRoundKey, one column per clock (merged into ShiftRows in round 10) |

An encryption takes 1 + 9×25 + 21 = **247 clocks** from `start` to `done`.
Moving data through the byte ports adds 16 clocks each to load the key, load
the block, and read the result.

## NVRAM interface

`nvram_if` converts single-byte read and write requests into a serial frame on
`MEM_CLK` and one bidirectional data line, 17 bits in all:

- start bit `1`;
- R/W (`1` = write);
- 7-bit address;
- 8 data bits.

All fields are sent MSB first. Each bit takes two core clocks, `MEM_CLK` low
then high, so one transfer is 34 clocks. On a read the interface releases the
line after the address and samples each data bit at the end of its bit time.

Memory map:

| Address | Contents |
|---|---|
| 0 | configuration word |
| 1..16 | key, byte 0 first |

## Controller sequence

After reset (`nreset` low), `protocol_ctrl` goes through these steps:

1. Read the configuration word: 34 clocks.
2. Read the 16 key bytes straight into the AES key memory: 16 × 34 clocks.
3. Gather Nt: 4096 clocks, built up through an 8-bit shift register into bytes
   0..7 of the reply register.
4. Wait for commands.

On a complete IV:

1. Nr goes to AES state bytes 0..7, and Nt is copied into bytes 8..15.
2. The engine runs.
3. X bytes 0..7 are copied into reply bytes 8..15.
4. The transmitter starts.

A typical challenge-response cycle takes about 590 + 4096 + 1780 + 290 + 4224
clocks, plus the SILENCE frame.

Bad frames are dropped in two cases:

- the receiver reports the end of a frame before its argument is complete;
- no bit arrives for 2047 clocks.

Write protection works as follows:

- CFG and KEY are ignored unless `write_en` is set or the `SECURITY_OVERRIDE`
  pin is high.
- Writing a configuration word with `write_en` clear locks the tag.

## Departures and design choices

Where the design departs from the prototype it was modelled on, or where the
prototype's details are not known, the choices are these:

- **AES cycle count.** The prototype's engine takes 356 clocks including key
  and data I/O. This engine takes 247 clocks plus 48 for I/O, with a schedule
  of its own.
- **Key load time.** Reading the key here takes 16 × 34 clocks (~4.4 ms). The
  prototype read its key in about 2.8 ms. The serial NVRAM frame format is
  this design's own, since the real part's protocol is not reproduced.
- **Encodings chosen here:**
  - opcode values;
  - configuration-bit positions;
  - the NVRAM map;
  - the 21/33-clock receive coding;
  - Manchester polarity and the sync-token shape;
  - which half of X is sent (the first);
  - the frame timeout;
  - the LFSR polynomial.
- **Security override.** `SECURITY_OVERRIDE` bypasses write protection. The
  pin exists on the prototype, but its exact function is this design's
  reading.
- **One IV per reset.** Only one IV is answered per reset, because the
  in-place key expansion consumes the key. The protocol already resets after
  SILENCE, so a reader sees no difference.
- **Restart after SILENCE.** The controller restarts internally: it jumps back
  to its boot sequence. The prototype's reset pin is bidirectional and carries
  an internal `force_reset` signal. Here `nreset` is an input only, and no
  core block drives a reset out.
- **Not built:**
  - Overlapping Nt generation with IV reception, a speed-up the prototype only
    suggests.
  - An AES whitening pass over the raw random bits, which was tried as a
    statistical refinement.
- **Analogue parts.** The fast oscillators are behavioural models. The
  analogue front end, NVRAM, regulator and RC delay are not part of the RTL.

## Simulation

Every testbench is self-checking. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog. All run on plain
Verilator 5 with `--timing`. The models assume a two-state simulator with
random initial values. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/rfid_pkg.sv tb/aes_ref_pkg.sv rtl/*.sv tb/nvram_model.sv tb/tb_sert_top.sv \
  --top-module tb_sert_top -Mdir obj_top
obj_top/Vtb_sert_top +verilator+rand+reset+2
```

| Testbench | What it checks |
|---|---|
| `tb_aes8` | FIPS-197 vector, random keys and blocks against an independent reference (`tb/aes_ref_pkg.sv`), 247-clock latency |
| `tb_rx_decoder` | Random frames of 0/1 intervals with ±2-clock jitter, all-zero and all-one IV-length frames against the 11.1 and 17.4 ms bounds, early frame end, output timing |
| `tb_tx_manchester` | Waveform against an expected Manchester/token stream, repetition, anti-collision silence lengths |
| `tb_clock_clean` | Multiple threshold crossings filtered, one clean edge per cycle, reset |
| `tb_ring_osc` | Runs only while enabled, frequency, jitter |
| `tb_rng` | Windows never overlap, LFSR stepping against a model, entropy injected by the oscillators, restart from all-zero, gated off while disabled |
| `tb_nvram_if` | Frame format and 34-clock transfers against a serial NVRAM model (`tb/nvram_model.sv`) |
| `tb_protocol_ctrl` | Boot reads, Nt collection, CFG/KEY/IV/SILENCE handling, write protection, MAC against the reference AES |
| `tb_sert_top` | End to end at default parameters (see below) |

`tb_sert_top` runs the whole top at its default parameters, with real clock
cleaning and behavioural oscillators. The field clock bounces on every edge.
A reader model runs the double challenge-response against a 4-key database and
identifies the tag. The bench also exercises:

- CFG under security override;
- anti-collision silences;
- a truncated frame;
- a refused KEY write;
- the noise mode of the generator.

It counts each mechanism and fails if one never occurs. It takes about one
minute of simulation time.
