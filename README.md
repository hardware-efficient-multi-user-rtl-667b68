# 802.11ax MU-OFDMA transmitter with one virtualised BCIM

An 802.11ax MU-OFDMA transmitter builds one bit-coding-interleaving-modulation
(BCIM) chain per user. Up to nine users share a 20 MHz channel, so a
straightforward design needs nine chains. This design builds **one** chain
and time-shares it between all users. It saves and restores each user's chain
state in a small context memory between time slices. This is hardware
virtualisation: the one physical chain behaves as N logical chains.

The chain runs at 100 MHz. One slice serves one user for one OFDM symbol and
codes N_CBPS(u) bits, one per clock. The slices of all users add up to less
than one 802.11ax symbol time, so the whole packet streams at the air rate.

Everything is SystemVerilog (IEEE 1800-2017). There is one module or package
per file in `rtl/` and one self-checking testbench per module in `tb/`.

## Data path

```
host ──► data_bram_bank ──► he_preamble_fsm ─┐
           (1024x64 per user)                │ tone writes
                    └──────► bcim_hv ────────┴─► fd_mux ─► ifft ─► td_mux ─► async_fifo ─► duc ─► I/Q
                     (shared chain, cs_fsm + cs_bram)   (64/256)        (L-STF/L-LTF, GI)   (100→40 MHz)
```

| module | role |
|---|---|
| `mu_ofdma_tx` | top; host write port, `tx_start`, `irq`, I/Q output, event outputs |
| `data_bram_bank` | one 1024 x 64-bit BRAM per user: 3 configuration words, then the PSDU |
| `he_preamble_fsm` | sequences L-SIG, RL-SIG, HE-SIG-A, HE-STF and HE-LTF, then hands over to the BCIM |
| `bcim_hv` | the shared chain: `he_data_fsm` → `scrambler` → `bcc_encoder` → `interleaver_buffer` → `pilot_mod_fsm` (+`qam_mapper`), driven by `cs_fsm` and `cs_bram` |
| `fd_mux` | two frequency-domain symbol buffers; tones nobody writes read as zero |
| `ifft` | 64- or 256-point radix-2 IFFT, one butterfly per clock |
| `td_mux` | plays L-STF/L-LTF from tables, adds the cyclic prefix, streams samples |
| `async_fifo` | Gray-pointer FIFO from the 100 MHz to the 40 MHz domain |
| `duc` | reads at 20 MS/s, outputs 40 MS/s by 2x interpolation |

`tx_pkg` holds the shared types: the 802.11ax 20 MHz tone plan, MCS 0–6 and
the configuration-word layouts.

## Context switching and the sub-tick pipeline

This is the core of the design. The logic is in `cs_fsm`, `cs_bram` and
`bcim_hv`.

### What a context is

Every stateful part of the chain can export its whole state as one 64-bit
word (`ctx_o`) and load it back (`load`, `ctx_i`):

| slot | sub-module | state kept |
|---|---|---|
| 0 | `he_data_fsm` | bit position in SERVICE + PSDU + tail + padding |
| 1 | `scrambler` | 7-bit LFSR |
| 2 | `bcc_encoder` | 6-bit shift register, puncturing phase, one pending coded bit |
| 3 | `pilot_mod_fsm` | the user's symbol count, pilot-polarity LFSR |

The interleaver holds no state across symbols, because it writes straight
into the ping-pong buffer. The mapper holds none at all.

`cs_bram` holds 4 words per user (36 for nine users), one write port and one
registered read port. Bit 63 of a word marks a saved context. A word with
bit 63 clear means "start fresh": the scrambler then takes the user's seed
from the configuration word, and every other part starts at zero.

### The four states of `cs_fsm`

- **Flushing**: writes zero to every CS-BRAM word, one per clock
  (N_USERS x 4 clocks). The previous packet can then leave no state behind.
  `bcim_hv` forces the write data to zero while `flushing` is high.
- **Idle**: waits for `tx_start`.
- **ContextRestoring**: reads the 4 words of the next slice, one per clock.
  One clock later it raises `ld`/`ld_slot` as each word arrives. It then
  starts both stages and waits for both to drop `busy`.
- **ContextSaving**: writes the 4 words back. It then pulses `cs_finish` and
  returns to restoring. After the last job it pulses `tx_finish` and returns
  to flushing.

### Two stages, two users

The chain has two halves joined by the ping-pong buffer in
`interleaver_buffer`:

- **Pre-modulation** (`he_data_fsm`, `scrambler`, `bcc_encoder`, interleaver
  write). It needs N_CBPS(u) clocks for user u, one coded bit per clock. Each
  bit is written straight to its interleaved position, which the 802.11ax
  formula gives per RU size. This fuses the interleaver into the buffer
  write address.
- **Modulation** (`pilot_mod_fsm`). It walks the user's RU one tone per
  clock. It reads data tones from the buffer through `qam_mapper`, inserts
  pilots, and writes (tone, value) pairs to `fd_mux`. This takes the RU width
  in clocks (26/52/106/242, plus the DC gap).

Jobs are (symbol, user) pairs numbered t = s·N + u. In slice t the
pre-modulation stage runs job t and the modulation stage runs job t−1, so
both halves work at once on **different users**. The buffer half is chosen by
the symbol number's LSB. User u's bits for symbol s are therefore written into
one half, while the other half (symbol s−1) is still being read. A user's data
tones sit at buffer slots starting at the sum of N_SD of the users before it.

Because two users are active in one slice, the context is split:

- slots 0–2 are restored and saved for the **pre-modulation** user;
- slot 3 is restored and saved for the **modulation** user.

Each switch still costs 4 reads and 4 writes.

### Timing of one slice

```
restore: 4 reads + 1 read latency + 1 start      =  6..7 clocks
run:     max(N_CBPS(job t), RU walk(job t-1) + 1)
save:    4 writes + 1 advance                    =  5 clocks
```

`tb_bcim_hv` measures the slice length as max(N_CBPS, walk + 1) + 12
clocks. The design's own overhead is 12 clocks, against 8 for 4 reads plus
4 writes alone (see *Departures* below). One packet of S symbols and N users
takes N·S + 1 slices; the extra slice drains the pipeline.

A slice that begins modulation of user 0 of a new symbol first checks
`out_ready`, which means `fd_mux` has a free buffer. If there is none, the
FSM holds (`stall`) before starting. This is the only back-pressure point,
and it keeps whole symbols consistent in the FD buffer.

### Budget

At 100 MHz, one 802.11ax data symbol is 1360 / 1440 / 1600 clocks for
GI 0.8 / 1.6 / 3.2 µs.

| case | clocks per symbol |
|---|---|
| 242-tone RU, MCS 6 | 1404 + 12 = 1416 |
| 9 x 26-tone RU, MCS 6 | 9 x (144 + 12) = 1404 |
| 4 x 52-tone RU, MCS 6 | 4 x (312 + 12) = 1296 |

The two heavy cases keep up with GI 1.6 and 3.2 µs. With GI 0.8 µs they fall
slightly behind. The 1024-sample output FIFO absorbs that deficit for short
packets (a 24-symbol, nine-user packet at GI 0.8 µs runs without underflow
in `tb_mu_ofdma_tx`), but not for long ones.

## Preamble

`he_preamble_fsm` reads configuration word 1 (PPDU type, GI, symbol count,
number of HE-LTFs, L-SIG LENGTH) and word 2 (the 52 HE-SIG-A bits) of user 0.
From these it forms:

- **L-SIG and RL-SIG**: rate 6 Mb/s, LENGTH, parity and tail; BCC rate 1/2;
  16 x 3 interleaver; BPSK on the 48 legacy data tones; 4 pilots; the
  802.11ax extra tones ±27/±28.
- **HE-SIG-A**: 52 bits coded as one block, 13 x 4 interleaver, two BPSK
  symbols of 52 data tones.
- **HE-STF**: the 802.11ax M sequence on every 16th tone, scaled by (1+j)/√2.
- **HE-LTF**: ±1 on all 242 tones, from an LFSR.

The legacy fields are 64-point symbols and the HE fields are 256-point
symbols; the flag travels with each symbol. `td_mux` adds L-STF and L-LTF
(160 samples each) from tables built at elaboration.

## Configuration words

| word | owner | content |
|---|---|---|
| 0 | every user | RU size and index, MCS, valid, scrambler seed, PSDU length in bytes |
| 1 | user 0 | PPDU type, GI, number of data symbols, number of HE-LTFs, L-SIG LENGTH |
| 2 | user 0 | HE-SIG-A1 and HE-SIG-A2, 26 bits each |
| 3… | every user | PSDU, LSB first |

The host chooses the symbol count. `he_data_fsm` pads every user with zero
bits, after SERVICE + PSDU + 6 tail bits, up to that count. All users
therefore end on the same symbol.

## Clocks and output

Everything up to `td_mux` runs on `clk` (100 MHz). `td_mux` produces a
sample every second clock while it has symbols, and `async_fifo` (1024
deep) crosses to `clk_dac` (40 MHz). `duc` pops one sample every second
40 MHz clock, so it reads 20 MS/s. It outputs 40 MS/s by linear
interpolation: each output pair is the previous sample and the mean of the
previous and current samples. `ev_underflow` reports a FIFO that ran dry
in mid-packet.

## Departures from the source design

- **Context-switch overhead is 12 clocks, not 8.** The extra clocks are the
  CS-BRAM read latency, the start pulse and the end-of-slice handshake.
- **SIG fields are coded inside the preamble FSM** by a small helper encoder
  and interleaver, not by the first user's BCIM. This keeps the shared chain
  and its contexts untouched by the preamble.
- **HE-STF and HE-LTF are computed** (M sequence, LFSR), not taken from
  stored tables. The HE-LTF values are a placeholder sequence, not the
  802.11ax HE-LTF.
- **HE-STF and HE-LTF are full 256-point symbols** with the data GI. This
  design does not use the 4 µs HE-STF or the compressed 2x/4x HE-LTF of
  802.11ax.
- **HE-SIG-B is not generated**, so an MU PPDU carries no per-user signalling.
- **Pilot values are simplified**: the RU's pilot sign pattern rotated by the
  symbol number and multiplied by the 802.11 polarity sequence. This is not
  the exact 802.11ax per-RU pilot table.
- **The DUC uses linear interpolation**, with no filter and no frequency
  shift.
- Only BCC coding and MCS 0–6 are built; LDPC is not.
- Only the transmit path is built, for MU-OFDMA. There is no receive path, and the MU-MIMO variant of the same sharing scheme is not built.
- The RF front end and the driver/low MAC are outside the design. The host
  side is a plain BRAM write port plus `tx_start` and `irq`.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and then finishes. Run
any one of them with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/tx_pkg.sv tb/tb_bcim_hv.sv --top-module tb_bcim_hv -Mdir obj_tb
./obj_tb/Vtb_bcim_hv
```

Replace `tb_bcim_hv` with any of the testbenches:

| testbench | what it checks |
|---|---|
| `tb_scrambler` | scrambler |
| `tb_bcc_encoder` | encoder |
| `tb_qam_mapper` | constellation mapper |
| `tb_cs_bram` | context memory |
| `tb_data_bram_bank` | data BRAMs |
| `tb_he_data_fsm` | data FSM |
| `tb_interleaver_buffer` | interleaver and ping-pong buffer |
| `tb_pilot_mod_fsm` | pilot and modulation FSM |
| `tb_cs_fsm` | context-switching FSM |
| `tb_bcim_hv` | bit-exact shared chain against a reference model in `tb/tb_ref_pkg.sv`, with slice timing and a stall |
| `tb_he_preamble_fsm` | preamble FSM |
| `tb_fd_mux` | frequency-domain multiplexer |
| `tb_ifft` | IFFT against a direct DFT |
| `tb_td_mux` | time-domain multiplexer |
| `tb_async_fifo` | clock-domain-crossing FIFO |
| `tb_duc` | up-converter |
| `tb_mu_ofdma_tx` | whole transmitter at default size |

`tb_mu_ofdma_tx` runs the whole transmitter at its default size (nine user
BRAMs, 1024-deep FIFO) with four packets:

- one user on the 242-tone RU at MCS 6;
- four 52-tone users;
- nine 26-tone users over 24 symbols;
- two 106-tone users.

It counts context switches, stalls, padding bits and symbol commits for each
packet, and checks the sample count, the GI lengths and that there is no
underflow.
