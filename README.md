# 5G resource grid transmitter

This is an FPGA transmitter that plays back a 5G NR resource grid as a continuous
OFDM time-domain waveform. The grid is a table of complex values, one per subcarrier
and OFDM symbol. The grid is not built into the hardware. The host loads it at run
time over AXI-Stream, together with a table of cyclic prefix lengths. Control
registers on AXI4-Lite describe the grid's shape. So a new grid configuration needs
a DMA transfer and a few register writes, not a new bitstream.

The sample rate is fixed when the hardware is built. The subcarrier spacing (SCS)
can still change from one grid to the next, because FFT size = sample rate / SCS.
The design holds three OFDM modulators, one each for 15, 30 and 60 kHz at that sample
rate, and uses only the one that matches the loaded grid. By default they are 1024,
512 and 256 points, for 15.36 Msample/s. Each modulator is built for exactly its own
FFT size, so the output has no idle cycles: while a frame plays, there is one valid
sample on every clock cycle.

The target is a Zynq board with an AD9361-class RF transceiver (for example, a
ZCU102 with an FMCOMMS3). The processor, its DMA engines and the RF board are
outside this RTL. The top level brings out the ports they connect to.

## Data path

```
             AXI4-Lite ──► axil_regs ──► 10 control values (to every block)
                                                 │
 mm2s_dma ──► axis_write_if ──┬─(write_cp=0)─► grid_ram_ctrl ──grid elements──┐
              (input FIFO)    │                 RAM + counters + FIFO          │
                              └─(write_cp=1)─► cp_ram_ctrl ◄──element accepted─┤
                                                CP RAM + symbol counter        │
                                                      │ CP length              ▼
                                                      └──────────────► ofdm_mod_bank
                                                                       (15/30/60 kHz)
                                                                             │ 1/N-scaled
                                                                             ▼ samples
                                                 wave_scaler (× sqrt N)  ◄───┘
                                                      │
                                                      ▼
                          tx_output (round, saturate to 16 bit) ──► tx_ch1/ch2_i/q_data, tx_valid
                                                      │
 s2mm_dma ◄── axis_capture (capture FIFO) ◄── selectable debug source
```

Every block uses one clock, `clk`, which runs at the waveform's sample rate. The
reset, `rst_n`, is asynchronous and active low.

| File | Role |
|---|---|
| `rtl/txr_pkg.sv` | Sample types (`iq16_t`, `iqw_t`), register indices, capture sources, `bitrev` |
| `rtl/txr_top.sv` | Top level: instantiates and wires everything below |
| `rtl/axil_regs.sv` | AXI4-Lite slave with the ten control registers |
| `rtl/axis_write_if.sv` | Loading stream and input FIFO |
| `rtl/grid_ram_ctrl.sv` | Grid RAM, write and read counters, FIFO to the modulators |
| `rtl/cp_ram_ctrl.sv` | CP length RAM and the counter that tracks the current symbol |
| `rtl/ofdm_mod_bank.sv` | Three modulators and the selection logic |
| `rtl/ofdm_mod.sv` | One modulator: subcarrier mapping, IFFT, CP insertion, playback |
| `rtl/sdf_ifft.sv`, `rtl/sdf_stage.sv` | Streaming radix-2 inverse FFT |
| `rtl/wave_scaler.sv` | Multiplies the waveform by sqrt(N) |
| `rtl/tx_output.sv` | Converts to the 16-bit transceiver samples |
| `rtl/axis_capture.sv` | Debug capture to the host |
| `rtl/sync_fifo.sv` | FIFO used by the blocks above |

## Control registers

All registers are 32 bits wide and reset to zero. A byte address is 4 × the index.

| Addr | Name | Meaning |
|---|---|---|
| 0x00 | NUM_ELEMENTS | Number of grid elements (subcarriers × symbols) |
| 0x04 | NUM_SUBCARRIER | Number of subcarriers per symbol, K ≤ N |
| 0x08 | FFT_SIZE | FFT size of the grid. It selects the modulator: FFT_MAX, FFT_MAX/2 or FFT_MAX/4 |
| 0x0C | NUM_CP | Number of entries in the CP table (the symbols per subframe: 14, 28, 56, or 48 with extended CP) |
| 0x10 | FIFO_RESET | Bit 0 empties the input FIFO and sets both RAM write addresses back to zero |
| 0x14 | WRITE_CP | Bit 0 routes loaded words to the CP RAM instead of the grid RAM |
| 0x18 | TX_START | Bit 0 enables transmission |
| 0x1C | CAP_START | A rising edge of bit 0 starts a capture |
| 0x20 | CAP_LENGTH | Number of samples to capture |
| 0x24 | CAP_SELECT | Capture source: 0 = transmit samples, 1 = modulator output (upper 16 bits), 2 = grid elements, 3 = CP length |

Addresses past 0x24 return SLVERR, and writes to them do nothing.

### Loading and starting a grid

1. Clear TX_START. Set FIFO_RESET to 1, then back to 0.
2. Write NUM_ELEMENTS, NUM_SUBCARRIER, FFT_SIZE and NUM_CP.
3. Set WRITE_CP. Stream NUM_CP words, each holding one CP length in bits 11:0.
4. Wait for the stream to go idle, then clear WRITE_CP. Stream the grid elements as
   `{Q[31:16], I[15:0]}` in Q1.15. Send them symbol by symbol, with the subcarrier
   index varying fastest. This is the memory order of a MATLAB subcarrier-by-symbol
   array.
5. Set TX_START.

The loading path always accepts data, one word per cycle. `mm2s_dma_ready` goes low
only while FIFO_RESET is set or the input FIFO is full.

WRITE_CP is sampled as each word leaves the input FIFO. Change it only when the
stream is idle.

### Transmission

While TX_START is set, the grid RAM is read from address 0 to NUM_ELEMENTS−1, over
and over. Frames follow each other with no gap. When TX_START is cleared, the frame
in progress still completes, and then the output stops. NUM_ELEMENTS must be a
multiple of NUM_SUBCARRIER.

The CP table is indexed by the symbol number modulo NUM_CP, and the index restarts
at every frame. The prefix lengths that fill a subframe exactly at 15.36 MHz are:

| SCS | FFT | Long CP (symbols 0 and 7·2^µ of each subframe) | Normal CP |
|---|---|---|---|
| 15 kHz | 1024 | 80 | 72 |
| 30 kHz | 512 | 44 | 36 |
| 60 kHz | 256 | 26 | 18 |

FFT_SIZE is read only while the transmitter is idle. Change it only with TX_START
clear. Between transmissions, when the grid RAM is not being read and the modulators
are empty, all modulators return to their reset state. The next grid therefore
starts clean, whatever its SCS.

## The OFDM modulator

This is the part that needs the most explanation. Each `ofdm_mod` takes grid
elements at up to one per cycle. It produces the time-domain waveform, cyclic prefix
included, at exactly one sample per cycle. It has four stages.

**1. Subcarrier mapping.** The K elements of a symbol are written into one half of a
ping-pong buffer. Element k goes to FFT bin `(k − floor(K/2)) mod N`, which centres
the grid on DC as in the NR OFDM definition. No element maps to the guard bins. The
feeder reads those bins as zero, so the buffer never needs clearing. The CP length
that arrives with a symbol's first element is stored alongside it.

**2. Inverse FFT.** A full buffer half is streamed, bin 0 to N−1, into a radix-2
single-path delay-feedback (SDF) IFFT with log2(N) stages. Stage s has a delay line
of N/2^(s+1) words and computes a radix-2 decimation-in-frequency butterfly. The
twiddle factors are exp(+j2πk·2^s/N), 18 bits wide with 1.0 = 2^16, computed at
elaboration. Each butterfly halves its outputs, so the word width stays the same
through all stages and the transform returns (1/N)·Σ. The output comes out in
bit-reversed order.

The pipeline advances only when an input sample arrives. The outputs of one symbol
therefore come out while the next symbol is being fed. After the last symbol of a
transmission (flagged by the grid RAM), the feeder sends one all-zero padding symbol
to push the real one out. The padding symbol's own outputs are discarded.

**3. Collection.** IFFT outputs are written, at their natural index, into one of NB
(4) output buffers. A small tag FIFO carries each symbol's CP length and padding flag
from the feeder to this stage.

**4. Playback.** Each finished buffer is read as its last `cp` samples followed by
all N samples. The next buffer follows on the very next cycle. The feeder starts a
new symbol only while fewer than NB real symbols lie between feed and playback. A
symbol takes N cycles to feed but N + cp cycles to play, so the input side, not the
output, is the one that waits. Once playback has started, it never starves as long
as the grid RAM keeps up. The grid RAM supplies one element per cycle, and K ≤ N.

The latency from a symbol's last element to its first output sample is about 2N
cycles. The memory per modulator is 2N grid words, 4N output words of 48 bits each,
and N − 1 delay-line words. The delay lines are read asynchronously, which suits
distributed RAM.

`ofdm_mod_bank` holds three of these, at FFT_MAX, FFT_MAX/2 and FFT_MAX/4 points. It
routes the grid stream to the modulator whose size equals FFT_SIZE and holds the
other two in reset. If FFT_SIZE matches no modulator, `cfg_error` is raised and no
data is accepted.

## Fixed-point formats and scaling

| Point | Format |
|---|---|
| Grid element, transmit sample | 16-bit I and Q, Q1.15 |
| Inside the modulator | 24-bit I and Q; grid full scale = 2^21 (two bits of headroom against twiddle growth) |
| After `wave_scaler` | 32-bit; same scale, with room for gains of up to 64 (FFT 4096) |

Because the IFFT returns (1/N)·Σ, `wave_scaler` multiplies by sqrt(N). That is a left
shift by floor(log2N / 2), plus a multiply by sqrt(2) (a Q2.24 constant) when log2N
is odd. The net result is (1/sqrt N)·Σ, the same normalisation MATLAB's 5G OFDM
modulator uses. `tx_output` divides by 2^6 with round-half-up, saturates to 16 bits
(`sat` pulses when it clips), and drives the same sample on both transceiver
channels.

Compared with a floating-point model, the output is within ±4 LSB for the test grids
used. Most of that error comes from truncating at each butterfly stage. A grid whose
time-domain peak exceeds full scale is clipped, not wrapped.

## Debug capture

A rising edge of CAP_START captures CAP_LENGTH samples of the CAP_SELECT source into
a 1024-word FIFO. The FIFO drains to `s2mm_dma_*`. I goes in bits 15:0 and Q in bits
31:16, or the CP length in bits 11:0. In the original, the debug path taps the scaled
waveform beside the transceiver output. Source 0 here is that waveform after
conversion to 16 bits, so the host reads exactly what the transceiver receives. A sample that arrives with the FIFO full is
dropped and sets the internal `overflow` flag. The next capture clears the flag.

## Parameters and sizes

| Parameter (txr_top) | Default | Meaning |
|---|---|---|
| FFT_MAX | 1024 | Size of the 15 kHz modulator. The sample rate is FFT_MAX × 15 kHz |
| GRID_DEPTH | 131072 | Grid RAM depth in elements (32 bits each) |
| CP_DEPTH | 64 | Depth of the CP table |
| IN_FIFO_DEPTH / GRID_FIFO_DEPTH / CAP_FIFO_DEPTH | 512 / 16 / 1024 | FIFO depths |
| NB | 4 | Output buffers per modulator |

FFT_MAX may be any power of two from 512 to 4096. That covers modulator sizes from
128 to 4096 points and sample rates from 7.68 to 61.44 MHz. Lower sample rates
(1.92 and 3.84 MHz) would need an FFT_MAX of 128 or 256. Nothing in the RTL forbids
that, but the 60 kHz modulator would then have only 32 or 64 points.

At the defaults, a 10 ms grid of any of the three spacings fits in the RAM. Assuming
the usual 10 MHz carrier:

| SCS | Subcarriers × symbols | Elements |
|---|---|---|
| 15 kHz | 624 × 140 | 87360 |
| 30 kHz | 288 × 280 | 80640 |
| 60 kHz | 132 × 560 | 73920 |

A full 50 MHz carrier needs more. At 15 kHz SCS it has 270 resource blocks, which
takes FFT_MAX = 4096 (61.44 MHz) and GRID_DEPTH = 524288. Both are parameter
changes; no code changes are needed.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

- `tb_ofdm_mod`, `tb_ofdm_mod_bank`: compare every sample with a floating-point
  inverse DFT of the centred grid. They cover random input gaps, several CP lengths,
  all three modulators, transmissions back to back, the padding flush and gapless
  playback.
- `tb_txr_top`: end to end at FFT_MAX = 64. It loads over AXI, runs two grid
  configurations with a modulator switch between them, repeats frames, captures from
  all four sources, and compares every transmitted sample with the model.
- `tb_txr_full`: every parameter at its default. It loads a 10 ms, 30 kHz grid (288
  subcarriers, 280 symbols, FFT 512) and checks all 153600 output samples. They must
  match the model and fill exactly 153600 consecutive cycles: 10 ms at 15.36 MHz.
- `tb_txr_full_scs`: also at the defaults. It transmits a 10 ms, 15 kHz grid (624
  subcarriers, 140 symbols, FFT 1024, prefixes 80/72). Then, without a reset, it
  loads a 10 ms, 60 kHz grid (132 subcarriers, 560 symbols, FFT 256, prefixes 26/18),
  which switches the active modulator. A third grid stays at 60 kHz with the
  extended prefix: 12 symbols per slot, 480 symbols, 48 prefixes of 64 samples.
  Every frame must be exactly 153600 gapless samples. The largest error against the floating-point model is also checked. It is
  about 5e-5 of full scale, far below the 8.12e-3 the original transmitter reported
  against its reference waveform.
- `tb_axil_regs`, `tb_axis_write_if`, `tb_grid_ram_ctrl`, `tb_cp_ram_ctrl`,
  `tb_wave_scaler`, `tb_tx_output`, `tb_axis_capture`: protocol, ordering, counters
  and arithmetic.

To run one of them with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl rtl/txr_pkg.sv tb/tb_txr_top.sv \
          --top-module tb_txr_top -Mdir obj_tb_txr_top
./obj_tb_txr_top/Vtb_txr_top
```

Replace `tb_txr_top` with any other testbench name. The full-size test compiles in
about 10 s and runs in about a second.

## Where this design makes its own choices

The block structure, the ten control values, the two RAMs loaded through one FIFO
and routed by the write-CP flag, the per-symbol CP selection, the three modulators
chosen by SCS, and the sqrt(N) scaling all follow the original transmitter
description. The following were not specified there and are this implementation's
choices:

- The inside of the OFDM modulator: SDF IFFT, buffering and padding flush. The
  original used a vendor library block.
- All word widths and fixed-point formats, the register addresses and the stream
  word format.
- Frames repeat while TX_START is set, and a frame in progress always completes.
- One sample per clock, with the clock equal to the sample rate.
- Both RF channels carry the same waveform.
- The original block also had sample inputs from a transmit DMA, which its test
  tied to zero. They carry nothing in this design and are left out.
- The capture sources, the capture overflow flag, and saturation in the output
  stage.
- Modulators are reset between transmissions. FFT_SIZE and WRITE_CP must not change
  while data is moving.

Known limitations: the modulator delay lines use asynchronous reads. For very large
FFTs on an FPGA, the first stage's delay line (N/2 words) would be better placed in
block RAM with a registered read. A grid whose NUM_ELEMENTS is not a multiple of
NUM_SUBCARRIER leaves its last partial symbol unsent.
