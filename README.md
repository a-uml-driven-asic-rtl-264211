# Six hardware designs from a UML-to-SystemC flow, in SystemVerilog

This is a set of six independent digital designs. Each was originally described
as UML models (class diagrams, statecharts and activity diagrams) and
translated to SystemC. Here each is written as synthesizable SystemVerilog:

| Design | What it does | Top module |
|---|---|---|
| JPEG encoder front end | 8x8 DCT, quantisation and rounding, run-length coding | `jpeg_encoder` |
| Ethernet-style MAC controller | byte FIFOs, framing with preamble and CRC-32, serial line, receive checks | `mac_controller` |
| FIR filter | statechart controller with a history state driving a passive datapath | `fir_top` |
| FFT | 16-point complex FFT with request/acknowledge handshakes | `fft_module` |
| Circular-buffer FIFO | 32-bit FIFO with full and empty flags | `circ_buf` |
| VP3 video encoder kernels | block differences, forward DCT, quantiser, SAD and variance scores for motion search and mode choice, clearing of the coefficient store | `vp3_*` |

The designs share no logic. `uml_designs_top` puts them side by side on one
clock (`clk`) and one synchronous, active-high reset (`rst`). Each design keeps
its own ports, prefixed `jpeg_`, `mac_`, `fir_`, `fft_`, `fifo_` or `vp3_..._`.

Common conventions:

- All logic is clocked on the rising edge.
- Every register is reset synchronously.
- Shared types and constants live in packages: `dct_pkg`, `jpeg_pkg`, `mac_pkg` and `fir_pkg`.
- Each file opens with a comment giving the module's interface, its timing, and which parts follow the original description and which are this implementation's choices.

## JPEG encoder: a DCT made of 64 accumulators

The original design is organised as a grid: "DCT" holds eight `DCTUB` rows of
eight `DCTU` units, and each unit is one `DCT_MAC` multiply-accumulator with its
own cosine weight. That structure is kept.

- `jpeg_dctu` computes one coefficient F(u,v). `jpeg_dctub` holds a row of eight units. `jpeg_dct` holds eight rows.
- Pixels stream in one per enabled clock, in raster order.
  - A `dstrb` pulse marks the start of a stream.
  - Pixels are level-shifted by -128.
  - All 64 units accumulate at once, so a block needs 64 clocks and no transpose memory.
- The weight each unit needs for sample k is `C(u)C(v)/4 * cos((2x+1)u pi/16) * cos((2y+1)v pi/16)`.
  - It is computed at elaboration time from the cosine function in `dct_pkg`, scaled by 2^16. No table file is read.
  - The 32-bit sum is rounded by 2^16 and clipped to 11 bits, matching `dout[10:0]` of the original.
- After the 64th sample the coefficients are read out one per clock in zig-zag order, while the next block already accumulates.

`jpeg_qnr` divides each coefficient by an entry of an external quantisation
table, rounding to nearest with halves away from zero.

- The table is addressed by `qnt_cnt[5:0]` and answers on `qnt_val[7:0]` in the same cycle.
- A zero entry counts as 1.

Run-length coding is the part that needs the most care:

- **`jpeg_rle1`** has the two states DC and AC.
  - The first coefficient of a block gives a DC symbol.
  - The next 63 are counted. Every zero extends a run, and a non-zero value emits `(run, size, amplitude)`.
  - Every 16th zero of a run emits the "run of sixteen" symbol `(15,0)`.
  - If the block ends in zeros, an end-of-block symbol `(0,0)` is sent.
  - The size is the bit length of |value|. A negative amplitude is sent in one's complement, as in baseline JPEG.
- **`jpeg_rzs`** fixes a problem `rle1` cannot see in advance. A `(15,0)` followed only by zeros up to the end of the block must not be sent, because the end-of-block symbol covers it.
  - Each `rzs` stage holds one symbol.
  - In state S1 it holds a `(15,0)`. An arriving end-of-block discards the held symbol; anything else releases it.
  - Four stages in series (`jpeg_rle`) remove up to four trailing `(15,0)` symbols. A block can produce at most three.
- DC values are not differenced against the previous block.
- There is no Huffman stage. The output is the symbol stream `rlen`, `size`, `amp` with `douten`.

## MAC controller: framing, CRC and a serial line

`mac_controller` has a transmit block and a receive block.

**Transmit (`mac_tx_block`).** A central state machine drives three passive parts:

- `mac_fifo` (TxFIFO): 2048 bytes, first-word fall-through.
- `mac_tx_core` (TxCore): chooses the byte to send and computes the CRC.
- `mac_ptos` (PtoS): sends each byte least significant bit first, one bit per clock.

The host writes a frame, 14 header bytes and then the payload, and pulses
`tx_start`. The block then sends:

1. Seven `0x55` preamble bytes.
2. The `0xD5` start delimiter.
3. The header. Bytes 12 and 13 give the payload length.
4. The payload.
5. The CRC-32 frame check sequence: reflected polynomial, initial value all ones, inverted, low byte first.

`tx_done` pulses at the end. If the FIFO runs dry the line pauses, and a receiver
treats the pause as an error.

**Receive (`mac_rx_block`)** is purely structural:

- `mac_stop` (StoP) packs `rxd` bits into bytes while `rx_dv` is high. It pulses `frame_end` when `rx_dv` falls.
- `mac_rx_core` (RxCore) is a statechart with states Pre, Header, Data, CRC, End and Error.
  - It writes the header and payload bytes into the RxFIFO.
  - It compares the CRC over them with the four received FCS bytes.
  - It pulses `frame_ok` or `frame_err`.
- These frames go to Error:
  - a bad preamble or delimiter
  - a length above 1500
  - a wrong FCS
  - a frame cut short
  - an overflowing RxFIFO
- Bytes of a failed frame stay in the FIFO; the host discards them on `frame_err`.

The line carries one bit per clock, so a 100 MHz clock gives the 100 Mbit/s rate
(10 MHz for 10 Mbit/s). The length-field framing is an Ethernet II subset; type
fields above 1500 are rejected. Padding of short frames is not done.

## FIR filter: a statechart with history

`fir_fsm` is a hierarchical statechart.

- It passes from `reset_s` to `wait`.
- On `in_valid` it enters the composite state `Active`, which steps through `first_s`, `second_s`, `third_s` and `output_s`.
- If `in_valid` drops in the middle, the machine returns to `wait` and remembers the next substate (shallow history). A later `in_valid` resumes the computation instead of restarting it.

`fir_data` does the step named by `state_out`:

- `first_s` shifts the sample into the delay line and adds taps 0-5.
- `second_s` adds taps 6-10.
- `third_s` adds taps 11-15.
- `output_s` presents `result` with `output_data_ready`.

Coefficients:

- The defaults are 16 symmetric low-pass taps (`COEF`), with 32-bit data.
- The original does not give the tap count or the coefficient values. Change `COEF` and `TAPS` together.

## FFT: 16 points, one butterfly per clock

`fft_module` works in a loop:

1. It asks for 16 samples with `data_req` and takes one in each cycle where `data_valid` is high.
2. It transforms them in place. This is radix-2 decimation in frequency, with 4 stages of 8 butterflies and one butterfly per clock.
3. It offers the 16 results in natural order with `data_ready`, each taken on `data_ack`.

Number format:

- Twiddle factors are Q14, computed at elaboration time.
- Results are not scaled, so X[k] is the plain DFT sum.
- To keep 16-bit results, inputs must stay within ±2047.

## Circular-buffer FIFO

`circ_buf` holds `BUFSIZE` 32-bit words (default 16; a power of two) with head
and tail pointers.

- A read request on a non-empty buffer takes priority over a write. Reading and writing in the same clock performs only the read.
- `data_out` is registered: it shows the word one clock after the read.
- `full` and `empty` come from a registered fill count.
- `reset` clears the contents.

## VP3 encoder kernels

These are the arithmetic parts of a VP3 video encoder. Pixels are 8-bit. A
fragment is an 8x8 block, and a macroblock has four luma blocks.

The difference, transform and score units take one pixel, or one pixel pair,
per clock with `in_valid`: 64 per block, in raster order. The score units
also need a `start` pulse first. For these units the caller handles
frame-buffer addressing. Only the motion block difference and the intra mode
picker generate addresses themselves. This streaming interface is a choice of
this implementation.

**Block differences.** Each unit has one registered, signed 9-bit output:

- `vp3_sub8_128`: pixel - 128, for intra blocks.
- `vp3_sub8`: pixel - reference, for full-pixel motion.
- `vp3_sub8av2`: pixel - ((ref1 + ref2) >> 1), for half-pixel motion. The average is truncated.

**Transform and quantisation** (`vp3_transform_quantize`):

- `mode` selects one of the three difference units.
- `vp3_fdct_short` is an orthonormal 8x8 DCT.
  - It is a serial single-multiplier design: 4096 clocks per block.
  - It uses the Q12 cosine tables from `dct_pkg`.
- `vp3_quantize` computes `q = sign(c) * min(511, (|c| * r + 32768) >> 16)`.
  - Here `r = round(65536 / Q)` is the reciprocal of the quantiser entry, supplied per coefficient on `qrecip`.
  - A 2x64 buffer reorders the block into zig-zag order. Each block leaves in 64 consecutive clocks, with `out_first` on the DC value.
- `in_ready` closes after 64 pixels and reopens when the DCT is free.

**Motion block difference** (`vp3_motion_block_difference`) forms the
residual of an inter block directly from frame memory:

- The vector divisor (2 or 4) gives a shift and a mask. The reference
  position is offset by `(mv_y / d) * STRIDE + mv_x / d`, truncating towards
  zero.
- A fractional x part moves a second reference one pixel right (`mv_x > 0`)
  or left. A fractional y part moves it one line down or up.
- The golden or the last frame is chosen by `golden`.
- If the two positions coincide, `vp3_sub8` takes the plain difference.
  Otherwise `vp3_sub8av2` subtracts the average of the two references.
- After `start` the unit issues 64 reads on three address ports, one per clock.
  The memory answers one clock after `rd_en`, and each difference follows one
  clock after its data.
- `STRIDE` (default 416: a 352-pixel line plus two 32-pixel borders) and
  `ADDR_W` describe the memory.
- Edge filtering inside the reference block is not done.

**Intra mode picking** (`vp3_pick_intra`) is used for key frames.

- It walks the frame superblock by superblock. A superblock is 2x2 macroblocks.
- It writes the intra code to the mode table entry of every macroblock inside the frame, one per clock.
- Macroblocks of edge superblocks that fall outside the frame are skipped.
- The defaults are a CIF frame (22 x 18 macroblocks) and intra code 1.

**Exhaustive block search** (`vp3_four_mv_exhaustive_search`) is the
full-pixel stage of the four-vector motion search, for one 8x8 block.

- It visits every candidate within ±`MAX_MV_EXTENT`/2 pixels, ±15 by default, around the block's position in the reference frame.
- It reads 64 pixel pairs per candidate, one per clock, and feeds them to `vp3_get_sum_abs_diffs`.
- It keeps the first candidate with the smallest sum.
- The vector is reported in half-pixel units.
- A search takes 64 x 31 x 31 clocks, about 61,500.
- Not built: the half-pixel refinement around the winner, the final variance score and the loop over the four blocks of a macroblock.

**Motion search scores.**

- `vp3_get_sum_abs_diffs`: SAD of a block, with `done` one clock after the last pair.
- `vp3_get_next_sum_abs_diffs`: SAD with a breakout, the piece a motion search relies on to prune.
  - After each row of 8 pairs it compares `err_so_far` plus the running sum with `best_so_far`.
  - If the total is strictly larger, it stops at once: `done` and `early` pulse with the partial sum, and `active` drops so the feeder can move on. A tie continues.
- `vp3_get_half_pixel_sad`: the same, against the average of two references, or against `ref1` alone when `ref_offset_zero` is set.

**Mode-decision scores** are variances scaled by 64², which avoids any division:

- `vp3_get_intra_error`: `64*Σx² - (Σx)²` over the block.
- `vp3_get_inter_err`: the same for d = src - prediction.
- `vp3_get_mb_intra_error` and `vp3_get_mb_inter_error`: the sum over the four luma blocks whose bit in `coded_mask` is set.
  - Uncoded blocks are still streamed, but they add nothing.

**Clearing the coefficient store** (`vp3_clear_down_qfrag_data`):

- On `enable` it takes the fragment count from `datain`.
- It then writes zero to every word, 64 per fragment, one per clock. `addr` gives the word address and `output_data_ready` is the write strobe.
- `dataout` is always zero by design.

**Not implemented.** These parts depend on a frame store layout and search
parameters that are not defined:

- The macroblock motion searches: exhaustive and hierarchical.
- The half-pixel stage of the four-vector search.
- Mode picking for inter frames.
- The bitstream side: tokenising, Huffman packing and rate control.

## How far it can be trusted

Every module has a self-checking testbench in `tb/`.

- Each testbench compares against a model computed independently in the testbench, from the packages `jpeg_ref_pkg`, `mac_ref_pkg` and `vp3_ref_pkg`.
- Each one prints `TB_RESULT checks=N failures=M`.
- Each one has a watchdog.

`tb_uml_designs_top` runs all designs at once at their default sizes and checks
end-to-end behaviour:

- JPEG blocks against a software encoder.
- MAC frames looped back from `txd` to `rxd`, including a corrupted one.
- The FIR impulse response, and resumption from history.
- FFT frames.
- The FIFO filled to full and emptied.
- VP3 transform, SAD with and without breakout, macroblock scores, clearing, motion block differences for a whole-pixel and a half-pixel vector, intra mode picking over a CIF frame, and a motion search that must find a planted block.

It counts each mechanism and fails if one never happens. Each testbench was also
run against a deliberately broken copy of its module and caught the fault.

## Departures from the original description, and choices made where it is silent

- **Widths and handshakes.** Most of these are this implementation's choices. The original gives the JPEG signal widths (`din[7:0]`, `dout[10:0]`, `size[3:0]`, `rlen[3:0]`, `amp[11:0]`, `qnt_cnt[5:0]`, `qnt_val[7:0]`), the MAC state names, the FIR state names, the FFT port names and the clear-down port names.
- **JPEG.**
  - The zig-zag order comes from the DCT readout.
  - There is no DC differencing and no Huffman coding.
- **MAC.**
  - The line is serial at one bit per clock, not nibble-wide.
  - FIFO depth is 2048.
  - The transmit statechart's states are this implementation's own.
- **FIR.** The original datapath is unclocked and acts on changes of `state_out`. Here it is clocked, with one state per clock; the sequence of actions is the same.
- **FFT.** The fixed-point format and butterfly schedule are this implementation's own.
- **VP3.**
  - The original describes the quantiser both as a division by the quantiser entry and as a multiplication; the multiplication by a reciprocal is used.
  - `fdct_short` is a direct 2-D sum rather than a butterfly factorisation. The results are the rounded orthonormal DCT.
  - Scores use a pixel-stream interface instead of frame pointers.
  - The motion block difference does not filter internal edges of the reference block.

## Simulating

Example with plain Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/dct_pkg.sv rtl/fir_pkg.sv rtl/jpeg_pkg.sv rtl/mac_pkg.sv \
  tb/jpeg_ref_pkg.sv tb/mac_ref_pkg.sv tb/vp3_ref_pkg.sv \
  tb/tb_uml_designs_top.sv --top-module tb_uml_designs_top
./obj_dir/Vtb_uml_designs_top
```

Replace the testbench to run a single unit, for example `tb/tb_mac_rx_core.sv`.
Stimulus is random (`$urandom`); pass `+verilator+seed+N` to vary it.
