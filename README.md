# Floating-point SAR focusing kernel

This is synthesizable SystemVerilog for a kernel that focuses synthetic aperture radar (SAR) raw data with the monochromatic ωK algorithm. All arithmetic is IEEE-754 single precision.

A focusing run is a sequence of passes over a block of data held in HBM. The block is 8192 × 32768 complex samples (one TerraSAR-X stripmap block). There are four kinds of pass:

- range FFT;
- range IFFT;
- azimuth FFT;
- azimuth IFFT.

Each pass transforms lines, multiplies every spectrum sample by a filter coefficient made on chip, and writes the lines back. Eight identical datapaths work in parallel, one per HBM pseudo channel (*lane*). The host sets the registers for one pass, starts the kernel and waits for `done`.

```
 HBM lanes 0..7 ──► partial CT ──► 8 × datapath ──► partial CT ──► HBM lanes 0..7
     ▲ (read)       (transpose      (cache, FFT,     (transpose        (write)
     │               in azimuth)     filter, cache)   if out_ct)
   sar_fsm: LUT fill, sub-block load / process / store      sar_regs: host registers
```

## The datapath

Each `sar_datapath` handles one *sub-block*: 4 range lines of up to 32768 points, or 16 azimuth lines of up to 8192 points. Both are 131072 samples. A sub-block passes through these stages:

1. **Input cache** (`uram_cache_in`). Four banks of 64-bit samples, 32768 deep. It is loaded with 256-bit words from HBM.
2. **Width converter** (`dwc_in`). Turns each 256-bit word into 4 complex floats, or into 16 raw 16-bit samples.
3. **I/Q correction** (`iq_correction`), raw data only.
   - Converts the 8-bit I and Q values to float.
   - Applies `y = (x + dc) · g`, where the complex `dc` and `g` come from registers.
   - Zero-pads each line from `raw_len` samples to the FFT length.
   - Float input bypasses this stage.
4. **FFT / IFFT** (`fft_fp`). 2^log2n points, log2n ≤ 15. Neither direction is scaled.
5. **Filter multiply** (`cmul_fp`). Multiplies each FFT output sample by the coefficient from `filter_gen`.
6. **Output cache** (`uram_cache_out`). Eight banks. Each write stores one 64-bit sample; each read returns 512 bits (8 samples).
7. **Write-back** (`dwc_out`). Splits each 512-bit word into two 256-bit HBM words. Only `out_len` samples per line are read back, which crops away unwanted pixels.

The lines of a sub-block are handled strictly one after another: feed N samples, transform, write N filtered samples. Load, processing and store also follow one another; they are not overlapped.

## Filter generation and its timing

`filter_gen` produces one complex coefficient for each FFT output sample. Its inputs are the bin index `k` and the line index `l`. Four sources can be selected:

| `coef_sel` | source |
|---|---|
| 0 phase | `exp(j·φ)`, with φ from the arithmetic chain below |
| 1 window | window table (BRAM, filled from HBM) |
| 2 chirp | chirp replica table (BRAM, filled from HBM) |
| 3 unity | 1 + 0j |

The phase chain, with each stage's latency in cycles:

| stage | module | what it does | latency |
|---|---|---|---|
| argument | `fp_arith` | `x = (k·scale + l·lscale + offset) / divisor` | 5 |
| polynomial | `poly_eval` | `φ = a0 + x(a1 + x(a2 + … + x·a6))`, Horner form, degree 6, streaming | 26 |
| phase word | `phase_f2i` | `φ·phase_scale` converted to an integer modulo 2^32; top 16 bits kept | 2 |
| rotation | `cordic_f2f` | 16-iteration CORDIC on the 16-bit phase, then fixed-to-float conversion | 18 |

Lower-degree polynomials set the unused coefficients to zero. `phase_direct` skips the polynomial and takes φ = x, which suits linear phase ramps.

Every source is delayed to the same total latency, `FILT_LAT` = 52 cycles (input register included; see `sar_pkg`). The LUT outputs pass through a delay line. The datapath delays the FFT output stream, with its index and valid bit, by the same 52 cycles. Each sample therefore meets its own coefficient at the multiplier, and filtering adds only a fixed 52-cycle latency per line. If you change any latency, change it in `sar_pkg` so that `FILT_LAT` stays the sum.

## Corner turn

Range lines lie along HBM rows. Azimuth lines are columns, so an azimuth pass has to read the block transposed. This is done in two steps.

**HBM layout assumed by an azimuth pass.**
- Row `r` of the block is stored in lane `r mod 8`, at `src + (r / 8)·row_words`.
- Each 256-bit word of a row holds 4 adjacent columns.
- Datapath `d` owns columns `16d … 16d + 15` of each sub-block of 128 columns.

**Step 1: partial corner turn across lanes** (`partial_ct`).
- The controller makes every lane read, for each of its rows, the word that datapath 0 needs, then the word for datapath 1, and so on.
- `partial_ct` gathers 8 such words from each of the 8 lanes. It emits them transposed: word *j* of lane *i* goes to datapath *j*.
- Each datapath thus receives its own columns from 8 rows at a time, one row per lane.
- A collect buffer and an emit buffer work as a ping-pong pair. Each output lane takes its word whenever its own ready is high, and no word is sent twice.

**Step 2: the input cache's write addressing** (`uram_cache_in`).
- The n-th word arriving at a datapath belongs to row `r` and column group `g`, both worked out from n.
- Sample `j` of the word (column `c = 4g + j`) is written to bank `(c + r) mod 4`, at address `c·N/4 + r/4`.
- Reading column `c` as a line then fetches 4 consecutive rows per cycle from the 4 banks, rotated by `c mod 4`.
- A column is read at full rate, and the cache needs no second copy.

The same `partial_ct`, on the write side with `out_ct = 1`, returns data to the interleaved layout: datapath *j*'s word *i* goes to lane *i*.

**Sizes.** One sub-block fills each cache exactly: 4 × 32768 = 16 × 8192 samples. An assertion in `sar_datapath` flags a configuration that does not fit. The sizing therefore assumes azimuth lines are at most a quarter of the longest range length.

## The FFT

`fft_fp` is an iterative, in-place, radix-2 decimation-in-time FFT. It runs in three phases.

1. **LOAD.** Writes the N input samples to bit-reversed addresses.
2. **COMPUTE.** One butterfly per cycle over log2n stages. It reads two operands from a memory with asynchronous reads and writes both results back. Twiddles come from a ROM of N/2 entries built at elaboration. The inverse uses conjugated twiddles.
3. **UNLOAD.** Streams the N results in natural order, with their index.

A line of N points takes N + log2n·N/2 + N cycles; for 32768 points that is 311 296 cycles. This is the main departure from a streaming, pipelined FFT core: see *Performance* below.

## Control and registers

`sar_regs` holds 32 × 32-bit registers. Writing 1 to register 0 starts a pass; reading register 0 returns busy.

| reg | field | reg | field |
|---|---|---|---|
| 1 | mode: bit 0 azimuth, 1 raw input, 2 inverse, 4:3 coef_sel, 5 phase_direct, 6 out_ct, 7 load chirp LUT, 8 load window LUT | 12–18 | polynomial a0…a6 (float) |
| 2 | log2n | 19–22 | scale, lscale, offset, divisor (float) |
| 3 | number of sub-blocks | 23 | phase_scale (2^32 per turn) |
| 4, 5 | source / destination word address | 24–27 | dc_re, dc_im, g_re, g_im |
| 6, 7 | chirp / window table address (lane 0) | 8, 9 | words per range line / per stored row |
| 10, 11 | raw samples per line / samples kept per output line | | |

`sar_fsm` then:

1. Optionally fills the chirp table and the window table of every datapath from lane 0.
2. For each sub-block:
   - loads all input caches;
   - starts processing and waits for every datapath;
   - stores the results to `dst + sub-block · words_per_sub_block` on each lane.
3. Raises `done`.

## Top-level interface

`sar_focus_top` has the following interfaces:

- **Register port:** `reg_we`, `reg_waddr`, `reg_wdata`, `reg_raddr`, `reg_rdata`, plus `busy` and `done`.
- **Read ports, one per lane:**
  - request: `rd_req_valid`, `rd_req_ready`, `rd_addr` (a 256-bit-word address);
  - data: `rd_data_valid`, `rd_data_ready`, `rd_data`, returned in request order.
- **Write ports, one per lane:** `wr_valid`, `wr_ready`, `wr_addr`, `wr_data`.

These ports stand in for the AXI ports of the HBM controller. The controller itself, the PCIe link and the host software are outside this design.

Complex samples are 64 bits, `{re[63:32], im[31:0]}`. In each 256-bit word, sample *i* occupies bits `64i +: 64`.

## Departures and limits

- **FFT speed.** The FFT computes one butterfly per cycle. At 130 MHz a 32k range sub-block takes 1.33 M cycles, as measured in simulation. A whole block of two range passes and two azimuth passes takes about 1.25 G cycles, or about 9.6 s. A fully pipelined streaming FFT would bring this down to well under 2 s.
- **Filter formulas.** The argument formula of `fp_arith` and the single real scaling in `phase_f2i` are general choices. The exact expressions for each ωKA filter are left to the register contents; the host computes them.
- **Float arithmetic.** The operators are this design's own: round to nearest even, subnormals flushed to zero, no NaN handling. Vendor floating-point operator cores may differ in the last bit.
- **Raw format.** Raw samples are 8-bit I in the low byte and 8-bit Q in the high byte.
- **Synthesis.** Some synthesis front ends cannot evaluate the real-valued functions that build the twiddle and arctangent tables; such a flow needs those tables precomputed.

## Simulation

The testbenches use plain Verilator 5 and need `--timing`. Every testbench prints `TB_RESULT checks=… failures=…`.

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sar_focus_top \
  -y rtl -y tb +libext+.sv rtl/sar_pkg.sv tb/tb_sar_focus_top.sv
obj_dir/Vtb_sar_focus_top
```

- **`tb_sar_focus_top`** runs end to end at reduced size: 4 lanes, 64-point lines. Its HBM model adds random stalls. It runs raw range compression with the chirp LUT, an azimuth pass with the polynomial filter, a range IFFT with the window LUT and output transpose, and a direct-phase pass. It checks every output sample against a double-precision DFT reference.
- **`tb_sar_focus_full`** runs the default, full-size kernel: 8 lanes × 4 lines of 32768 points with tone inputs. It takes about 10 s.
- **Per-block testbenches** `tb_<module>` cover each block on its own.
