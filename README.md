# Computational photography processors in SystemVerilog

This repository holds the datapaths of two image-processing accelerators:

* **Bilateral-filter processor.** An edge-preserving smoothing filter built on the
  *bilateral grid*, plus the application stages around it:
  - HDR creation from three exposures;
  - contrast adjustment for tone mapping and glare reduction;
  - flash/no-flash shadow correction for low-light enhancement.
* **Blind-deblurring processor units.** The compute blocks of a processor that estimates a camera-shake kernel:
  - a streaming single-precision FFT;
  - a 16-bank scratch memory with per-bank arbiters;
  - the merge-sort unit and the masked matrix-vector multiplier of the gradient-projection solver, which finds the kernel.

The two processors are independent. `cp_top` places them side by side, each with its own ports. Everything is synthesizable SystemVerilog-2017. Every block has a self-checking testbench.

## The bilateral grid, and how the filter uses it

A bilateral filter averages each pixel with neighbours that are close in position *and* in intensity, so edges survive. The grid turns this into plain linear filtering in 3-D:

1. **Assignment** (`grid_assign`).
   - The image is cut into blocks of σs×σs pixels, where σs is 16, 32, 64 or 128.
   - The intensity range is cut into 256/σr bins, where σr is 16, 32 or 64, giving 16, 8 or 4 bins.
   - Each grid cell (block, bin) holds two numbers: the sum of the intensities of the block's pixels in that bin, and their count (the weight).
   - One engine per bin compares each incoming pixel with its bin limits and accumulates.
   - Engines for bins that are not in use stay idle.
2. **Filtering** (`grid_conv`).
   - Every cell is replaced by a 3×3×3 Gaussian-weighted sum of its neighbours. The kernel is the binomial `[1 2 1]` on each axis.
   - The summed intensity is divided by the summed weight, so intensities are never scaled.
   - An empty neighbourhood gives 0.
   - The 27 products are added in three stages of three-input adders, followed by the divider. Latency is 5 cycles.
3. **Slicing / interpolation** (`interp_engine`, `linear_interp`).
   - Each output pixel reads the 2×2×2 filtered cells around its position (x, y, intensity).
   - It interpolates in three pipelined linear steps: four along x, two along y, one along intensity.
   - Grid spacings are powers of two, so each division is a shift. Latency is 3 cycles.

`bf_engine` sequences the three steps over one image:

- **Input.** The image is streamed twice: first block by block for assignment, then in raster order for slicing.
- **Filtering.** For each grid position the engine gathers the 3×3 spatial neighbourhood of all bins in nine cycles. The 16 convolution engines, one per bin, then fire at once. Each position takes 15 cycles.
- **Slicing.** For each pixel the engine fetches four grid positions (bins r and r+1 together) and issues the pixel to the interpolation engine. This takes 5 cycles per pixel.
- **Grid storage (departure from the original).** The grid of the whole image is kept on chip: up to `GW_MAX × GH_MAX` = 16×16 blocks by default. The original engine instead keeps only two grid rows plus a few blocks, and overlaps the three steps as soon as enough cells exist. That keeps its memory independent of image height. The rolling scheme is not built here, so the largest image is 16σs × 16σs (256×256 at σs = 16).
- **Edges.** At the far edges, slicing repeats the last row, column and bin.
- **Cross-bilateral mode.** `pix` chooses the bin, both in assignment and in slicing. `pix_val` is the value summed into the grid. Feeding the flash image on `pix` and the no-flash image on `pix_val` filters the no-flash image with the edges of the flash image, which is the decomposition used for low-light enhancement. For ordinary filtering the two inputs are equal.

### Application stages

| Block | What it does | Own choices |
|---|---|---|
| `hdri_create` | Looks each exposure's 8-bit value up in a camera-curve table (log exposure) and subtracts the log exposure time. It averages the three log radiances with hat weights `min(I+1, 256−I)` and converts back to linear with a 256-entry 2^x table plus a shift. | The camera curve is a γ = 2.2 curve computed at elaboration; a real system would load a measured curve. All formats are Q7.8 log2. |
| `contrast_adjust` | `adj = anchor + (base − anchor)·factor`, `merged = adj + detail`. A factor below 1 compresses (tone mapping); above 1 it expands (glare reduction). | The anchor and the Q7.8/Q8.8 formats. |
| `shadow_correct` | Works on 4×4 tiles. A pixel is an edge pixel when its gradient exceeds the tile's mean gradient. The binary mask is smoothed 3×3, and flash detail is added in proportion to the smoothed mask. | Gradient `|dx|+|dy|`, binomial smoothing, and saturation. |

In `cp_top`, an HDR mode (`bf_src_hdr`) feeds the bilateral engine from `hdri_create`:

- The log radiance becomes an 8-bit code with 16 codes per stop.
- An 8-entry FIFO with credit-based `hdr_ready` absorbs the radiance pipeline while the engine is busy filtering.
- The engine output (the base layer) feeds `contrast_adjust`.

## The deblurring units

All arithmetic is IEEE-754 single precision, from functions in `cp_pkg`: `fp_add`, `fp_mul`, `fp_lt` and complex helpers. They round to nearest even. Subnormals flush to zero, overflow saturates to infinity, and there is no NaN handling. The original uses vendor floating-point cells; these functions replace them.

### FFT engine (`fft_engine`, `fft_butterfly`)

The engine computes 128-, 64- or 32-point complex DFTs, selected at run time. Samples stream in and out two per cycle, in natural order at both ends.

- **Bank ping-pong.** There are two register banks of 128 complex samples each. One bank is being transformed while the other unloads the previous frame's results and loads the next frame. When both sides finish, the banks swap.
- **Timing.**
  - Eight radix-2 butterflies process 16 samples per micro-stage.
  - A stage is N/16 micro-stages plus one cycle to drain the butterfly pipeline, so a transform takes log2N·(N/16+1) cycles: 63, 30 and 15.
  - Each butterfly has one register stage. Its second half is combinational and lands in the bank write.
- **Why addresses never need permuting (this design's own scheme).**
  - Result k of the old frame and input k of the new frame always use the same bank address. That is what lets unloading and loading share a bank in the same cycles.
  - A bank therefore alternates between two storage orders:
    - A frame stored **bit-reversed** is transformed in place by **decimation in time** and ends in natural order.
    - The next frame is loaded into those natural-order addresses and is transformed by **decimation in frequency**, which ends bit-reversed.
    - The frame after that is loaded bit-reversed again, and so on.
  - A per-bank flag records the current order. The butterfly switches between the DIT form (twiddle first) and the DIF form (twiddle after the difference).
  - Input pair l is accepted only after output pair l has left. An assertion checks that no unread result is overwritten.
- **Throughput.** Swapping the banks costs one cycle, so a continuous stream runs at N/2+1 cycles per frame rather than N/2.
- **Twiddles.** A 64-entry table of W₁₂₈ᵉ is computed at elaboration. Shorter transforms use every second or fourth entry.
- **Inverse transforms.** Swap real and imaginary parts at both ends and scale by 1/N.

### Scratch memory (`scratch_sram`, `sram_bank`)

- **Layout.** 4 SRAMs × 4 banks × 4096 words × 32 bits; each bank is a single-port memory with synchronous read.
- **Arbitration.** Each bank has a round-robin arbiter over `NPORT` (8) client ports. The grant is combinational; read data follows one cycle after the grant.
- **Bank mapping.** `cp_pkg::bank_of(r,c) = {r[0], c[0]}` and `addr_of(r,c) = {r[6:1], c[6:1]}`. With this layout, any 2×2 group of neighbours of a matrix up to 128×128 lies in four different banks. Two rows or two columns can therefore be read or written in the same cycle, which a transposing 2-D FFT needs.

### Prior weights (`weights_engine`)

The E-step re-weights its image prior every iteration. For each pixel the engine computes the diagonal weight W(i,i) from the pixel's mean gradient μ and variance c, using a three-component Gaussian mixture.

- **Formula.** With E = μ² + c, each component j gets a log contribution a_j = ln(π_j/σ_j) − E/(2σ_j²). Then e_j = exp(a_j − max_k a_k), and W = Σ e_j/σ_j² ÷ Σ e_j.
- **Why the maximum is subtracted.** It keeps every exponential input non-positive. The exponential can then be a constant table indexed by the top 16 bits below the sign (exponent plus 8 mantissa bits) over |x| ∈ [2⁻¹², 128). Smaller inputs give 1 and larger inputs give 0.
- **Error and timing.** The sub-sampled table bounds the relative error of W to a few percent. The pipeline takes one pixel per cycle with a latency of 6. `cp_pkg::fp_div` provides the final division, correctly rounded.

### Gradient-projection units

- **Merge sort (`gp_sort`).**
  - It uses one comparator, a *reference register* and two memories. The reference register holds whichever value lost the last comparison.
  - Each cycle, the next value of the other run is compared with the reference. The smaller is written out, and the next read comes from the run it came from.
  - Pass i merges batches of 2ⁱ into batches of 2ⁱ⁺¹, ping-ponging between the memories.
  - After an odd number of passes the list is copied back, so the result always ends in memory 0.
  - Cost per pass is n + 2·batches cycles, plus n for the copy-back.
- **Matrix-vector product (`gp_matvec`).**
  - It computes `y = A·x` column by column, so that y can be updated incrementally when a few entries of x change.
  - Columns are requested from external memory. Two coefficients arrive per beat, feeding two multiply-add lanes.
  - `col_mask` selects columns, `row_mask` protects rows, and `accumulate` adds to the previous y instead of overwriting it.

## Top level (`cp_top`)

- **Bilateral-filter side.** `bf_engine` (assignment, 16 convolution engines and interpolation), `hdri_create` with the FIFO in front of the engine, `contrast_adjust` after it, and `shadow_correct` on its own ports.
- **Deblurring side.** `fft_engine`, `scratch_sram`, `weights_engine`, `gp_sort` and `gp_matvec`, each with its client side on top ports.
- **What is not built.** The scheduler that sequences these units, the DRAM controller, the 2-D transform, convolution, CG and covariance modules, and the Cauchy-point and CG controllers of the kernel solver. The units above are their building blocks.
- **Parameters.**
  - `BF_NBINS = 16` and `BF_GW_MAX = BF_GH_MAX = 16`.
  - `LOG2_NMAX = 7`, i.e. a 128-point FFT.
  - `NPORT = 8`.
  - `GP_DEPTH = 1024`, enough for a 31×31 kernel (961 unknowns).

## Departures and limits, in one place

- Bilateral grid storage is whole-image, not rolling (see above). Slicing takes 5 cycles per pixel rather than 1.
- One bilateral engine; the original chip has two. It interleaves them over alternate blocks in HDR mode, and runs one as a plain filter and one as a cross-bilateral filter in low-light mode.
- Colour handling is not built. There is no split of an RGB image into intensity and colour, and no colour merge afterwards; every datapath here is one channel.
- In the original, the slicing pass reads the input pixels from external memory, which limits it to the pixels memory can deliver per cycle. Here they are streamed in on the same port as the first pass.
- The filter kernel, camera curve, HDR merge weights, contrast anchor, gradient operator, mask smoothing, number formats, arbitration policy and handshakes are this design's choices.
- The FFT streams at N/2+1 cycles per frame. It uses valid/ready handshakes on the banks instead of input/output FIFOs.
- Floating point has no subnormals and no NaN handling.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. It is self-checking against an independent model (a real-valued DFT, a bit-exact integer model of the bilateral grid, and so on) and has a watchdog. With Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_bf_engine \
    -y rtl -y tb +libext+.sv rtl/cp_pkg.sv tb/tb_util_pkg.sv tb/tb_bf_engine.sv
./obj_dir/Vtb_bf_engine
```

Replace `tb_bf_engine` with any testbench in `tb/`.

- **`tb_cp_top`** runs the top at its default parameters and takes about half a minute. It covers:
  - a flat image through the bilateral engine and the contrast stage;
  - an HDR run with source stalls;
  - three back-to-back FFT frames with a slow reader;
  - an SRAM bank collision;
  - a sort that needs the copy-back;
  - a matrix-vector product followed by an accumulate;
  - a few pixels through the weights engine.

  It counts each of those events and fails if one never happened.
- **`tb_fft_engine`** checks the exact transform cycle counts (63/30/15) and the streaming rate.
- **`tb_gp_sort`** checks the exact cycle formula.
