# Emulated non-volatile logic and an intermittent 8x8 DCT

Devices powered only by harvested energy lose power often and at random. A
circuit made for them has to keep its progress in non-volatile memory (FeRAM,
ReRAM) and pick up from there when power returns. FPGAs, however, have only
volatile flip-flops and block RAMs. This RTL shows how to prototype such a
circuit on a normal FPGA or in a simulator. Two emulation blocks stand in for
what the FPGA lacks:

* **`nv_mem`, the emulated non-volatile memory.** A block RAM whose contents no
  emulated power failure ever clears. Each access keeps the memory busy for a
  set number of cycles, which models the slower read and write of a real
  non-volatile memory.
* **`int_emu`, the intermittency emulator.** It replays a capacitor voltage
  trace from a ROM, compares it with thresholds, and turns one comparison into
  an emulated power-failure reset (`reset_emu`). The other comparisons become
  energy-level flags.

The design under test is **`i2ddct`**, an 8x8 two-dimensional DCT core (the
transform at the heart of a JPEG encoder) built to run intermittently. When
the energy falls below a *hazard* threshold, the core finishes the work in
flight. It then saves its registers and both of its block buffers to `nv_mem`
and halts. After a power failure it restores that checkpoint and continues
where it stopped. No pixel is lost and no coefficient is produced twice.

`nvl_emu_top` wires the three together. All RTL is synthesizable
SystemVerilog-2017 with no vendor primitives.

## Block map

```
nvl_emu_top
├── trace_rom        voltage trace (mV), contents computed at build time
├── int_emu          prescaler, trace address, NUM_THR comparators, reset mux, random failures
├── nv_mem           emulated NV memory: input latch + sdp_ram + nv_mem_emu (access delay)
└── i2ddct           intermittent 2D DCT core   (reset = rst | reset_emu)
    ├── i2ddct_ctrl  system FSM, backup policy, checkpoint placement in NV memory
    ├── i_dct1s      row stage       ── dct_da ── dct_rome / dct_romo (one pair per bit)
    ├── i_dct2s      column stage    ── dct_da ── dct_rome / dct_romo
    ├── i_dbufctl    ping-pong control of the two buffers
    ├── ram_mux      RAM port routing (DCT stages vs. checkpoint transfer)
    ├── ram_pb       checkpoint transfer of the buffers (TX: push, RX: pull)
    └── sdp_ram x2   RAM1 / RAM2, 64 x 12 bits each
```

Shared types live in `rtl/nvl_pkg.sv`. These are the system state enum
`sys_status_t`, the checkpointed register structs and the layout of a
checkpoint in NV memory.

## Emulating non-volatile memory (`nv_mem`, `nv_mem_emu`)

A request is presented with `en` together with `we`, `waddr`, `wdata` and
`raddr`. One request may read and write at once, because the store is a
simple dual-port RAM. The request is accepted at the first rising edge where
`busy` is low, and an input latch captures it. `busy` then stays high for
`DELAY_CYCLES` cycles. The default of 5 cycles is a 50 ns access at 100 MHz.
In the last busy cycle the latched write is committed and the read word is
loaded into `rdata`. So:

```
clk      _/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_
en       ‾‾‾‾\_____________________________      (drop en after acceptance)
busy     ____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_________      5 cycles
rdata    ==========================X new ==      valid once busy falls
```

A new request can be accepted in the first cycle in which `busy` is low
again, so the memory sustains one access every 6 cycles. The controller in this
design uses that cycle to take the result and issues the next request one
cycle later, so it spends 7 cycles per access.
Its reset (`rst`) clears only the latch and the timer, never the array. A
power failure during an access therefore loses that write, which is what a
torn write in a real part looks like. The array starts all-zero, as a freshly
configured FPGA's block RAM does.

## Emulating the power supply (`int_emu`, `trace_rom`)

In trace mode, every `presc+1` cycles the ROM address advances and wraps at
the end. The new sample, in millivolts, is compared with `NUM_THR` run-time
thresholds: `below[i] = voltage < thr[i]`. `rst_sel` picks the comparator that
drives `reset_emu`. In the top, `haz_sel` picks the comparator that becomes
the core's `energy_low`. The output changes 3 cycles after an address
change: one cycle each for the ROM read, the sample register and the
comparator register.

In random mode (`mode = 1`), a 16-bit LFSR is stepped on each tick. A failure
starts when its low byte is below `rnd_rate`, and it lasts `rnd_len` ticks.
Such failures come without a hazard warning, so the core cannot prepare for
them.

`trace_rom` models a storage capacitor with three zones:
* `N_FLAT` samples at `V_NOM`.
* `N_DIS` samples of discharge, `v -= v / (DIS_DIV*RC)`.
* Recharge for the rest of the ROM, `v += (V_NOM - v) / CHG_DIV`.

With the defaults (3300 mV, 32 + 32 samples, DIS_DIV 8, CHG_DIV 32, RC 1) the
trace falls from 3.3 V to about 49 mV and recovers to about 3.27 V at sample
255. `RC` slows only the discharge.

## The DCT core

**Function.** The core computes `Y = C·(X-128)·Cᵀ` for each 8x8 block of 8-bit
pixels. C is the orthonormal DCT-II matrix,
`C[i][j] = a(i)·cos(π/8·(j+½)·i)`, with `a(0) = 1/√8` and `a(i>0) = 1/2`. The
results are rounded to 12-bit signed integers. Pixels enter row by row, one
per cycle, over `din`/`din_valid`/`din_ready`. Coefficients leave on
`dout`/`dout_valid` in **column order**: output number `k*8 + l` of a block is
`Y[l][k]`.

**Row/column method.**
1. `i_dct1s` collects a row of 8 pixels. It then produces the row's 8 1D
   coefficients, one per cycle, while it collects the next row.
2. Those coefficients are written **transposed** (address `k*8 + row`) into
   the buffer the double-buffer controller has assigned to it.
3. When row 7 is written, `block_cmplt` marks the buffer full and switches the
   write buffer.
4. `i_dct2s` reads the other, full buffer row by row. Each row is a column of
   1D results. It outputs 8 coefficients per row, one per cycle, while it
   reads the next row.
5. With the last read, `rd_done` frees the buffer.

**Timing.** Each stage takes 8 cycles per row. A block therefore takes 64
cycles, and blocks stream back to back. The first coefficient is valid 85
cycles after the edge that accepts the first pixel, as in the published
core. Two of those cycles are an output register pair in `i_dct2s`.

**Multiplication by distributed arithmetic (`dct_da`).** For even k the matrix
row is symmetric, and for odd k it is antisymmetric. Each coefficient is
therefore a 4-term dot product of the folded inputs `u[j] = x[j] ± x[7-j]`.
For every bit b of the folded inputs, the 4 bits `u[3..0][b]` address a ROM
that holds the precomputed sums of matrix entries: `dct_rome` for the even
rows and `dct_romo` for the odd rows. The ROM words, shifted by b, are added.
The sign bit's word is subtracted, because the inputs are two's complement.
The unit has one ROM pair per bit and is purely combinational, so it yields
one coefficient per cycle.

**Number formats.**
* The constants are scaled by 2^12 and rounded.
* The row stage works on level-shifted pixels (10-bit folded values). It keeps
  2 fraction bits, so the intermediate values are 12-bit signed.
* The column stage drops those bits again when it rounds to the 12-bit output.
* The testbenches compare every output with an exact real-arithmetic DCT and
  accept a difference of at most ±2.

## Surviving power failures

### System states (`sys_status`)

| state | what happens | leaves for |
|---|---|---|
| Pull-Checkpoint | Only after a reset, so after every emulated power-up. Reads the marker word of NV memory. If the marker is valid, reads the state words, then the 128 buffer words, which `ram_pb` writes back into RAM1/RAM2. | Init, or Halted if there is no valid marker (cold start) |
| Init-Checkpoint | One cycle. `load` copies the restored state into the stages and the double-buffer controller. | Halted |
| Halted | Nothing runs. `din_ready` is low and no output is produced. | Running once `energy_low` is low |
| Running | Normal operation. | Pre-Checkpoint when `energy_low` rises |
| Pre-Checkpoint | No new pixels are accepted and no new rows are started. Rows already in flight are finished and their coefficients output. | Push once both stages are idle |
| Push-Checkpoint | Marker ← 0, state words, 128 buffer words, marker ← valid. | Halted |

The backup policy is deliberately simple. The core saves only when the
energy falls below the hazard threshold, then waits in Halted until the
energy is safe again. If the energy recovers without a power failure, the core
simply resumes from Halted, since its volatile state is still intact. The push
costs 135 NV accesses of 7 cycles each, about 950 cycles (9.5 µs at 100 MHz);
the pull after power-up takes about as long. The hazard threshold has to leave at least that much time before
the voltage reaches the reset threshold.

### What a checkpoint holds

`ckpt_state_t` is 78 bits, stored as 5 words of 16 bits:

* **Row stage:** the partly filled 8-pixel row latch, its fill count, and the
  index of the next row to compute. Pixels the core has accepted are never
  lost, even if a row or a block is incomplete.
* **Column stage:** the index of the next row to read. The stage halts only at
  row boundaries, and every row it read has been output before the push.
* **Double buffer:** both selects and both full flags.
* **Buffers:** both 64-word buffers, transferred in full.

Layout in NV memory (`nvl_pkg`): the marker is at 0x00 (`0xA5C3` = valid), the
state words at 0x01 to 0x05, and RAM1 then RAM2 at 0x10 to 0x8F. The marker
is cleared first and set last. A push cut short by a power failure therefore
never looks valid. The next power-up then starts cold, and the work done since
the last good checkpoint is lost.

### Why the stream stays exact

A pixel is accepted only in Running. Every accepted pixel is either in the row
latch or in a buffer, and both are checkpointed. A coefficient is output only
in Running or Pre-Checkpoint, and the push follows the last one. A restore
therefore resumes exactly after the last coefficient that was output and
before the first pixel that was not yet accepted. Volatile RAM contents are
not trusted after a failure. The end-to-end testbenches overwrite both
buffers with random data at every emulated power failure.

## Behaviour under the hazard-threshold sweep

`tb/tb_hazard_sweep.sv` repeats the classic experiment:
* The reset threshold is 1.5 V.
* The hazard threshold steps from 2.70 V down to 1.90 V in 10 mV steps.
* Each run replays one trace period at 256 cycles per sample.
* The trace is built with RC = 1, 3, 4 and 5.

It counts the wrong coefficients in each run. With this RTL and this trace,
these hazard thresholds give no errors:

| RC | error-free hazard thresholds |
|---|---|
| 1 | 2.70 V down to 2.53 V |
| 3, 4, 5 | the whole range |

Below 2.53 V with RC = 1, the voltage reaches 1.5 V only about 3 samples (768
cycles) after the hazard flag. That is less than a push needs (about 950
cycles). The checkpoint
is torn and the stream restarts from scratch.

The published experiment used a different trace and reported these error-free
ranges:

| RC | published error-free range |
|---|---|
| 1 | 2.70 to 2.64 V |
| 3 | 2.70 to 2.18 V |
| 4 | 2.70 to 1.97 V |
| 5 | everything |

The published runs also showed occasional error spikes from a corner case in
which a power failure hit a partly received block. Here the partial row and
the partial block are part of the checkpoint, and no such spikes occur.

## Where this RTL departs from the published design

* **State registers.** The stages hand their state registers to the
  controller's state words directly. In the published design they go through
  the RAM buffers first. Either way they end up in the same checkpoint.
* **Buffer transfer.** Both buffers are always transferred whole.
* **Controller details.** The checkpoint layout, the validity marker and the
  cold start without a valid marker are this design's choices.
* **RAM port control.** `ram_mux` is steered by `sys_status` and the buffer
  selects only. The stages are gated by `sys_status`, so their ready signals
  are not needed.
* **Distributed arithmetic.** It is bit-parallel (one ROM pair per bit) rather
  than a bit-serial MAC pipeline.
* **Formats, handshakes and emulator details.** All widths, the valid/ready
  handshakes, the voltage trace, the random-failure generator and the
  millivolt encoding are this design's choices. The published design gives
  none of them.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/nvl_pkg.sv tb/tb_dct_ref_pkg.sv tb/tb_nvl_emu_top.sv \
    --top-module tb_nvl_emu_top -o sim && ./obj_dir/sim
```

Replace the testbench name to run another one.

| testbench | what it runs |
|---|---|
| `tb_nvl_emu_top` | Full system at default parameters: two trace periods (131k cycles), pixel source with random gaps. Requires every mechanism at least once: power failure, cold start, pre-checkpoint, push, pull/init, resume, back-pressure and NV busy. |
| `tb_hazard_sweep` | The threshold/RC sweep above (4 x 81 runs, about 20 s). |
| `tb_i2ddct` | Core with `nv_mem`. Checks latency 85 and 64 cycles per block, plus two forced checkpoint/restore cycles. |
| `tb_<block>` | One per block: `tb_i_dct1s`, `tb_i_dct2s`, `tb_dct_da`, `tb_dct_rome`, `tb_dct_romo`, `tb_i_dbufctl`, `tb_ram_mux`, `tb_ram_pb`, `tb_i2ddct_ctrl`, `tb_nv_mem`, `tb_nv_mem_emu`, `tb_sdp_ram`, `tb_int_emu`, `tb_trace_rom`. |

The DCT reference (`tb/tb_dct_ref_pkg.sv`) computes the transform in real
arithmetic from `$cos`. Test pixels come from an integer hash of block and
position, with every third block a gradient, so no data files are needed.

## Changing it

Key parameters:
* `nvl_emu_top`: `NV_DELAY` (NV access cycles), `NUM_THR`, `TRACE_AW`,
  `TRACE_RC`.
* `trace_rom`: `V_NOM`, `N_FLAT`, `N_DIS`, `DIS_DIV`, `CHG_DIV`.
* `nv_mem`: `AW`, `DW`.

Widths and the checkpoint layout are in `nvl_pkg`. If you add a register that
must survive a power failure, add it to the matching struct there.
`CKPT_WORDS` follows automatically; keep `NV_RAM_ADDR` above the state words.

To checkpoint a different circuit, keep `nv_mem` and `int_emu` unchanged. The
new circuit needs:
* a finish-then-idle halt input;
* a state struct with a `load` path;
* a controller that walks its state through NV memory as `i2ddct_ctrl` does.
