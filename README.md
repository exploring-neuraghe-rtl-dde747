# NEURAGHE convolution accelerator in SystemVerilog

This is RTL for a NEURAGHE-style CNN accelerator. It is meant for the programmable
logic of an ARM + FPGA SoC. The main configuration is LOSA: one Convolution Specific
Processor (CSP) holding a 4x4 Sum-of-Products (SoP) matrix, sized for a Zynq Z-7045.
It has 864 multiply slices and computes 3x3 convolutions on 16-bit or 8-bit data.
Precision is selected per job at run time.

## Structure

```
neuraghe_top                    N_CSP processors side by side
└─ neuraghe_csp                 one Convolution Specific Processor
   ├─ csp_regs                  control/status registers (programmed by the microcontroller)
   ├─ conv_engine               Convolution Engine (CE)
   │  ├─ ce_controller          job sequencer, TCDM ports, output write queues
   │  ├─ weight_memory          private 32-bank weight memory
   │  ├─ weight_loader          copies a job's 432 weights into the SoP units
   │  ├─ line_buffer  x4        one per matrix column, 3 input maps each
   │  ├─ sop_unit     x16       4 rows x 4 columns
   │  └─ per row: add_shift, relu_unit, pooling_unit
   ├─ wdma                      weight DMA: DDR -> weight memory
   ├─ adma                      activation DMA: DDR <-> TCDM
   ├─ tcdm_xbar (20 masters)    CE ports -> TCDM bank port A
   ├─ tcdm_xbar (2 masters)     ADMA + microcontroller -> TCDM bank port B
   ├─ tcdm                      32 word-interleaved dual-port banks, 2048 words each
   └─ sp_ram x2                 instruction memory, L2 memory
```

These parts are not built. Their ports are brought out instead:

- the microcontroller, which connects through register, TCDM, instruction-memory and L2 ports;
- the ARM host, the DDR and the AXI fabric, replaced by simple request/grant memory ports (`ps_w_*` for weights, `ps_a_*` for activations).

## Dataflow of one engine job

1. The WDMA copies the weights into the weight memory. The weight loader then reads 14 rows of 32 weights into the SoP units.
2. The controller streams the frame one 32-bit word position per cycle.
   - Each word position is read from each of up to 12 input maps through the `x_in` ports.
   - A word holds two 16-bit or four 8-bit pixels.
   - When partial results are accumulated, the matching word of up to 4 previous output maps is also read through the `y_in` ports.
3. Line buffer *n* forms the 3x3 windows of input maps 3n..3n+2 for every pixel of the word.
4. SoP unit (m, n) convolves those windows with its kernels.
5. Row m adds its four SoP results, shifts right by `shift`, and adds either `y_in` or the row bias. It then saturates, applies ReLU when enabled, and pools when enabled.
6. The result is written back through `y_out`.

Timing:

- Each port waits for its TCDM grant, so bank conflicts stall the whole step.
- With no conflicts the engine takes one step per cycle.
- The pipeline is 5 steps deep: line buffer 1, SoP 2, add-shift 1, ReLU 1.

Weight order in memory: weight i = ((m*4 + n)*3 + f)*9 + ky*3 + kx.

- m is the output row and n the column.
- f is the feature within the column, so global input map = 3n + f.

## Frame format

Map p of a job starts at `base + p*stride`, with the word at (row r, column c) at offset `r*wpr + c`. Output word (r, c) is the valid 3x3 convolution whose window ends at input row r and input pixel x:

- Rows 0 and 1 are not written.
- The first two pixels of every row have no meaning.
- With 2x2 pooling (stride 2), the pooled value goes to (r/2, c/2) with a row pitch of `wpr/2`.
- Pooling modes are max, average (sum >> 2) and down-sampling (top-left pixel).

## Register map (word addresses on the `uc_reg_*` port, read data one cycle later)

| addr | register |
|------|----------|
| 0x00 | CE start (bit 0) |
| 0x01 / 0x02 | x_base / x_stride |
| 0x03 | y_base (partial results in) |
| 0x04 / 0x05 | o_base / o_stride |
| 0x06 | rows [25:16], words per row [7:0] |
| 0x07 | weight-memory base row |
| 0x08 | mode: use_yin[21], pool[20:19] (0 none, 1 max, 2 avg, 3 down), relu[18], 8-bit[17], shift[16:11], n_of[10:8], n_if[3:0] |
| 0x09..0x0C | bias of output rows 0..3 |
| 0x10..0x13 | WDMA start, DDR source (bytes), weight index, length (weights) |
| 0x18 | ADMA start (bit 0), direction (bit 1: 1 = TCDM to DDR) |
| 0x19..0x1B | ADMA DDR address (bytes), TCDM word address, length (words) |
| 0x20 | status: done flags [6:4] (ADMA, WDMA, CE), busy [2:0]; write 1 to clear a done flag |
| 0x21 | stall cycles of the last CE job |

`evt` pulses for one cycle when a CE, WDMA or ADMA job finishes.

## Parameters

To rebuild one of the other configurations, change the top parameters:

| Configuration | N_CSP | N_COLS_P | M_ROWS_P |
|---|---|---|---|
| ARRUBIU | 2 | 2 | 4 |
| SABINA | 1 | 2 | 2 |
| BANZOS | 1 | 1 | 1 |

Other sizes are set in `rtl/neuraghe_pkg.sv`:

- kernel size, features per column, and accumulator width;
- TCDM and weight-memory sizes;
- maximum words per row (128 words, i.e. 256 pixels at 16 bit).

## Where this follows NEURAGHE and where it does not

These parts follow NEURAGHE:

- The CSP contents.
- The CE port counts: 12 `x_in`, 4 `y_in`, 4 `y_out`, and 32 weight-memory ports.
- One line buffer per column and one adder-shifter, ReLU and pooling unit per row.
- The multi-trellis SoP with its final adder.
- 54 slices per SoP unit with two 8-bit MACs per slice.
- Run-time 8/16-bit selection.
- The three pooling modes.

These are my own choices:

- The 3x3 kernel.
- The controller, the register map and the frame layout.
- The saturation and shift arithmetic.
- Dual-port TCDM banks and round-robin arbitration.
- One clock for everything. The original splits the CSP into a fast and a slow clock domain.
- Precision is always selectable at run time. There is no build option that fixes it to 8 or 16 bit.

The engine computes 3x3 kernels at stride 1 only. A stride-2 3x3 layer can be run as stride 1 followed by 2x2 down-sampling. A 1x1 layer can be run as 3x3 with zero outer weights. Larger kernels are not supported.

## Simulation

Each block has a self-checking testbench in `tb/`, which prints
`TB_RESULT checks=<n> failures=<n>`. For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/neuraghe_pkg.sv \
    tb/tb_neuraghe_top.sv --top-module tb_neuraghe_top
./obj_dir/Vtb_neuraghe_top
```

`tb_neuraghe_top` runs the full-size design end to end. It uses a DDR model with random grant delays and a model of the microcontroller. It runs five jobs:

- 16-bit and 8-bit precision;
- every pooling mode;
- partial-result accumulation;
- saturation;
- bank conflicts, plus a conflict-free throughput check.

It compares every output word with a reference model and also reads back the instruction and L2 memories.

`tb_workload_vgg16` runs a layer of VGG-16 type at its real frame width: 224 pixels (112 words per row), 6 rows, and 24 input maps. The maps are split into two jobs of 12. The second job adds the first job's partial maps through `y_in`, then applies ReLU and 2x2 max pooling. The testbench checks every pooled pixel and that each job takes at most two cycles per step. A job measures about 1.1 cycles per step.

## Fitting a layer

The TCDM holds 65536 words (256 KiB). A layer rarely fits whole, so it is run in tiles:

- Split rows into strips that overlap by two rows.
- Split input maps into groups of 12, chained through `y_in`.
- Split output maps into groups of 4.

The weight memory has 512 rows of 32 weights. One job uses 14 rows (432 weights), so it holds the weights of 36 jobs. Row length is limited to 128 words.
