# ESTU: a spiking-transformer engine for ultra-low-power FPGAs

ESTU runs spiking transformers (spiking self-attention without softmax, as in
Spikformer) on a device as small as a Lattice iCE40UP5K. It is built for sensor
processing at a few milliwatts. Two ideas keep it small:

* **One core for every layer.** Embedding, Q/K/V projections, Q·Kᵀ, scores·V,
  residual sums and LIF layers all run on the same memories and arithmetic units. A
  program of 169-bit microcode instructions picks, for each step, the operator, the
  memory regions it reads and writes, the sizes and the neuron parameters.
* **Sparsity by groups of four.** As a layer writes its output spikes, the core
  records which 4-spike groups hold any activity in a *stack* memory. The next dense
  layer then fetches only those groups. Grouping by four keeps that pointer memory
  to about ten block RAMs.

This repository holds synthesizable SystemVerilog (IEEE 1800-2017) for the engine and
its system: the encoding and decoding slots, the CPU memory and the stand-by/wake-up
timer. Each block has a self-checking testbench. The control CPU (SERV, a bit-serial
RISC-V), the SPI and UART peripherals and the FPGA oscillators are existing parts and
are not included: their connections are brought out as top-level ports.

## System (`estu_soc`)

```
 control CPU ──bus──┬── I/D memory (id_mem)
 (outside)          ├── ESTU engine (estu_core)
                    ├── encoding slot (enc_slot)      sensor samples -> spikes
                    ├── decoding slot (dec_slot)      output spikes -> class
                    ├── stand-by timer (pwr_timer)    -> hf_osc_en
                    ├── SPI window  -> spi_*  ports
                    └── UART window -> uart_* ports
```

The CPU does all the data movement between these blocks in software. It reads sensor
samples over SPI and writes them to the encoding slot. It copies the resulting 32
spikes of each time step into the engine's spike memory and starts the microcode
program. When the engine is done, it passes the output-layer spikes to the decoding
slot and sends the class over UART.

The bus is Wishbone-style: one master, 32-bit byte addresses, and every internal slave
acknowledges one cycle after the request. `wb_adr[31:28]` selects the slave:

| region | slave | registers |
|---|---|---|
| 0 | I/D memory | word `adr[11:2]`, byte enables `wb_sel` |
| 1 | ESTU engine | engine word address `adr[21:2]` (below) |
| 2 | encoding slot | `0x00+4·ch` sample of channel ch; `0x40` step size; `0x44` read spikes / write to clear them; `0x48` reset |
| 3 | decoding slot | `0x0` write one step of class spikes, read `{count, class}`; `0x4` clear |
| 4 | stand-by timer | `0x0` sleep request, read `{woke, sleep}`; `0x4` wake-up delay in slow-clock periods |
| 5, 6 | SPI, UART | forwarded to the `spi_*` / `uart_*` ports |

**Stand-by.** The CPU writes the wake-up delay and then 1 to the sleep register. The
timer runs on the low-frequency clock `lf_clk` and drops `hf_osc_en`. That stops the
high-frequency oscillator, and with it the clock of the whole system. After the delay
the timer raises `hf_osc_en` again and reports `woke`. The CPU then clears the sleep
register. The request and the status cross between the two clock domains through
two-flop synchronisers.

## The engine (`estu_core`)

```
          I-Mem ──> controller (AGU -> S0 -> S1) <──> stack memory
                         │ addresses
     spike memory (4 banks)      integer memory (2 banks)
                 └──────> interconnect <──────┘
                              │ operands
        processing elements: 2 multipliers, 16-wide AND + pop count,
                             spike-gated adders, 20-bit accumulator
                              │ current
                 LIF module (768 x 20-bit potentials) or bypass
                              │
              spike bit -> spike memory   /   int8 -> integer memory
```

### Memories and data layout

The layout is the hardest part to follow, because each operator's speed depends on
which bank every operand sits in.

* **Spike memory**: 4 banks × 512 × 16 bits = 32 Kb. Word addresses are interleaved:
  word `w` is in bank `w[1:0]`. A spike is addressed by a 15-bit bit address
  `{word, bit}`, and a group of four spikes by `bit_address >> 2`. There are two
  16-bit read ports (A and B) and a bit-masked write port. Port A can also
  *gather* bit `k` of four consecutive words. Those words always lie in four
  different banks, which is how one column of V is read four rows at a time.
* **Integer memory**: two 16-bit banks of 16 K words (the two SPRAMs), 512 Kb in all,
  with byte write enables. A byte address `b` selects word `b[15:2]`, bank `b[1]`
  and byte `b[0]`. A 32-bit *double word* at word address `a` is bank 0 word `a`
  (bytes 0 and 1) followed by bank 1 word `a` (bytes 2 and 3). All data are int8.
* **Stack memory**: 2560 × 16 bits. It holds lists of active group addresses, each
  list ended by `0xFFFF`.
* **Potential memory** (inside the LIF module): 768 × 20-bit signed.

Data layouts the operators expect:

| data | layout |
|---|---|
| spike vector (layer input/output) | consecutive bits from a bit address |
| Q, K, V rows (up to 16 features) | one spike word per token / time step. Narrower heads may share the word: `MUL_SI` takes its first V column from `src_a[3:0]`, and `MUL_SS` scores one head of a shared K word when the Q word holds only that head's bits |
| Dense(spike) and Mul(spike,int) integer operand | row `r` = double words `src_i + r·n_len …`, 4 values per double word |
| Dense(int) | weights: bank-0 words `src_i + r·n_len + g` (2 per word); inputs: bank-1 words `src_b + g` |
| Mul(spike,spike) result | int8 matrix `dst + r·n_cols + c`, row-major by byte address. With `n_cols` a multiple of 4, this is exactly the row layout Mul(spike,int) reads |

### Operators

Each operator runs one pipeline step per cycle. A step handles the number of input
pairs shown below; these are the published per-cycle rates.

| opcode | operation | per step | reads | writes |
|---|---|---|---|---|
| `DENSE_S` | `I_r = Σ_i x_i·W[r][i]`, spikes × int8 | 4 pairs | nibble of spike port A + weight double word | LIF → spike bit `dst+r` |
| `DENSE_I` | `I_r = Σ_i x_i·W[r][i]`, int8 × int8 | 2 pairs (two multipliers) | bank 0 weights, bank 1 inputs | LIF → spike bit |
| `MUL_SS` | `C[r][c] = Σ popcount(Q_r & K_c)` | 16 pairs (AND array + pop count) | spike ports A and B | LIF bypassed → int8 byte |
| `MUL_SI` | `O[r][c] = Σ_j C[r][j]·V[j][c]` | 4 pairs | gather of V column + score double word | LIF → spike bit `dst + r·n_cols + c` |
| `SUM_SS` | `y = spk_val·(a + b)` | 2 elements | spike ports A and B | two int8 bytes |
| `SUM_SI` | `y = spk_val·a + x` | 2 elements | spike port A + one integer bank | two int8 bytes |
| `LIF` | LIF on int8 currents | 1 neuron | one integer byte | spike bit |
| `CLRPOT` | clear `n_rows` potentials | 1 neuron | – | potential memory |
| `END` | stop, pulse `done` | – | – | – |

A spike never drives a multiplier: where one operand is a spike, it simply
selects whether the int8 value is added.

Integer results (`MUL_SS`, `SUM_*`) are saturated to int8. The accumulated current is
shifted right by the `shift` field before it reaches the LIF or the int8 output.

### LIF neuron

For output neuron `n`, with potential `v` at `pot_base + n`:

```
v_leak = (leak == 0) ? v : v - (v >>> leak)
v_sum  = saturate_20bit(v_leak + (acc >>> shift))
spike  = v_sum >= vth
v      = spike ? (rst_sub ? v_sum - vth : 0) : v_sum
```

Potentials persist from one instruction to the next. That is how a layer integrates
over time steps: the same `pot_base` is used in every time step.

### Microcode (169 bits, most significant field first)

| field | bits | meaning |
|---|---|---|
| `op` | 4 | opcode |
| `src_a` | 15 | spike bit address of operand A |
| `src_b` | 15 | spike bit address of operand B (Dense(int): bank-1 word address of the inputs) |
| `src_i` | 16 | integer double-word address (Dense, Mul(spike,int)) or byte address (Sum, LIF) |
| `dst` | 16 | spike bit address or integer byte address of the result |
| `n_rows`, `n_cols`, `n_len` | 10 each | output rows; output columns (Mul only); inner steps per output |
| `pot_base` | 10 | first potential |
| `stk_rd`, `stk_wr` | 12 each | stack list read by a sparse Dense(spike), list written by the outputs |
| `use_stack`, `push_stack` | 1 each | walk the list instead of all groups; record active output groups |
| `vth` | 20 | signed threshold |
| `leak` | 4 | leak shift |
| `rst_sub` | 1 | reset by subtraction (1) or to zero (0) |
| `spk_val` | 8 | value of one spike in Sum operators |
| `shift` | 4 | right shift of the accumulated current |

The field order and widths are this design's choice; only the total width and the
kinds of field follow the published architecture. `estu_pkg::instr_t` is the
authoritative definition. The host writes an instruction as six 32-bit slices.

### Pipeline and timing

The controller (`estu_ctrl`) runs each instruction through three stages, with no
stalls:

* **AGU** walks the loops (rows, columns, inner steps). In sparse mode it issues the
  stack read for list entry `g`.
* **S0** turns the step into memory addresses. On the last step of a neuron it also
  reads the neuron's potential.
* **S1** receives the memory data. The interconnect and processing elements compute,
  and S1 issues the writes.

An instruction costs **steps + 6 cycles**: fetch, decode, a two-cycle drain, one cycle
to leave the run state, and one to close the stack list. In sparse mode a neuron
costs **(list length + 2) steps**: the list entries, the terminator step that applies
the neuron update, and one prefetched step that is dropped. The instruction then
costs steps + 5. Sparse mode therefore pays off when fewer than `n_len − 2` of the
`n_len` groups are active. The testbench checks all of these counts cycle by cycle.

The host port (`host_*`, word addressed, `[19:16]` selects the region) can reach the
memories only while the engine is idle:

* 0 = control: write bit 0 to start, bits 13:8 give the first instruction; read
  `{done, busy}`
* 1 = I-Mem: `[11:3]` instruction, `[2:0]` slice
* 2 = spike word
* 3 = integer double word

### Sparse processing (stack)

When `push_stack` is set, every spike-producing operator watches its outputs in
groups of four consecutive output bits. When a group closes (its last bit, or the
instruction's last output), the group address is pushed if any bit in it fired. At
the end of the instruction `0xFFFF` is pushed. A later `DENSE_S` with `use_stack`
walks that list for each output neuron. It reads only the listed groups and their
weight double words; the weight address is `src_i + r·n_len + (group − src_a/4)`.
Both the dense and the sparse walk give exactly the same result.

## Encoding and decoding slots

* `enc_slot` is a delta-modulation encoder for 16 channels. If a new sample exceeds
  the channel's reference by at least `thr`, it emits an UP spike (bit `2·ch`) and
  the reference rises by `thr`. If it falls short by at least `thr`, it emits a DOWN
  spike (bit `2·ch+1`) and the reference falls by `thr`. 16 channels give the 32
  input spikes of one time step.
* `dec_slot` evaluates spike rate. It counts each class neuron's spikes over the time
  steps and reports the arg-max (the lowest index wins a tie) with its count.

## Evaluated models and what fits

At its default sizes the design holds the published sEMG gesture model: 4 heads,
embedding 64, projection 16, 200 time steps, 32 input channels. Its K and V take
25,600 of the 32,768 spike bits. The neurons use 400 of the 768 potentials, the
weights and scores about 16 KB of the 64 KB integer memory, and a time step's program
26 of the 64 instructions. The stack configuration sized for it (38 Kb) fits the
40 Kb stack.

Two smaller published models fit as well:

* an sEMG model with 8 heads, embedding 32 and 150 time steps. Its heads have 4
  features, so four heads share each K and V row word;
* an EEG model with 1 head, embedding 8 and 24 time steps.

The Mul(spike,int) gather reads one 16-bit word per V row, so a head has at most 16
features.

`tb_model_step` runs one complete time step of each of the three models at full size.
The K and V history is random. The step runs the embedding, sparse Q/K/V projections,
Q·Kᵀ over the whole history, scores·V, residual sum, LIF and a sparse 16-class
classifier. The testbench compares every result with the reference model. Taking one
time step as one inference window, it also checks the step's time at 21 MHz against
the model's real-time constraint. Typical results, which vary with the random
activity:

| model | cycles per step | at 21 MHz | constraint |
|---|---|---|---|
| sEMG, 4 × 64 × 200 | 5,700 – 7,200 | 0.27 – 0.34 ms | 5 ms |
| sEMG, 8 × 32 × 150 | 3,600 – 3,900 | 0.17 – 0.19 ms | 0.5 ms |
| EEG, 1 × 8 × 24 | 690 – 770 | 0.03 ms | 3.91 ms |

The published run-time saving from sparsity (29% at 91% inactive neurons) depends on
trained weights. With random weights, the sparse layers save 15–30% of a step when
the embedding is about 90% silent. When most of a layer's groups are active, they
cost more than a dense walk.

## Where this RTL departs from, or adds to, the published design

* Taken from the published architecture:
  * the block set and the operator set;
  * the per-cycle rates;
  * 4 spike banks, 32 Kb spike memory, 2 integer banks, 16-bit paths;
  * the two multipliers, AND array, pop count and 20-bit accumulator;
  * 20-bit potentials for 768 neurons and int8 data;
  * the 169-bit instruction and groups of four for sparsity;
  * delta encoding, spike-rate decoding, and stand-by with a low-frequency wake-up
    timer.
* This design's own choices:
  * the instruction fields;
  * the loop structure, data layouts and gather port;
  * the stack list format;
  * the LIF leak, reset and saturation details;
  * the `CLRPOT` and `END` opcodes;
  * the host and bus maps and the I/D memory size (4 KB);
  * the instruction memory depth (64).
* Simplifications:
  * Each integer bank accepts a read and a write in the same cycle. The iCE40 SPRAM is
    single-ported, so a mapping onto SPRAM needs the Sum(spike,int) source and
    destination in different banks, or a stall.
  * Each spike bank has two read ports. On iCE40 block RAM that means duplicated
    banks.
* The published integer-memory limit is given both as "below 1 Mb" and as two
  SPRAMs. This RTL follows the two SPRAMs (512 Kb).
* Not included: the RISC-V control core, SPI, UART and the oscillator primitives.

## Files and simulation

`rtl/`: `estu_pkg` (types, microcode), `estu_spike_mem`, `estu_int_mem`,
`estu_stack`, `estu_imem`, `estu_interconnect`, `estu_pe`, `estu_lif`, `estu_ctrl`,
`estu_core`, `enc_slot`, `dec_slot`, `pwr_timer`, `id_mem`, `estu_soc` (top).

`tb/`: one `tb_<module>` per block. `estu_ref_pkg` is an operator-level reference
model shared by `tb_estu_core` and `tb_estu_soc`.

* `tb_estu_core` runs every operator, dense and sparse, against the reference model
  and checks each instruction's cycle count.
* `tb_model_step` runs one full-size time step of each benchmarked model on the
  engine, as described above.
* `tb_estu_soc` runs the whole system at its default sizes. The testbench plays the
  CPU, SPI, UART and oscillators and runs three inference windows of a small
  transformer. It compares every result, then goes through stand-by and wake-up.

Every testbench prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_estu_soc \
    rtl/estu_pkg.sv tb/estu_ref_pkg.sv tb/tb_estu_soc.sv -y rtl -o sim
./obj_dir/sim
```

For a block testbench, list `rtl/estu_pkg.sv`, the testbench and the module file
(for example `tb/tb_estu_lif.sv rtl/estu_lif.sv`). Every simulation finishes in
seconds.
