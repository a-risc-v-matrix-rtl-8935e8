# RISC-V CPU with a 4x4 fixed-point systolic-array matrix coprocessor

Neural-network inference mostly comes down to matrix products. This design pairs a
small five-stage RISC-V (RV32I subset) CPU with a coprocessor that multiplies 4x4
matrices on a 4x4 systolic array of multiply-accumulate cells. The CPU runs the loops
and address arithmetic; five custom instructions move 4x4 tiles between a vector data
memory and a bank of 128 vector registers, add them, apply ReLU, and multiply them.
Numbers are 16-bit sign-magnitude fixed point, not integers or floats, to keep
fractional precision at low cost.

The reference workload is a two-layer MNIST classifier (784 inputs, 16 hidden nodes with
ReLU, 10 outputs). Its weights, biases and input images sit in lookup-table regions of the
vector data memory.

## Number format (Q5.10, sign-magnitude)

| bit 15 | bits 14:10 | bits 9:0 |
|---|---|---|
| sign (1 = negative) | integer part | fraction |

The range is about ±32 and the resolution 1/1024. Example: `0x8556` is -1.334.

* **Multiply** (`fixp_mul`). The two 15-bit magnitudes give a 30-bit product. Bits 24:10
  are the result. The 10 bits below are dropped, which truncates towards zero. Bits 29:25
  are the overflow. They are dropped too, so the result wraps, and they raise `ovf`. The
  sign is the XOR of the operand signs.
* **Add** (`fixp_add`). With equal signs the magnitudes are added. With different signs
  the smaller magnitude is subtracted from the larger, and the larger operand gives the
  sign. A carry out of bit 14 wraps and raises `ovf`.
* A zero result is always +0. ReLU is a sign-bit test.

Nothing saturates. Software has to keep values inside ±32. The overflow flags are brought
out of the units but are not collected anywhere.

## Vector registers and instructions

The coprocessor has 128 registers of 64 bits, each holding four numbers. Lane 0 is in bits
63:48. Instructions name a *group* of four registers, `g` = 0..31, and group `g` is
registers `4g .. 4g+3`. A group holds a 4x4 matrix with one row per register. Every
instruction works on the four rows on four consecutive cycles.

| instr | bits 31:25 | 24:20 | 19:15 | 14:12 | 11:7 | 6:0 | operation |
|---|---|---|---|---|---|---|---|
| VFIXADD  | 0000000 | vs2 | vs1 | 000 | vd | 1111000 | vd = vs1 + vs2 (lane-wise) |
| VFIXMULT | 0000000 | vs2 | vs1 | 000 | vd | 1111001 | vd = vs1 × vs2 (4x4 matrix product) |
| VFIXLOAD | stride[11:0] | | base (x-reg) | 000 | vd | 1111010 | row r = mem[base + 8·r·stride] |
| VFIXSTOR | stride[11:0] | | base (x-reg) | 000 | vs | 1111011 | mem[base + 8·r·stride] = row r |
| VFIXRELU | – | – | vs1 | 000 | vd | 1111100 | vd = ReLU(vs1) |

* `base` is the value of the scalar register and is a byte address.
* `stride` is unsigned and counts 64-bit words. To take a 4x4 tile out of a row-major
  matrix that is N numbers wide, use stride = N/4.
* Example: in an 8x8 row-major array at byte address `a`, the four 4x4 tiles start at
  `a`, `a+8`, `a+64` and `a+72`. All of them use stride 2.
* Stride 0 loads the same row four times, which broadcasts a bias row over a tile.

## The systolic array (`systolic_array`, `systolic_cell`)

Each cell latches A, B, start and stop every cycle and multiplies the latched A and B:

* if start is set, the product is loaded into the accumulator;
* otherwise the product is added to the accumulator;
* if stop is set, the accumulator value including this cycle's product is copied to the
  result register, which then holds until the next stop.

A, start and stop move one cell to the right per cycle, and B moves one cell down.

The feeders make the operands meet in the right cell:

```
  cycle r: row r of A  ──► abuf abuf abuf ─► cell(r,0) ─► cell(r,1) ─► …
           row r of B  ──► column j through j bbufs (0,1,2,3) ─► cell(0,j) ─▼
```

* **A side.** On cycle r, row r of A is loaded in parallel into row r's three `abuf`
  registers. Element 0 goes into cell (r,0) at once and carries start. Elements 1..3
  follow on the next three cycles, and element 3 carries stop. Because row r is loaded on
  cycle r, the rows come out staggered with no further delay.
* **B side.** Row r of B enters all columns on cycle r. Column j delays it through j
  `bbuf` registers.
* **Meeting point.** A[i][k] reaches cell (i,j) on cycle i+k+j+1, and so does B[k][j].
  Cell (i,j) therefore accumulates Σₖ A[i][k]·B[k][j].
* **Output.** The last cell of row i finishes on cycle i+7. One cycle later all four
  result registers of row i hold the result, and `c_valid`/`c_row`/`c_vec` present that
  row. Row i of C thus leaves **8 cycles** after row i of the operands went in.
* **Pipelining.** A new product can enter every 4 cycles. No result register is
  overwritten before it has been read, so up to three products are in flight.

## Issue unit (`array_unit`)

```
CPU ─► instr_buffer ─► control ─► vreg_file ─┬─► vec_adder ─────┐
        (full ⇒ CPU stall)         ▲         ├─► systolic_array ┼─► write-back mux
                                   │         ├─► vec_relu ──────┤
                                   │         └─► vec_dcache ────┘
                                   └──────────────────────────────┘
```

The control takes one instruction at a time and spends four cycles on it, row r on cycle r.
On each cycle it reads rows of `vs1`/`vs2` through two asynchronous read ports and works on
them:

* The adder, ReLU and memory results are combinational, so they are written back in the
  same cycle.
* A multiply sends its rows into the array. Its results arrive 8 cycles later.
* The next instruction can start on the cycle after the previous one's fourth row.

The write-back of a multiply happens while later instructions run. This is the subtle part
of the unit. An 8-stage delay line runs beside the array and carries each row's destination
register. A scoreboard over that delay line follows two rules:

* A **VFIXMULT** may start while other products are in flight, unless it reads a group that
  one of them has yet to write. Back-to-back independent multiplies therefore overlap.
* **Any other instruction** waits until every product has been written. This keeps the
  single write port free of conflicts and orders loads, stores and adds after the
  products they depend on.

Two assertions guard these rules. One checks that unit and array write-backs never
coincide. The other checks that the array delivers rows exactly when the delay line
expects them.

Latency of a lone VFIXMULT, from the cycle it enters the buffer until `busy` falls, is
13 cycles: 1 in the buffer, 4 issue cycles and 8 in the array.

## Vector data memory (`vec_dcache`)

The vector data memory is an array of 64-bit words addressed by byte address bits 15:3.
Reads are asynchronous. It has this map:

| region | addresses | vector unit access | holds |
|---|---|---|---|
| weights1 | 0x0000–0x61ff | read | 784×16 layer-1 weights |
| weights2 | 0x6200–0x637f | read | 16×12 layer-2 weights (10 columns + 2 zero) |
| bias1 | 0x6380–0x639f | read | 16 biases as a 4×4 tile |
| bias2 | 0x63a0–0x63bf | read | 12 biases (10 + 2 zero) |
| imagearr | 0x8000–0x9fff | read | input images |
| usermem | 0xa000–0xbfff | read/write | intermediate results |

The first five regions are lookup tables. A VFIXSTOR into them is dropped and
`ev_store_err` pulses. They are filled through the preload port (`vpl_*` on the top), which
stands in for contents that an FPGA build would fix at synthesis time. Reads of unmapped
addresses return 0. A debug port (`vdbg_*`) reads any word.

## CPU (`rv_core`)

The CPU is a classic five-stage pipeline: fetch, decode/register read, execute, memory
and write-back. It uses asynchronous instruction and data memories (`rv_icache`,
`rv_dmem`, 1024 words each).

* **Instructions.** LUI, AUIPC, JAL, JALR, BEQ/BNE/BLT/BGE/BLTU/BGEU, LW, SW, and all
  register-immediate and register-register ALU operations. There are no byte or halfword
  memory accesses. FENCE, ECALL, EBREAK and unknown opcodes retire as no-ops.
* **Hazards.**
  * Operands are forwarded from the memory and write-back stages, and the register file
    writes through.
  * A load followed by a use of its result stalls one cycle.
  * Branches and jumps resolve in execute and flush two instructions.
* **Vector dispatch.** The five custom opcodes are recognised in decode. In execute, the
  instruction and its forwarded base register leave for the issue unit, and nothing is
  written back. If the issue unit's buffer (4 entries) is full, fetch, decode and execute
  hold.

The CPU does not wait for vector work otherwise. To know when a program is finished,
software or a testbench watches `vec_busy`.

## Top level (`rv_matmul_top`)

The top holds the CPU, both memories and the issue unit. Its ports are:

* the program load port (`im_*`; load it while `rst_n` is low, and execution starts at
  address 0);
* the table preload port (`vpl_*`);
* debug reads of both data memories;
* `pc` and `vec_busy`;
* seven one-cycle event outputs: buffer-full stall, load-use stall, flush, forwarding,
  overlapped multiply, scoreboard wait and dropped store.

Its parameters are `IMEM_WORDS`, `DMEM_WORDS`, `IBUF_DEPTH` and `VADDR_W`.

## How far it follows the original design

**Taken from the original:**

* the number format and its multiply and add rules;
* the cell's registers and start/stop behaviour;
* the 4x4 array with three abufs per row and 0–3 bbufs per column;
* the 8-cycle result delay and pipelined products;
* 128×64-bit registers in groups of four;
* the five instructions and their encodings;
* base + stride·r memory accesses;
* the instruction buffer that stalls the CPU;
* the units and multiplexer of the issue unit;
* the data memory map;
* the five-stage CPU and its dispatch point.

**Choices made here:**

* **Array details.**
  * A cell's result includes the product of the cycle on which stop arrives.
  * Start and stop travel with A.
  * Element 0 of a row enters the array first.
* **Issue unit.**
  * The stride counts 64-bit words.
  * The scoreboard rules above.
  * The buffer depth of 4.
* **Arithmetic.** Overflow wraps rather than saturating.
* **Memories.**
  * All memories read asynchronously.
  * A scalar data memory separate from the vector memory.
  * The preload and debug ports.
* **CPU.**
  * Forwarding, stall and flush.
  * The exact RV32I subset.
* **Reset.** Synchronous, active-low reset everywhere.

**Known limits:**

* The table contents (trained weights, images) are not part of the hardware. The
  testbenches fill them with random data.
* bias1 holds one 4-wide row per output tile, broadcast with a stride-0 load. How the
  original laid biases out inside a tile is not known.

## Simulating

Every file in `rtl/` is one module or package. Packages `fixp_pkg` and `rv_pkg` must come
first. Testbenches in `tb/` print `TB_RESULT checks=N failures=M` and finish. The CPU
testbenches use `tb/rv_asm_pkg.sv` for instruction encoders and the integer reference
arithmetic. Example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/fixp_pkg.sv rtl/rv_pkg.sv tb/rv_asm_pkg.sv tb/tb_rv_matmul_top.sv \
  --top-module tb_rv_matmul_top
./obj_dir/Vtb_rv_matmul_top
```

| testbench | what it runs |
|---|---|
| `tb_fixp_mul`, `tb_fixp_add`, `tb_vec_adder`, `tb_vec_relu` | arithmetic against signed-integer references, overflow flags |
| `tb_systolic_cell` | framed sequences, result hold, forwarding delays |
| `tb_systolic_array` | 12 random products, isolated and back to back; exact 8-cycle row latency |
| `tb_vreg_file`, `tb_instr_buffer`, `tb_vec_dcache` | storage, FIFO order and full/empty, region protection |
| `tb_array_unit` | load/mul/add/relu/store program, overlap and scoreboard, 13-cycle multiply latency |
| `tb_rv_alu`, `tb_rv_regfile`, `tb_rv_icache`, `tb_rv_dmem` | CPU parts against models |
| `tb_rv_core` | a program with loops, jumps, load-use and vector dispatch under a held-full buffer |
| `tb_rv_matmul_top` | whole design at default sizes: a tiled ReLU(XW+b) layer (4×16 · 16×8); every mechanism must occur |
| `tb_mnist_inference` | the full 784-16-10 network on four random inputs with the memory map above |

The full MNIST network takes **16,009 cycles** for a batch of four inputs, with the
straightforward tiled program in `tb_mnist_inference`. Most of that time goes to the
rule that adds wait for the array to drain. The program is only a starting point for
tuning, for example by interleaving more independent products before each add.
