# Scratch-pad memory system with stream address generators and a loop unit

A streaming accelerator built from a cluster of VLIW function units has no
register file. Its operands come straight from several small, software-managed,
dual-ported SRAMs, and those need a lot of ports: about a third of the
instructions in stream kernels are loads and stores, and most of the remaining
arithmetic is spent computing their addresses. This memory system moves that
address arithmetic into hardware:

* a **loop unit** keeps the loop variables of up to four nested loops and
  advances them on its own, every *initiation interval* (II) cycles;
* every SRAM port has its own **stream address generator**. It turns a short
  "context" (array base, row and element size as shift amounts, and which loop
  variables to use) plus the current loop variables into an address every cycle;
* **array variable rotation** lets a modulo-scheduled loop keep one copy of
  each loop variable. An old in-flight iteration subtracts a small
  compensation from the variable instead of keeping a rotated copy in a
  register file.

The configuration built here has three SRAMs, Input (8 KB, double-buffered),
Scratch (8 KB) and Output (2 KB, double-buffered), with two ports each. That
makes six address generators with four contexts each, so 24 access patterns
are live at once.

```
                 loop counters (4 x 9 bit)
   loop_unit ─────────┬──────────────┬──────────────┐
                      │              │              │
                addr_gen x2     addr_gen x2    addr_gen x2       ports 0..5
                      │              │              │
                 Input SRAM     Scratch SRAM   Output SRAM
                (dbuf_sram)      (dp_sram)     (dbuf_sram)
                 host port ◄─ swap          swap ─► host port
```

## Instructions the memory system understands

| instruction | ports of `spm_system` | effect |
|---|---|---|
| `write_context idx, reg` | `wc_valid`, `wc_target` (0–5 generator, 6 loop unit), `wc_idx`, `wc_data[31:0]` | loads a 32-bit context word, in one cycle |
| `push_loop idx` | `lp_push`, `lp_push_idx` | enters a loop body; that loop's counter is loaded with its start count |
| pop (opcode) | `lp_pop` | leaves the innermost loop early |
| `load_context` / `store_context` on port *p* | `req_valid[p]`, `req_we[p]`, `req_ctx[p]`, `req_const[p]`, `req_comp[p]`, `alu_addr[p]`, `req_wdata[p]` | one access through generator *p* |

The immediate field of a load or store carries three things: the context
index, a 4-bit unroll constant and a 4-bit rotation compensation.

## The loop unit (`rtl/loop_unit.sv`)

Loop context word (32 bits, msb first):

| bits | 31 | 30:27 | 26:18 | 17:9 | 8:0 |
|---|---|---|---|---|---|
| field | `loop_type` | `ii` | `start_count` | `end_count` | `increment` |

There are four contexts, four 9-bit loop count registers (one per context), a
four-entry stack of context indices and one 4-bit II counter. The top of the
stack is the loop the program is in. The II counter runs 1..II while the stack
is non-empty. When it reaches II, that cycle is a *tick*:

* if the top loop's count equals its end count, the loop is finished. Its
  entry is popped (`loop_done`), and counting carries on for the enclosing
  loop with a fresh II period;
* otherwise the count advances by the increment.

So the loop variable takes the values start, start+inc, ..., end, each for II
cycles. **The end count is inclusive**: a C loop `i < N` is programmed with
end count N−1. Only the innermost loop advances. An enclosing loop is frozen
while an inner one runs. Its II therefore counts the cycles its body spends
outside the inner loop.

Other behaviours:

* A push onto a full stack sets `overflow` for one cycle and drops the
  outermost entry. Hardware keeps tracking the four innermost loops, and outer
  levels must be handled in software.
* A push and a pop in the same cycle replace the top entry.
* `loop_type = LOOP_ZERO` turns a context into the **always-zero counter**.
  Its exported count is 0 regardless of what is pushed. Address contexts
  select it for vectors (one loop variable) and for pure ALU addresses (no
  loop variable).
* An assertion requires II ≠ 0 for any loop on the stack.

## The stream address generator (`rtl/addr_gen.sv`)

Address context word (32 bits, base address at the lsb so software can add to
the packed word to move an array):

| bits | 31 | 30:29 | 28:27 | 26 | 25 | 24:21 | 20:17 | 16:13 | 12:0 |
|---|---|---|---|---|---|---|---|---|---|
| field | unused | `i_sel` | `j_sel` | `const_sel` | `alu_sel` | `mod_period` | `x` | `y` | `base` |

The generated address is

```
i' = loop_cnt[i_sel] - (mod_period != 0 ? comp : 0)        (9-bit wrap)
j' = const_sel ? opcode_const : loop_cnt[j_sel]
J  = alu_sel   ? alu_addr     : (j' << y)
address = base + ((i' << x) | J)                           (13-bit wrap)
```

With power-of-two row and element sizes, the row-major address
`Base + i*row_size + j*elem_size` becomes `Base + ((i << x) | (j << y))`. For
example, the `.imag` word of `A[i][j]`, where A has 16 two-word elements per
row, is `base = &A + 1`, `x = 5`, `y = 1`. Other access patterns:

* **Vector:** point the unused select at a zero-type loop context.
* **Unrolled loop:** the j term is the opcode's constant, so each unrolled
  copy of an access uses a different constant.
* **Indirect access, `A[B[i]]`:** an ALU supplies `B[i]` (possibly streamed
  from another generator) as `alu_addr` with `alu_sel`, and the generator adds
  the base.
* **Arrays with more than two dimensions:** software rewrites the base (the
  low bits of the context word) for the outer dimensions.

The base, the i term and the J term are registered when a request is
present. That register load is the block's clock enable. The OR and the add
come after the registers. The address therefore reaches the SRAM port one
cycle after the request.

### Array variable rotation

Take a modulo-scheduled loop that starts a new iteration every II cycles while
one iteration takes longer than II. The loop unit increments the single loop
variable every II cycles. An access that an older iteration issues *s*
periods after its start sees a variable that has already moved *s* times. The
compiler knows *s* for every instruction and puts the compensation in the
opcode's `comp` field, which is subtracted from the i variable. The context's
`mod_period` field only switches this on. Each array thus behaves as its own
rotating register file inside the SRAM, without a register file and without
extra copies of the loop variable. The end-to-end testbench uses exactly this:
a store issued two cycles after its loads (II 1) uses `comp = 2`. In the
loop's last cycles the loop variable stops at the end count, so the
compensation there is 1 and then 0.

## SRAMs (`rtl/dp_sram.sv`, `rtl/dbuf_sram.sv`)

`dp_sram` is a dual-ported array of 32-bit words with a one-cycle synchronous
read. The generated 13-bit address is a word address, reduced to the low
log2(depth) bits: 2048 words for 8 KB, 512 for 2 KB. In one cycle a port
either reads or writes. A read returns the old word if the other port writes
that word in the same cycle. If both ports write one word, port B wins.

`dbuf_sram` (the Input and Output SRAMs) has two banks of the stated size:

* the cluster's two ports see the active bank, and a host/DMA port sees the
  other;
* a one-cycle `swap` pulse exchanges the banks. `bank_sel` tells which bank is
  active;
* read data is steered by the bank select of the cycle the read was issued,
  so a read in the swap cycle still returns data from the bank it addressed.

A load issued in cycle *t* therefore returns data in cycle *t+2* (`rvalid`).
A store issued in cycle *t* is written at the end of cycle *t+1*. All six ports
can be busy every cycle.

## Files

| file | contents |
|---|---|
| `rtl/spm_pkg.sv` | sizes, `loop_ctx_t`, `addr_ctx_t`, `loop_type_e` |
| `rtl/loop_unit.sv` | loop unit |
| `rtl/addr_gen.sv` | stream address generator |
| `rtl/dp_sram.sv` | dual-ported SRAM |
| `rtl/dbuf_sram.sv` | double-buffered I/O SRAM |
| `rtl/spm_system.sv` | top: loop unit, 6 generators, 3 SRAMs |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus workload tests |

Top parameters: `IN_BYTES = 8192`, `SCR_BYTES = 8192`, `OUT_BYTES = 2048`,
`DATA_W = 32`. Loop and address field widths are package constants.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_spm_system \
    -y rtl -y tb +libext+.sv -Irtl rtl/spm_pkg.sv tb/tb_spm_system.sv
./obj_dir/Vtb_spm_system
```

* `tb_loop_unit` checks single loops (several II, increments), a two-level
  nest cycle by cycle, the zero counter, overflow and explicit pops.
* `tb_addr_gen` checks hand-worked addresses and 400 random requests against
  the formula above.
* `tb_dp_sram` and `tb_dbuf_sram` run random traffic against reference arrays
  and a host/cluster block exchange.
* `tb_spm_system` runs at the default sizes. It computes `B[i][j] = A[i][j] +
  S[j]` over two 4×8 blocks through both double buffers, with a loop nest,
  rotation, unroll constants, ALU addresses and the zero counter. It also
  checks the two-cycle load latency and counts each mechanism.
* `tb_fir_workload` runs a 32-tap FIR filter over 24 outputs. Software moves
  the x window by rewriting the context base once per output, and the tap
  loop must take exactly 32 cycles per output.
* `tb_fft_bitrev_workload` runs the bit-reversal phase of a 128-point complex
  FFT. It uses indirect access: one generator streams the index table, and the
  ALU address feeds two generators that apply the real and imaginary bases.
  The stores are rotated to make up for the four cycles the loop variable has
  moved on.

## How far this follows the published design, and where it departs

The following are as published:

* the three SRAMs and their sizes, one generator per SRAM port, four
  contexts per generator and four loop levels;
* the 9-bit loop counts, 4-bit II, shift amounts, modulo period and opcode
  constant, and 13-bit addresses;
* the data path of both units: select muxes, subtract, shifts, OR, pipeline
  registers before the final add, the start/next mux and the end-count
  compare.

The following are choices of this RTL, not published:

* The context word is 32 bits with the base at the lsb, as the design states.
  A 28-bit width quoted for the address context cannot hold the listed
  fields, so the 32-bit packing was kept. The loop and counter selects are
  2 bits, one per 4×1 mux input.
* The always-zero counter is a loop context of type `LOOP_ZERO`. The 1-bit
  `loop_type` field exists in the published loop context, but its encoding
  does not.
* The end count is inclusive. The II counter counts 1..II and restarts on
  push and pop. A full stack drops its oldest entry.
* The compensation comes from the opcode and applies only when the context's
  modulo period is non-zero. The published description places the modulo
  period in both the context and the immediate field.
* The following are all chosen here:
  * 32-bit SRAM words and word addressing;
  * one-cycle SRAM reads and the collision rules;
  * double buffering as two full banks with a host port and a swap pulse;
  * the `write_context` target numbering and port numbering;
  * reset values (everything zero, stack empty).
* Not built: the function units (ALUs, FPUs, multipliers), the cluster
  interconnect and bypass paths, the microcode memory and sequencer, and the
  host/DMA engine. Their side of the memory system is the port arrays of
  `spm_system`. SRAM power-down is also not modelled.

### Known limits

* The i term wraps if the compensation exceeds the loop variable. The
  compiler must avoid this.
* Loops longer than 511 counts, or nests deeper than four, need software.
* Arrays whose row size is not a power of two must be split into a
  power-of-two part and a residue, each with its own context.
