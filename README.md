# A minimal RISC-V "V" vector unit for a five-stage in-order core

This is a small vector unit (VPU) that sits next to a five-stage, in-order
RV64 core (Rocket-style), much like a floating-point unit does. It runs a
working subset of the RISC-V vector extension: enough to strip-mine the
two classic kernels, element-wise vector add and integer dot product.

- **Core attachment.** The core passes each instruction to the unit,
  together with the two scalar operands it read in decode. The unit runs
  the vector instructions itself. It returns one scalar result (the new
  `vl` of `vsetvli`) to the core's writeback. It raises `stall_pipeline`
  until it has finished, so the core's in-order pipeline just waits.
- **Memory.** Vector loads and stores go to the L1 data cache through a
  request port of the unit's own. An arbiter shares the cache between this
  port and the core's. The cache's response bus is shared, and each side
  picks out its own responses by tag.

The base design is a proof of concept: a vector unit for the Rocket core,
written in Chisel. The SystemVerilog here follows its structure, its
interface and its instruction set. Where the base design is silent, this
RTL makes its own choices, and some of its reported weaknesses are left
out on purpose. Both are listed under
[Where this RTL departs from the base design](#where-this-rtl-departs-from-the-base-design).

## What the unit executes

| instruction | effect |
|---|---|
| `vsetvli rd, rs1, eSEW, ta, ma` | sets SEW ∈ {8, 16, 32, 64} and `vl = min(AVL, VLEN/SEW)`; `rd ← vl` |
| `vle{8,16,32,64}.v vd, (rs1)` | unit-stride load of `vl` elements. The element width comes from the instruction, not from `vtype` |
| `vse{8,16,32,64}.v vs3, (rs1)` | unit-stride store of `vl` elements |
| `vadd.vv vd, vs2, vs1` | `vd[i] = vs2[i] + vs1[i]` mod 2^SEW, for i < vl |
| `vmul.vv vd, vs2, vs1` | `vd[i] = low SEW bits of vs2[i] · vs1[i]` |
| `vredsum.vs vd, vs2, vs1` | `vd[0] = vs1[0] + Σ_{i<vl} vs2[i]` mod 2^SEW |

The encodings are those of RVV 1.0.

**The `vl` rule.** `AVL` is the value of `rs1`. If `rs1 = x0` and
`rd ≠ x0`, AVL is infinite, which gives `vl = VLMAX`. If both are `x0`,
the current `vl` is kept.

**Registers and elements.** There are 32 registers of `VLEN` bits, with a
default of 128. At VLEN = 128 a register holds 2×64, 4×32, 8×16 or 16×8
elements. Only LMUL = 1 is supported. Any other `vtype` (LMUL ≠ 1,
SEW > 64, reserved bits set) sets `vill` and gives `vl = 0`.

**Tail elements.** Elements at and above `vl` are left unchanged. This is
one of the legal behaviours for the tail-agnostic (`ta`) policy the
kernels ask for.

**What counts as illegal.** The unit raises `inst_illegal` in decode and
does not run the instruction in these cases:

- any other vector-space encoding: other OP-V operations, masked forms
  (`vm = 0`), strided, indexed or segment accesses, or `vsetvl`;
- any instruction except `vsetvli` while `vill` is set;
- a `vle`/`vse` whose EEW is larger than SEW, since that would need
  register groups.

Scalar FP loads and stores share the LOAD-FP/STORE-FP opcodes with vector
memory instructions. The unit ignores them.

The kernels it is meant for (the scalar lines run on the core):

```
vvadd:   vsetvli t0,a0,e32 ; vle32 v0,(a1) ; sub a0,a0,t0 ; slli t0,t0,2 ; add a1,a1,t0
         vle32 v1,(a2) ; add a2,a2,t0 ; vadd.vv v2,v0,v1 ; vse32 v2,(a3) ; add a3,a3,t0 ; bnez a0
dotprod: vsetvli ; vle v0 ; (3 scalar) ; vle v1 ; add ; vmul.vv v2,v0,v1 ; vredsum.vs v3,v2,v3 ; bnez
         ... then vse v3,(a3) once
```

## How an instruction moves through the unit

The unit runs one instruction at a time, in the core's stage names:

| stage | cycles | what happens |
|---|---|---|
| D | 1 | decode. The instruction is accepted if it is supported, `inst_valid` is high and `killd` is low. `rs1` is captured |
| X | 1 | `killx` squashes the instruction |
| M | 1 | `killm` squashes it. If not killed: `vadd.vv` computes its sum, and vmul, vredsum or a load/store starts its unit |
| E | unit latency | wait for the multiplier, the reduction unit or the load/store unit |
| W | 1 | commit: write the vector register or `vl`/`vtype`; pulse `wb_valid` with `wb_data = vl` for `vsetvli` |

Nothing architectural changes before M has passed, so a kill in D, X or M
leaves no trace.

`stall_pipeline` is high from the cycle after acceptance to W, inclusive.
With acceptance in cycle t, it stays high for these numbers of cycles:

| instruction | cycles of `stall_pipeline` |
|---|---|
| `vsetvli`, `vadd.vv` | 3 |
| `vmul.vv` | VLEN/64 + 4 (6 at VLEN = 128) |
| `vredsum.vs` | vl + 5 |
| `vle`/`vse` | 7 + the number of doublewords touched, with a 2-cycle cache that is always ready |
| killed in X / in M | 1 / 2 |

The core must hold its next instruction while the stall is high. It sees
the stall in the cycle after acceptance, and the unit accepts nothing then
either. Because issue is serial, a load followed by an instruction that
reads the loaded register needs no bubble.

## The memory path

A unit-stride access of `vl` elements of EEW bits covers
`len = vl·EEW/8` bytes, starting at `base = rs1`. `vpu_lsu` walks the
aligned 64-bit doublewords that cover `[base, base+len)`:

- **One request per doubleword.** Each doubleword is one "beat" and one
  request, always of size 3 (8 bytes). So a single request carries eight
  8-bit elements, or four 16-bit ones, and so on.
- **Byte placement.** Byte `j` of beat `k` is vector byte
  `8k + j − (base mod 8)`. Bases that are not 8-aligned therefore work:
  the access simply touches one more doubleword.
- **Stores.** A store sends the byte mask of the data-cache interface, so
  only bytes inside the vector are written.
- **Back to back.** Requests use valid/ready and are issued back to back.
  All beats may be in flight at once.

**Tags.** The tag's low `PORT_BITS` bits hold the port number. The client
leaves them zero and the arbiter fills them in. The bits above hold the
beat number. Because of this:

- responses may come back in any order;
- the unit ignores responses on the shared bus that carry another port's
  number.

**Completion.** A store is complete when its acknowledgement (a response
with `has_data = 0`) returns. The instruction finishes one cycle after its
last response.

**The arbiter.** `dcache_arbiter` has fixed priority, with port 0 (the
core) first. It has no latency of its own, and it puts the granted port's
number into the tag. Assertions check that each client holds its request
unchanged until it is accepted.

## Units

- `vpu_vregfile`: 32 × VLEN flops, reset to zero. It has three
  asynchronous read ports (vs1, vs2, vd/vs3) and one write port with a
  byte enable for each byte of the register.
- `vpu_valu`: adds the whole register width in one cycle. It is built from
  byte slices whose carry is cut at each element boundary, so one carry
  chain serves all four widths.
- `vpu_vmul`: a single partitioned 64-bit multiplier that handles one
  64-bit chunk per cycle. Depending on SEW, that chunk is 8×(8×8),
  4×(16×16), 2×(32×32) or 1×(64×64), low halves kept.
- `vpu_vredsum`: a serial accumulator that adds one element per cycle.
- `vpu_vconfig`: the `vl`/`vtype` state and the `vsetvli` arithmetic.
- `vpu_decoder`: combinational decode into the `vdec_t` struct.
- `vpu_pkg`: the widths, encodings, enums and the cache request and
  response structs (`dc_req_t`, `dc_resp_t`).

## Top level and interface

`rocket_vpu_top` (parameter `VLEN`, default 128) contains `vpu` and a
two-port `dcache_arbiter`. The scalar core and the L1 cache are not part
of the RTL. These are its ports:

- **Core to vector unit:** `inst_valid`, `inst[31:0]`, `op1_data`,
  `op2_data` (64 bits each), `killd`, `killx`, `killm`.
- **Vector unit to core:** `wb_valid`, `wb_data[63:0]`, `stall_pipeline`,
  `inst_illegal`.
- **To the core's CSR file:** `set_vconfig_valid`, `set_vconfig_vl`,
  `set_vconfig_vtype`, `set_vs_dirty`. These report every change of
  `vl`/`vtype` and every write of vector state.
- **Core's own cache port:** `core_req_valid`, `core_req_ready`,
  `core_req`. The shared response reaches the core as `core_resp_valid`
  and `core_resp`.
- **To the L1 cache:** `dc_req_valid`, `dc_req_ready`, `dc_req`,
  `dc_resp_valid`, `dc_resp`.

`dc_req_t` holds `addr[39:0]`, `tag[7:0]`, `cmd[4:0]` (0 = read,
1 = write), `size[1:0]`, `signed_`, `data[63:0]` and `mask[7:0]`.
`dc_resp_t` holds `addr`, `tag`, `cmd`, `size`, `has_data` and `data[63:0]`.

Reset is synchronous and active high. `op2_data` is not used by the
supported instructions.

## Simulating

Every testbench is self-checking. It ends by printing
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/vpu_pkg.sv tb/tb_rvv_pkg.sv tb/tb_rocket_vpu_top.sv --top-module tb_rocket_vpu_top
./obj_dir/Vtb_rocket_vpu_top
```

The lint warnings verilator prints are all about unused package
constants and unused bits of the shared structs.

| testbench | what it checks |
|---|---|
| `tb_rocket_vpu_top` | The full design at its default size. It plays the core and issues 1500 random vector instructions, with kills in D, X and M, while the core port issues its own loads. The cache model refuses requests at random and answers out of order. A reference model checks every `vl`, every store, the illegal flag, the fixed stall lengths, the core's load data, and all 32 registers at the end. Each mechanism (stall, the three kills, illegal, vill, ignored scalar FP, shared port, refusals, out-of-order responses, preserved tails, unaligned bases) is counted and must occur |
| `tb_vpu` | The same, for the unit alone |
| `tb_workloads` | The two kernels at VLEN 128, 256 and 512, 32-bit elements, n = 8…128, and at VLEN 128 with 64-bit elements. It checks results, instruction counts and cycle counts |
| `tb_vpu_lsu` | Random loads and stores of every width, vl and base. It checks the bytes, untouched neighbours, one request per doubleword, and that foreign responses are ignored |
| `tb_vpu_decoder`, `tb_vpu_vconfig`, `tb_vpu_vregfile`, `tb_vpu_valu`, `tb_vpu_vmul`, `tb_vpu_vredsum`, `tb_dcache_arbiter` | Each unit against an independent model, with latencies where they are fixed |

`tb/l1_dcache_model.sv` is a behavioural cache: a sparse memory with a
configurable latency range and ready probability, plus `poke`/`peek` for
backdoor access. `tb/workload_runner.sv` holds the kernel drivers.

### Kernel results (tb_workloads)

The instruction counts are those of the strip-mined loops: 11 per pass
for vvadd, and 10 per pass plus one final store for the dot product.

| kernel, SEW | n | VLEN 128 | VLEN 256 | VLEN 512 |
|---|---|---|---|---|
| vvadd, e32 | 8 / 16 / 32 / 64 / 128 | 22 / 44 / 88 / 176 / 352 | 11 / 22 / 44 / 88 / 176 | 11 / 11 / 22 / 44 / 88 |
| dot product, e32 | 8 / 16 / 32 / 64 / 128 | 21 / 41 / 81 / 161 / 321 | 11 / 21 / 41 / 81 / 161 | 11 / 11 / 21 / 41 / 81 |

These are the counts the base design predicts. The counts stop shrinking
once a whole vector fits in one register.

`tb_workloads` also checks the cycle count of every kernel run. The
expected count is built from the unit's timing, with the model cache
(2-cycle latency, always ready) and one cycle charged to each scalar
instruction:

| instruction | cycles |
|---|---|
| `vsetvli`, `vadd.vv` | 4 |
| `vmul.vv` | VLEN/64 + 5 |
| `vredsum.vs` | vl + 6 |
| `vle`/`vse` | 8 + the number of doublewords touched |

Kernel cycles at VLEN 128 with 64-bit elements:

| kernel | n = 8 | n = 16 |
|---|---|---|
| vvadd | 176 | 352 |
| dot product | 186 | 362 |

These are kernel-only counts on a model memory. They cannot be compared
with whole-program cycle counts measured on a real core.

## Where this RTL departs from the base design

- **Serial issue.** The base implementation reports two problems: a data
  hazard between a vector load and the next vector instruction, which
  needed a `nop` in software, and an interlock problem that cost four
  extra cycles per memory instruction. Neither is reproduced. Issue here
  is strictly one instruction at a time, and memory beats are pipelined.
- **Handshake with the core.** `inst_valid` is added. The unit accepts an
  instruction in the core's decode stage, together with its operands.
  Apart from that the interface matches the base design's core bundle.
- **Kills.** The timing of `killd`, `killx` and `killm` is this design's
  choice. The base design has the signals but does not describe them.
- **Vector CSRs.** `vstart`, `vxrm` and `vxsat` are not implemented, as
  in the base design, whose CSR connections have no behaviour. `vl` and
  `vtype` live inside the unit and are reported through `set_vconfig_*`.
- **Not supported:** masking, LMUL ≠ 1, strided, indexed and segment
  accesses, and all vector instructions beyond the six above.
- **Assumed cache behaviour.** The cache is assumed never to nack or
  replay an accepted request. Every vector access uses 8-byte requests
  with a byte mask.
- **Widths chosen here.** The base design leaves the tag width (8), the
  address width (40), the arbiter priority and the element-per-cycle
  structure of the multiplier and the reduction unit open.
