# ASC: an associative SIMD co-processor in SystemVerilog

ASC (ASsociative Computing) is a SIMD machine built for content-addressed work on tables. Each processing element (PE) stores one record in its own local memory. A single control unit broadcasts a search key, and every PE compares it against its record in the same cycle. The PEs that match become **responders**. Later instructions work on the responders in one of three ways:

- all at once, through *masked* instructions;
- one at a time, in PE order (STEP, FIND, RESOLVE_FIRST);
- through a reduction such as the maximum or minimum of a field.

All three take time independent of the number of PEs. A nearest-neighbour network (1-D chain or 2-D grid) adds the data movement that image processing needs.

This RTL implements the byte-serial ASC processor as it was published: one instruction stream, 8-bit PEs and 36 PEs by default. The default array doubles as a 6 x 6 pixel grid. The published description gives the architecture: which registers exist, how search, responder resolution, the Falkoff max/min search and the network work, and the widths. It does not give an instruction encoding, memory sizes or cycle timing. Those parts are choices made here; each is listed in [Where this design fills in or departs](#where-this-design-fills-in-or-departs).

## Structure

```
              +-------------------------------+        host ports
   imem/dmem  |  control_unit                 |<------ imem_*, dmem_*, start/done
   ---------->|  fetch/decode, 16 x 8b regs,  |
              |  8b ALU, data memory          |
              +--+------------+------------+--+
                 | pe_ctrl    | CR r/w     | net ctrl
                 | (broadcast)v            v
                 |       common_regs   pe_network (NWIN -> route -> NWOUT, 8N bits each)
                 v        16 x 8b          ^ |
              +-------------------------+  | |
              | pe_array                |--+ |
              |  pe[0..N-1] + local mem |<---+
              |  responder_resolution   |----> any_rsp, data bus (to control unit)
              +-------------------------+<---- pe_mem_* host port
```

| module | role |
|---|---|
| `asc_pkg` | widths, opcodes, broadcast-action struct `pe_ctrl_t`, compare/logic functions, instruction encoders `enc()` / `enc_br()` |
| `asc_top` | wires everything together; host interface |
| `control_unit` | instruction memory, data memory, scalar registers and ALU, sequencing of multi-cycle instructions |
| `common_regs` | 16 8-bit registers shared by the control unit and all PEs (one broadcast read port) |
| `pe_array` | N PEs, the responder resolution unit and the OR-reduced data bus |
| `pe` | one PE: 16 x 8-bit registers, ALU, 16 x 1-bit logical registers, responder bit, mask stack, SFR unit, Falkoff shift register, local memory |
| `mask_stack` | 16-entry 1-bit stack; its top enables masked instructions |
| `sfr_unit` | STEP / FIND / RESOLVE_FIRST next-state logic of one PE |
| `maxmin_unit` | one PE's Falkoff shift register |
| `responder_resolution` | "is there a responder with a lower ID?" for every PE, and "is there any responder?" |
| `pe_network` | 1-D / 2-D one-step moves with optional wrap-around |
| `asc_alu` | 8-bit ALU used in the control unit and in each PE |

Parameters of `asc_top` (all have working defaults):

| parameter | default | meaning |
|---|---|---|
| `N_PE` | 36 | number of PEs (the published prototype size) |
| `COLS` | 6 | PEs per row of the 2-D grid; `N_PE` must be a multiple |
| `LM_DEPTH` | 256 | bytes of local memory per PE (chosen here) |
| `STACK_DEPTH` | 16 | mask-stack entries (published) |
| `IMEM_DEPTH` | 1024 | 32-bit instruction words (chosen here; 10-bit PC) |
| `DMEM_DEPTH` | 256 | bytes of control-unit data memory (chosen here) |

## The responder model: responder bit and mask stack

This part is the core of the machine and the easiest to get wrong when writing programs.

Each PE has two 1-bit pieces of state:

* **Responder bit (RSP).** It records "this PE matched the last search". The responder resolution unit looks only at RSP bits, so it drives STEP/FIND/RESOLVE_FIRST and the `BR_RSP`/`BR_NRSP` branches.
* **Mask stack top (TOP).** It decides whether the PE executes a *masked* instruction (`m` bit = 1). An unmasked instruction runs in every PE. After reset every stack entry is 1, so all PEs are enabled.

An associative search (`OP_SRCH`: compare `P[a]` against a register, a common register or an immediate; or `OP_SRCHL`: take a logical register) computes r in every PE. It then writes r into RSP and **pushes** r onto the mask stack. Every PE pushes, including those that fail (they push 0), so all stacks stay the same depth. If the search is itself masked, r is ANDed with the current TOP first. Nested searches therefore narrow the set, and one `OP_POP` per search returns to the enclosing set.

The stack holds 16 entries. A 17th push drops the bottom entry and pulses `stack_ovf`; a pop fills the bottom with 1.

`OP_MSET` overwrites TOP from a logical register without pushing. `OP_PUSH` pushes a logical register, or a constant 1 when `x[0]` is set. `OP_LGET` copies RSP or TOP into a logical register. That lets a program save the set of remaining responders across an unrelated search. The database programs in `tb/tb_asc_database.sv` use it to STEP through one relation while searching another.

### STEP, FIND, RESOLVE_FIRST

The responder resolution unit gives each PE `lower` = "some PE with a smaller ID has RSP = 1". The **selected** PE is the responder with `lower = 0`, i.e. the lowest-numbered responder.

| instruction | selected PE | other responders | non-responders |
|---|---|---|---|
| STEP | TOP = 1, RSP = 0 | TOP = 0, RSP kept | TOP = 0 |
| FIND | TOP = 1, RSP kept | TOP = 0, RSP kept | TOP = 0 |
| RESOLVE_FIRST | TOP = 1, RSP = 0 | TOP = 0, RSP = 0 | TOP = 0 |

A for-each loop over responders is therefore:

```
loop: BR_NRSP exit      ; no responder left
      SFR STEP          ; exactly one PE now has TOP = 1
      GETCR CRk, P[a]   ; read that PE's field over the data bus
      ...               ; masked work on it
      JMP loop
```

The same instruction also loads the control unit's R15 with the ID of the selected PE.

`OP_GETCR` writes into a common register the OR, over all PEs with TOP = 1, of their register `P[a]`. After STEP, FIND or RESOLVE_FIRST exactly one PE qualifies, so this reads the selected PE's value. PE register 15 always reads as the PE's own ID, so `GETCR CRk, P15` returns the selected PE's ID.

### MAX and MIN (Falkoff's algorithm)

`OP_MAXMN` (f[0] = 0 for MAX, 1 for MIN) takes **9 cycles**:

1. Copy `P[a]` into every PE's shift register, and set RSP = TOP.
2. Eight cycles follow, from bit 7 down to bit 0. Each PE presents `cand = bit AND TOP` to the responder resolution unit (the bit is inverted for MIN). If any PE presents 1, every PE sets RSP = TOP = cand. If none does, nothing changes.

The candidates are the PEs whose TOP is 1 at the start. Push a constant 1 first to search all PEs, or start from a search to find the maximum within a set. After the instruction, exactly the PEs holding the extreme value have TOP = RSP = 1. FIND then selects one of them.

For fields wider than a byte, run MAX on the most significant byte, then on the next byte without popping. The surviving candidates carry over.

Arithmetic on wider fields is byte-serial as well. There is no carry flag. A program adds the low bytes, finds the carry by comparing the sum with one addend (`PCMP LTU` into a logical register), then adds the high bytes. A search on that logical register followed by a masked `+1` applies the carry. `tb_asc_top` does this for a 16-bit add in every PE.

## Network

Each PE's outgoing byte is `P[a]`. `OP_MOVE` takes **3 cycles**:

1. Latch every PE's byte into NWIN, an 8N-bit register. PE j uses bits 8j..8j+7.
2. Write the routed NWIN into NWOUT.
3. Every enabled PE (masked or not, as for any instruction) writes its NWOUT slot into `P[d]`.

| f (direction) | 1-D (`x[1]` = 0) | 2-D (`x[1]` = 1), PE j at row j/COLS, column j%COLS |
|---|---|---|
| DOWN (0) | PE j receives from PE j-1 | from the PE one row above |
| UP (1) | from PE j+1 | from the PE one row below |
| RIGHT (2) | same as DOWN | from the left neighbour in the row |
| LEFT (3) | same as UP | from the right neighbour in the row |

With `x[0]` = 1 (wrap), data leaving an edge re-enters at the opposite edge: of the same row or column in 2-D, of the whole array in 1-D. Without wrap, the PEs on the receiving edge get 0. The 2-D edge-detection program uses this to find border pixels: it moves a constant 1 in all four directions, and a PE that receives 1 four times is interior.

## Instruction set

32-bit words; fields `[31:26] op | [25] m | [24:21] d | [20:17] a | [16:13] b | [12:10] f | [9:8] x | [7:0] imm`. Branches use `[9:0]` as an absolute target. Where an instruction takes a second operand, `x` selects its source: 0 = register `b`, 1 = common register `CR[b]`, 2 = immediate. `R` are control-unit registers, `P` PE registers, `L` PE logical registers, `LM` PE local memory, `DM` control-unit data memory.

| op | action | cycles |
|---|---|---|
| `NOP`, `HALT` | HALT stops and raises `done` | 1 |
| `LDI` | R[d] = imm | 1 |
| `ALU` | R[d] = R[a] f src | 1 |
| `LD` / `ST` | R[d] = DM[R[a]+imm] / DM[R[a]+imm] = R[b] | 1 |
| `WCR` / `RCR` | CR[d] = R[a] / R[d] = CR[a] | 1 |
| `GETCR` | CR[d] = OR of P[a] over PEs with TOP = 1 | 1 |
| `BR` | f: JMP, EQ, NE (R[a] vs R[b]), RSP (any responder), NRSP, LTU | 1 |
| `PLDI` | P[d] = imm | 1 |
| `PALU` | P[d] = P[a] f src | 1 |
| `PLD` / `PST` | P[d] = LM[P[a]+imm] / LM[P[a]+imm] = P[b] | 1 |
| `PCMP` | L[d] = P[a] cond(f) src (EQ NE LTU GEU GTU LEU LTS GES) | 1 |
| `LOP` | L[d] = L[a] op(f) L[b] (AND OR XOR ANDN NOTA MOVA ZERO ONE) | 1 |
| `LGET` | L[d] = x[0] ? RSP : TOP | 1 |
| `SRCH` / `SRCHL` | associative search, see above | 1 |
| `PUSH` / `POP` / `MSET` | mask-stack operations | 1 |
| `SFR` | f: 0 STEP, 1 FIND, 2 RESOLVE_FIRST | 1 |
| `MAXMN` | Falkoff MAX/MIN over P[a] | 9 |
| `MOVE` | P[d] = neighbour's P[a] | 3 |

ALU functions (f): ADD, SUB, AND, OR, XOR, MUL (low byte), NOT a, pass b. The PE instructions from `PLDI` to `LGET` are masked when `m` = 1.

`asc_pkg::enc()` and `enc_br()` build instruction words, so programs can be written directly in SystemVerilog. The testbenches show complete programs.

## Host interface and timing

A single clock and an asynchronous active-low reset drive everything. While the machine is idle, a host writes:

- the program through `imem_we/imem_addr/imem_wdata`;
- scalar data through `dmem_*`;
- PE records through `pe_mem_we/pe_mem_pe/pe_mem_addr/pe_mem_wdata`.

All three are synchronous writes with combinational reads. A one-cycle pulse on `start` begins execution at address 0. Assertions in the control unit flag a program write or a `start` pulse while the machine is running. `running` stays high until a HALT, which raises `done`. Results are then read back through `dmem_rdata` and `pe_mem_rdata`. `rsp_vec` and `top_vec` show every PE's RSP and TOP; `any_rsp` and `stack_ovf` are for observation.

The control unit is not pipelined. Instructions take 1 cycle, except MAX/MIN (9) and MOVE (3). A search, STEP, FIND or RESOLVE_FIRST takes one cycle whatever the number of PEs. The responder resolution unit is a ripple chain whose delay grows with N, so a large array would need a lookahead tree there for timing closure.

## Example programs (in the testbenches)

* **Student table** (`tb_asc_top`, `tb_pe_array`). Twelve records, one per PE. The programs:
  - search for grades over 90;
  - STEP through the two responders, copying each student ID and (from R15) each PE ID to the control unit;
  - take MAX and MIN of the grade;
  - sum the responders' grades in the same STEP loop (Sum and Count aggregates);
  - run RESOLVE_FIRST on a multi-responder search;
  - run a two-byte MAX.
* **Byte-serial 16-bit add** (`tb_asc_top`). Every PE adds two 16-bit fields a byte at a time, with the carry found by compare.

  The responder and mask bits after each STEP are checked against the worked example.
* **Relational operations** (`tb_asc_database`). Intersection, difference and union of two relations, by stepping through one relation and comparing each tuple with the other in parallel. Cartesian product: |B| copies of each A tuple are written into idle PEs. Each copy gets a number equal to its own PE ID minus the group's first PE ID, and B's tuples are then broadcast to the copies with the matching number. EquiJoin is one parallel compare on the product. The number of steps grows as |A| + |B|, not |A| x |B|. Insert uses RESOLVE_FIRST over the idle PEs (relation ID 0) to pick a free PE. Delete is a search followed by a masked write of relation ID 0. No sorting is needed.
* **Edge detection**. The image is 6 x 6 and the masks are the Prewitt vertical and horizontal masks. The result is |V| + |H| thresholded at 0.
  - 2-D mode (`tb_asc_top`), one pixel per PE: nine broadcast weights per mask, and the products move to the centre PE by up to two network steps.
  - 1-D mode (`tb_asc_edge1d`), one image row per PE: a control-unit loop over columns, with row sums moved one PE up or down. The run takes the same 121 cycles per column, i.e. time linear in the image width.
* **A larger array** (`tb_asc_scale`). The whole processor runs with `N_PE = 256` on a 16 x 16 grid, the most an 8-bit PE ID can number, and 16 bytes of local memory per PE. It finds MAX and MIN of a pseudo-random byte per PE and counts responders with STEP. It also runs 2-D moves with and without wrap-around. MAX and MIN still take 1 + 8 cycles each, as with 36 PEs. What grows with N is combinational depth: the responder resolution chain, the OR of the data bus and the PE-ID encoder. Cycle counts do not grow.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl --top-module tb_asc_top \
          rtl/asc_pkg.sv tb/tb_asc_top.sv -o sim
obj_dir/sim
```

Replace `tb_asc_top` with any other `tb_*` module. The unit testbenches are `tb_asc_alu`, `tb_mask_stack`, `tb_sfr_unit`, `tb_maxmin_unit`, `tb_responder_resolution`, `tb_common_regs`, `tb_pe_network`, `tb_pe`, `tb_pe_array` and `tb_control_unit`. The workload testbenches are `tb_asc_top` (full size, default parameters), `tb_asc_database`, `tb_asc_edge1d` and `tb_asc_scale`. Each runs in well under a second once built. `tb_asc_scale` takes about half a minute to compile.

## Where this design fills in or departs

The published description fixes the following, and this RTL follows it:

- 8-bit PEs, each with 16 8-bit registers, 16 1-bit logical registers, a responder bit and a 16-entry mask stack;
- a control unit with an 8-bit ALU, 16 registers, instruction and data memories;
- 16 common registers;
- the STEP / FIND / RESOLVE_FIRST behaviour;
- Falkoff's search through a per-PE shift register and the responder resolution unit;
- NWIN/NWOUT network registers with one-step 1-D and 2-D moves and switchable wrap-around;
- 36 PEs.

Choices made here:

* **Instruction set, encoding and cycle counts.** Everything in the instruction-set section above. Multiply is included because the image programs need it.
* **Search push semantics.** Every PE pushes, and a masked search ANDs with the current top. Overflow drops the bottom entry; reset fills the stack with 1.
* **Non-responders under STEP/FIND/RESOLVE_FIRST.** Their TOP is cleared as well. One description of STEP says non-responders ignore it; the worked example clears every other PE's mask. The example is followed.
* **PE ID registers.** The control unit's R15 is its PE_ID register, as in the original. It is loaded by every STEP, FIND or RESOLVE_FIRST that finds a responder, with the selected PE's ID encoded from the responder resolution chain. Software may also write it. A search with no responder leaves it unchanged. Several algorithms also have each PE compute with its own ID, so PE register 15 reads as that PE's ID. Both the load rule and the PE-side register are choices made here.
* **Data bus.** It is an OR over PEs with TOP = 1.
* **Memory sizes.** Local memory is 256 bytes per PE, instruction memory 1024 words and data memory 256 bytes.
* **Host port.** The host port into all memories is an addition. The original machine had no described I/O path.
* **Network edges without wrap** receive 0. In 1-D mode RIGHT/LEFT act as DOWN/UP.

Not provided:

- a carry flag or add-with-carry instruction (multi-byte addition is done in software, as described under MAX and MIN);
- a hardware responder counter (COUNT is done by a STEP loop in software);
- virtual PEs, i.e. several records per PE, which is a software convention;
- the multiple-instruction-stream (MASC) variant;
- floating point and I/O.
