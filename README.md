# BWT/LZ77 coprocessor on one shared sorting shift register

Two popular lossless compression front ends each spend most of their time on one
highly parallel operation:

- **Burrows-Wheeler transform (BWT):** sort the N cyclic rotations of a block.
- **LZ77:** search a sliding dictionary for the longest earlier copy of the incoming text.

Both operations need a long register of symbols that every position can compare
against. This design builds that register once and uses it for both. It is a
**Weavesorter machine**, a bidirectional shift register with a compare/swap unit for
every pair of cells. Shifted one way with compare/swap steps, it sorts; shifted left
with a comparator in every cell, it is an LZ77 dictionary that is searched in a single
cycle.

A control unit sequences both algorithms. It talks to a host processor through the
floating-point-unit port of a LEON2 (SPARC V8) processor. The coprocessor sits where
the FPU would be, and a handful of FPop instructions load a block, start a transform
and read the result.

```
            fpu_in (FpOp, FpInst, FpLd, operands)        fpu_out (FpBusy, result)
                         |                                       ^
                 +-------v---------------------------------------+-------+
                 | control_unit   OriginalString[N]  SortedString[3N]    |
                 +---+------------------------------------------+--------+
         cfg, Input, |                                          | Output, CtrlOut, Done,
         CtrlIn, clr |                                          | tokens
                 +---v---------------------------+     +--------+-------+
                 | weavesorter                   |found| lz77_mechanism |
                 |  N x ws_cell, N/2 x           |---->| History, OR    |
                 |  ws_comparator, control shift |     | tree, priority |
                 |  register, Done AND           |     | encoder, length|
                 +-------------------------------+     +----------------+
```

## Files

| file | what it is |
|---|---|
| `rtl/bwtlz_pkg.sv` | shared types: symbol width, configuration and cell codes, control-stage struct, instruction codes, LEON2 FPU records |
| `rtl/ws_cell.sv` | one cell: symbol and address registers, input multiplexer, search comparator |
| `rtl/ws_comparator.sv` | per-pair comparator: turns the configuration into the two cells' operation codes |
| `rtl/weavesorter.sv` | the machine: N cells, N/2 comparators, control shift register, Done, end multiplexers |
| `rtl/lz77_mechanism.sv` | LZ77 token generator beside the machine |
| `rtl/control_unit.sv` | the FSM, the block and result arrays, the host instruction decoder |
| `rtl/bwt_lz77_coproc.sv` | top: the three parts behind the LEON2 `fpu_in_type` / `fpu_out_type` records |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_coproc_full_size.sv` runs the top at its defaults |

The default size is N = 256 cells with 8-bit symbols and 8-bit addresses. N must be
even because cells come in pairs. It must be a multiple of 16 because the host loads
16 symbols per instruction. It must be at most 256 because results are returned as
8-bit entries.

## The Weavesorter machine

Cells are numbered 0 (left) to N-1 (right). Each cell holds a symbol and the address
in the block the symbol came from. The address rides along and never takes part in
a comparison. A 2-bit configuration is broadcast to all comparators every cycle:

| cfg | effect |
|---|---|
| Idle | nothing moves |
| Shift-Right | `Input` enters cell 0, cell N-1 leaves |
| Shift-Left | `Input` enters cell N-1, cell 0 leaves |
| Compare/Swap | each pair (2k, 2k+1) exchanges if the left symbol is greater, unless blocked |

`Output` and `CtrlOut` show the cell that leaves on the current shift. That is cell
N-1 while cfg is Shift-Right, and cell 0 otherwise. They are combinational views of
registers.

**Why it sorts.** Insert symbols one at a time from the left, with a compare/swap
after every shift. The smallest symbol seen so far stays in cell 0. Then take them
out to the left, again with a compare/swap after every shift. Each symbol that leaves
is the smallest of those still inside, so N symbols come out in ascending order. The
mirror image also works: fill from the right, drain to the right, descending order.
`tb_weavesorter` checks both directions.

**Groups and the control shift register.** Sorting rotations needs more than the
first symbol. Rows that start with the same symbol must be ordered by their second
symbol, then their third, and so on. The machine therefore holds *groups*: runs of
rows whose prefixes so far are equal. A compare/swap must never cross from one group
into another. Beside the cells runs a control shift register with one stage per cell.
It shifts with the data but is never swapped, so a boundary stays fixed between two
positions while the symbols inside a group reorder. `Done` is the AND of all
boundary bits: every row is a group of its own, and the sort is complete.

Each stage holds two bits: the boundary bit and the **side** it refers to.
- A symbol that enters from the right records a boundary on its left.
- A symbol that enters from the left records a boundary on its right.

During a drain both kinds are present at once, old data on one side and new data on
the other. Comparator k is blocked when cell 2k+1 holds a left-side boundary or cell
2k holds a right-side one. With a single bit per stage, as the original description
has it, the two kinds cannot be told apart and groups mix. Reset and `clr` fill every
stage with a left-side boundary, so empty cells never swap with real symbols.

## BWT sequence (control unit)

All steps come in pairs: a shift, then a compare/swap (2 cycles).

1. **Fill.** N shift-rights insert symbol i with address i. Everything is one group.
2. **Drain passes.** Each pass is N shifts that take every row out at the end the data
   was last filled from. In the same shift, the *successor* of the row that leaves
   enters at the opposite end. The successor is the symbol at address+1 (mod N), with
   that address. After the pass the machine holds the next column of the rotation
   matrix. Passes alternate direction: drain-left, drain-right, drain-left, and so on.
   The rows leave in sorted order (ascending, then descending, then ascending).
   Because each pass also reverses the entry side, the groups always lie in ascending
   order from left to right.
3. **New boundary bit.** The bit entering with each successor is 1 in three cases:
   - it is the first shift of the pass;
   - the leaving symbol differs from the one that left before it;
   - the one that left before it carried a boundary bit.

   The last case keeps earlier splits. The control unit keeps the previous leaving
   symbol and its bit for this (TempData).
4. **Stop.** The sort stops after a pass when `Done` is high, or after N passes. A
   periodic block, such as `xyxy...`, has equal rotations that never separate.
   For those, any order of the equal rows gives the same last column.
5. **Results.** N shift-rights read the rows out, last row first. After p passes a
   row's address is start+p (mod N), where start is the rotation's first position.
   The row's last-column symbol is `OriginalString[start-1]`. The row whose start is
   0 is the index I. The last column goes to `SortedString[0..N-1]` and I to
   `SortedString[N]`.

Run time for one block: `2 + 2N(1 + p) + N` cycles of FpBusy, where p is the number of
drain passes. The host's FpOp and FpLd cycles are not counted. Random text over a
four-letter alphabet needs 3 to 5 passes at N = 16 and about 8 at N = 256. Random bytes
need 1 to 3. At N = 256, p = 8 takes 4866 cycles. A periodic block runs the full 256
passes, 131842 cycles.

## LZ77 sequence

The block is shifted left into the machine, one symbol per cycle (N+1 cycles in all).
Positions are counted from the right: the cell that received the previous symbol is
position 1. A fixed position therefore always points at the continuation of what it
matched one cycle earlier. Each cycle, every cell compares its symbol with the
incoming one. `found` is the result, forced low for cells that hold no symbol yet.
The mechanism then does the following:

- **AND-Group(b):** `live = found & History`. A position stays alive only if it also
  matched every earlier symbol of the current string.
- **OR-tree:** `Matched = |live`.
- **Priority encoder:** the smallest live position, which is the right-most cell, is
  kept as the match position.
- **AND-Group(a):** while Matched, `History <= live` and the length counter counts up.
- **NOT:** when nothing matched, History is set to all ones and the counter is cleared,
  so the next symbol starts a fresh search. The symbol itself closes a token
  (position, length, symbol). The token is registered and appears one cycle later.

The last symbol of a block always closes a token, even if it would have extended a
match.

For example, `ABRACADABRAS` gives (0,0,A) (0,0,B) (0,0,R) (3,1,C) (2,1,D) (7,4,S).
Tokens go into SortedString as three entries each (position, length, symbol). The
result is the greedy longest match, with the smallest distance among equal lengths.

## Host interface (LEON2 FPU port)

The ports are the LEON2 `fpu_in_type` / `fpu_out_type` records as packed structs. The
host raises FpOp with the instruction in FpInst, then drives the operands with FpLd
in the next cycle. FpBusy is high from the cycle after FpOp until the cycle before the
result is valid. The result stays valid until the next FpOp. `fpu_in.reset` is a
synchronous reset.

| FpInst[8:0] (SPARC opf) | action |
|---|---|
| FADDd `0x042` | store 16 symbols: operand 1 bytes 7..0, then operand 2 bytes 7..0 (byte 7 first) |
| FSQRTd `0x02A` | run the BWT on the stored block |
| FSQRTs `0x029` | run LZ77 on the stored block |
| FSUBd `0x046` | return the next 8 SortedString entries; entry k is result byte k |
| FsMULd `0x069` | reset the counters of the core |

The 64-bit result is split as FracResult = bits 51:0, ExpResult = 62:52 and
SignResult = 63. FracResult's bit 0 is bit 3 of the record's `FracResult(54 downto 3)`.

A read past the end returns a count in the low 16 bits:
- after a BWT, past entry N-1: the index I;
- after LZ77, past the last token: the number of token entries.

A start instruction rewinds the load and read counters, so the next block loads from
position 0.

Exceptions, condition codes and the scan output read as zero. The rounding mode, the
scan inputs and `fpuholdn` are ignored.

## Where this design fills in or departs from the description

The cell, the comparator and its four codes, the machine's wiring, the Done gate and
the LZ77 mechanism follow the description gate for gate. So do the control unit's
arrays, counters, states and instruction set. The following are this design's own:

- **Two bits per control stage** (boundary and side) instead of one. Without the side
  bit the grouping fails for blocks with repeated symbols.
- **Alternating drain passes with the successor inserted in the same shift.** The
  described pseudocode reaches the same states (Shift-Right / Compare-Swap /
  Shift-Left / Get-Results) but leaves the insertion timing and the direction of
  later passes open.
- **Stopping after N passes** when Done never rises (periodic blocks).
- **Reading results.** Reading shifts right continuously. The last-column symbol is
  `OriginalString[(address - passes - 1) mod N]`.
- **End of a run.** After a run the FSM returns to waiting for instructions, with the
  results kept, rather than passing through its reset state.
- **Empty cells** never match in LZ77 (gated with the control stage).
- **Last symbol.** The last symbol of a block always closes a token.
- **Operand 2 for FADDd.** The second half of each FADDd load comes from the second
  operand.
- **Past-the-end reads.** The LZ77 past-the-end read returns the number of token
  entries.
- **Instruction codes** are the standard SPARC V8 opf values for the named
  instructions.
- **Bit widths.** Symbols are alpha = 8 bits and addresses beta = log2 N bits.
- **Block length.** The block length is fixed at N. A block shorter than N cannot be
  transformed on its own, because padding would change its rotations.

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself with a
watchdog. Expected values are always computed independently inside the testbench:

- `tb_ws_cell` and `tb_ws_comparator`: a register model, and an exhaustive sweep of
  configurations, control bit and symbol pairs.
- `tb_weavesorter` (N = 8): the whole cell and control state against a model, every
  cycle, over random operation. Also the ascending and descending sort property.
- `tb_lz77_mechanism` (N = 16): tokens and their one-cycle latency against a greedy
  longest-match reference, and the ABRACADABRAS tokens.
- `tb_control_unit` (N = 16): the FSM against a behavioural machine and a token stub.
  It checks the FADDd byte order, the fill sequence, the BWT last column and index
  against sorted rotations, the run time, LZ77 token storage, FSUBd packing and FsMULd.
- `tb_bwt_lz77_coproc` (N = 16) and `tb_coproc_full_size` (default N = 256): the whole
  coprocessor driven through the FPU port. They use random text, random bytes, a
  periodic block and an all-zero block, plus the ABRACADABRAS example. The BWT is
  checked against sorted rotations and LZ77 against the greedy reference, and every
  run's busy time against the formulas above. Each mechanism must occur at least
  once: Done exit, pass-limit exit, both drain directions, swaps, blocked
  compare/swaps, literal and match tokens, a block ending inside a match, host stalls
  on FpBusy, reset, and past-the-end reads.

Running one testbench with plain Verilator:

```
verilator --binary --timing -y rtl -y tb rtl/bwtlz_pkg.sv tb/tb_bwt_lz77_coproc.sv \
          --top-module tb_bwt_lz77_coproc -o sim
./obj_dir/sim
```

The full-size run takes about a second.

Not verified: timing closure, FPGA resource use, and operation inside a real LEON2
integer unit. The host side of the handshake is modelled only by the testbench.
