# An associative SIMD processor with structure codes

An associative processor finds data by what it contains, not by where it is.
Every record sits in the local memory of its own processing element (PE). One
instruction stream broadcasts a key to all PEs at once, and each PE that finds
the key in its record becomes a *responder*. The next instructions can then be
limited to the responders. A search, a maximum or a minimum takes the same
number of clocks whether the array holds ten records or ten thousand.

That works well for tables. Trees and linked lists are harder, because each
node's place in the structure has to be found by following pointers. This
design stores a **structure code** next to each node. The code is the node's
path from the root, one byte per level. With it, finding a node's parent, its
siblings or its root is a short, fixed sequence of broadcast searches. No
traversal is needed.

The RTL is a complete, synthesizable processor. It has 36 8-bit PEs with local
memories, a mask stack in every PE, a responder resolution unit, a reduction
network, and a PE-to-PE network that runs as a linear array or a 6x6 mesh. One
instruction stream holds the program memory, the common registers and the
structure-code logic.

## The PE array

Each PE (`pe.sv`) has:

- eight 8-bit registers and a 256-byte local memory;
- a **responder bit**;
- a saved copy of the responder bit, `acc`, used to combine two searches;
- a **mask stack** (`mask_stack.sv`, 8 deep). The top bit of the stack decides
  whether the PE obeys *masked* operations: load, store, ALU, id, network move
  and compare.

All PEs receive the same micro-operation (`asc_pkg::pe_uop_t`) over the
instruction bus and finish it in one clock.

The mask rules matter most when you write a program:

| operation | responder bit | mask stack |
|---|---|---|
| `PCMP` (search) | `top & cond` | top is overwritten with `top & cond` |
| `PCMPAND` | `resp & top & cond` | unchanged |
| `PPUSH1` | unchanged | push 1 in every PE (this makes every PE active) |
| `PPUSHR` | unchanged | push the responder bit |
| `PPOP` | unchanged | pop; the bottom refills with 1 |
| `PSTEP` | cleared in the chosen PE | push 1 in the chosen PE, 0 in all others |
| `PFLAG` | all/save/restore/or/clear | `MARK`: top is overwritten with resp |

A search normally sits inside a scope: `PPUSH1`, `PCMP ...`, the body, then
`PPOP`. The compare narrows the top of the mask, and the pop brings back the
enclosing scope. After reset every stack is all ones, so every PE listens.

### Step and responder resolution

Responders are often visited one at a time, with a loop like this:

```
      PPUSH1                    ; all PEs listen
      PLD   r2, [9]             ; grade
      PCMP  r2 > #90            ; responders = grade above 90
loop: BRNONE end
      PSTEP                     ; pick one responder, enable only it
      CADDI c0, c0, 1           ; scalar work in the instruction stream
      PPOP
      JMP   loop
end:  PPOP
```

`responder_resolution.sv` picks the **lowest-numbered** responder (one-hot
`sel`) and reports whether there is any responder (`any`). `PSTEP` enables only
the chosen PE and clears its responder bit, so the loop ends after each
responder has been visited once. `RDR` copies register `ra` of the chosen
responder into a common register through the reduction network
(`reduction_network.sv`, an OR over the selected PE). With no responders it
reads 0.

### Max and Min (Falkoff's algorithm)

`MAX ra` and `MIN ra` find the extreme value of a register across all active
PEs in 1 + 8 clocks, whatever the number of PEs:

1. Every active PE becomes a candidate.
2. For each bit from the MSB down, every candidate votes with that bit (`MAX`)
   or its inverse (`MIN`).
3. The reduction network ORs the votes in the same clock. If any candidate
   voted 1, the candidates that voted 0 drop out.

When it ends, the responders are exactly the PEs that hold the extreme value.
The mask is not changed. Add `PFLAG MARK` or `PPUSHR` to restrict further work
to those PEs.

## Structure codes

A code has `SC_DIGITS` (4) bytes, most significant first. Digit 0 is the
node's position among the roots. Digit 1 is its position among its parent's
children, and so on. A digit runs from 1 to 255, and 0 means "no deeper level".
The **level** L of a code is its number of leading non-zero digits. In the tree

```
              1000
        1100        1200
     1110  1120        1210
```

the left child of 1000 is 1100, its children are 1110 and 1120, and so on.
Trees up to four levels deep with up to 255 children per node fit the default
size.

### Scalar operations (instruction stream only)

`SCOP` works on a group of four common registers. Group g is registers
4g..4g+3. The operations change one digit of the code:

| func | meaning | 1220 becomes | cannot exist when |
|---|---|---|---|
| `SC_FSTCD` | first child | 1221 | L = 4 |
| `SC_NXTCD` | next sibling | 1230 | digit L-1 = 255 |
| `SC_PRVCD` | previous sibling | 1210 | digit L-1 = 1 |
| `SC_TRNCD` | parent | 1200 | L = 1 |
| `SC_TRNACD` | root | 1000 | L = 0 |

An impossible result sets `sc_err` and leaves the destination unchanged. These
operations only do arithmetic on the code. They do not check whether the node
exists.

### Parallel operations (the whole array)

These operations find nodes that do exist. Each PE holds its node's code at
four consecutive local addresses, starting at the instruction's `imm`. The
reference code is in common-register group `rb`. `macro_sequencer.sv` expands
each operation into micro-operations:

1. **Candidates.** All active PEs become responders. Then, digit by digit, a
   PE stays a candidate only if its code has:
   - digits 0..L-2 equal to the reference's;
   - a non-zero digit L-1 that is smaller (`prv`) or larger (`nxt`) than the
     reference's;
   - zeros in the digits after that.

   What is left is the siblings on one side of the reference node. Each digit
   costs two clocks (a load into scratch register r7, then an AND-compare),
   plus one extra clock for the non-zero check.
2. **Closest.** A Falkoff max (`prv`) or min (`nxt`) runs over digit L-1, the
   only digit in which the candidates differ.
3. **Result.** The one PE that survives is the responder.

| instruction | result | clocks (excluding the 1 start clock) |
|---|---|---|
| `PRVDEX` | previous sibling is the responder | 19 |
| `NXTDEX` | next sibling is the responder | 19 |
| `SIBDEX` | both siblings are responders (two passes, ORed through `acc`) | 40 |
| `PRVVAL` | code of the previous sibling goes into group `rd`; responders are restored | 29 |
| `NXTVAL` | code of the next sibling goes into group `rd`; responders are restored | 29 |

If there is no such sibling, the result is no responder, or a code of all
zeros for the `*VAL` forms. An all-zero reference finds nothing. PE register 7
is overwritten by these operations.

Example: to find the e-mail field of an address-book entry whose last name is
known:

1. Search for the last name.
2. `RDR` the responder's four code digits into group 1.
3. `SCOP TRNCD` to get the parent code (the *name* node).
4. `NXTDEX` on that code, which marks the next field, *email*.

The cost does not depend on how many records are stored (`tb/tb_xml_lookup.sv`,
34 clocks).

## Instruction stream

`control_unit.sv` runs one instruction per clock and is not pipelined.
Decoding is combinational, and the PE array answers (any responder, read-back
value) in the same clock, so a branch sees the result of the instruction just
before it. A macro instruction takes one clock to start the sequencer. The PC
then waits until the sequencer signals `done`. The common registers
(`common_registers.sv`, 16 x 8 bits) hold the scalar variables and the
reference codes.

Instruction word (see `asc_pkg.sv`; build one with `asc_pkg::enc`):

```
[31:26] opcode  [25:22] rd  [21:18] ra  [17:14] rb  [13:11] func
[10] bsel: PE operand b is the broadcast value   [9] bimm: broadcast = imm, else common reg rb
[7:0] imm / PE memory address / branch target
```

| group | opcodes |
|---|---|
| control | `NOP HALT JMP BRANY BRNONE` |
| scalar (common registers) | `CMOVI CADDI CADD CSUB RDR SCOP NETCFG` |
| PE broadcast | `PLD PST PALU PID PCMP PCMPAND PPUSH1 PPUSHR PPOP PSTEP PNET PFLAG` |
| sequenced | `MAX MIN PRVDEX NXTDEX SIBDEX PRVVAL NXTVAL` |

Running the processor from the host side:

1. Write the program through `prog_we/prog_addr/prog_wdata` while the
   processor is stopped.
2. Pulse `start`. The PC is set to 0 and the program runs.
3. Wait for `halted`.
4. Read the results through `host_addr/host_rdata`.

PE state survives a new `start`, so a second program can work on data that
the first one loaded.

Records are loaded into the PEs by the program itself, one PE at a time:

1. `PID r0`, so that every PE knows its number.
2. For each PE k: `PPUSH1`, then `PCMP r0 == #k`, then `PALU MOVB` and `PST`
   for each field, then `PPOP`.

## PE network

`pe_network.sv` gives each PE one neighbour's register `ra`, and `PNET` writes
it into `rd`. `NETCFG #1` selects a 6x6 mesh, laid out row by row:
WEST/EAST is i-1/i+1 within a row, and NORTH/SOUTH is i-6/i+6. `NETCFG #0`
selects a linear chain: WEST/NORTH is i-1 and EAST/SOUTH is i+1. Edges receive
0; there is no wrap-around.

## How closely this follows the original processor

These parts follow the source design closely:

- 36 8-bit PEs, each with only its own local memory;
- the mask stack and the responder rules of search and Step;
- lowest-first Step order, which matches the source's example;
- Falkoff max/min;
- the five scalar code operations with their results on 1220;
- one byte per digit;
- the parallel sibling operations and their three steps;
- a network with linear and 2D-mesh modes.

These choices are this design's own, because the source gives no detail:

- the instruction set and its encoding;
- register counts, memory depths and mask depth;
- the PE micro-operation set, and the `acc` flag that `SIBDEX` and `*VAL` need;
- the reduction network, built as plain OR trees;
- the host port, reset behaviour, and the `valid`/`sc_err` handling of
  impossible codes;
- the mesh shape and what PEs at the edge receive.

These are deliberate differences:

- The sibling search also requires the **same parent**. The source describes
  the search as "smaller code at the same level". Taken literally, that could
  pick a cousin in another subtree when no left sibling exists.
- The parallel right-sibling operation is named `NXTDEX`. The source uses the
  name of the scalar next-sibling operation for it too.
- Codes are fixed-width (4 levels by default, set by `SC_DIGITS`). The source
  allows unlimited nesting.
- `MAX`/`MIN` leave the extreme PEs as responders but do not change the mask.
- The common registers sit inside the control unit.
- The instruction stream's main memory is not modelled. Programs run from the
  256-word program memory, and scalar data lives in the common registers.

## Files and simulation

`rtl/` holds one module per file, with `asc_pkg.sv` for the shared types. The
top is `asc_top`. `tb/` holds one self-checking testbench per module. Each
prints `TB_RESULT checks=N failures=M`. There are also two whole-processor
programs:

- `tb_asc_top`: a student table with a count of grades above 90 using Step,
  then Max and Min; then a tree with prvdex, trncd+nxtdex, sibdex, nxtval,
  fstcd and both network modes. It counts that each mechanism occurred.
- `tb_xml_lookup`: the address-book lookup above.

Both run at the default size in well under a second. To build and run one with
Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/asc_pkg.sv tb/tb_asc_top.sv --top-module tb_asc_top
./obj_dir/Vtb_asc_top
```

For another block, replace the testbench file and top name, for example
`tb/tb_macro_sequencer.sv` and `tb_macro_sequencer`.

To change the size, use the parameters of `asc_top`:

- `NUM_PE` and `MESH_COLS`;
- `MEM_DEPTH` (up to 256, because addresses are 8 bits);
- `MASK_DEPTH`;
- `PROG_DEPTH` (up to 256, because branch targets are 8 bits);
- `NUM_CREGS` (a multiple of `SC_DIGITS`; up to 16, because register fields
  are 4 bits);
- `SC_DIGITS`.

Known limits:

- PE ids are 8 bits, so `NUM_PE` may be at most 256.
- The combinational path from the instruction through the PE array and back
  (responder resolution, then branch) sets the clock period. It grows with
  `NUM_PE`.
