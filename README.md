# A bit-serial SIMD array processor (SOLOMON style) in SystemVerilog

This is a synthesizable model of a highly parallel computer. Up to 63 × 63 identical
processing cells all obey one instruction at a time. The instruction comes from a host
minicomputer (a PDP-11) through an interface on its Unibus. Each cell is a 16-bit
*bit-serial* machine: it has fifteen words of storage and a one-bit ALU. It adds two
words by streaming them through the ALU one bit per clock, starting with the least
significant bit. Cells exchange data with their four nearest neighbours and with a
shared row/column buffer. Each cell can also opt out of an instruction, based on its
own data ("inhibit"). The array as a whole can report whether an iterative computation
has stopped changing ("convergence").

The machine follows J. V. Roitman's 1972 McMaster thesis *A Parallel Computing System*.
Only one cell was built in hardware at the time, and the full array was simulated in
software. This RTL builds the full array, the control unit, the cell addressing system
that the thesis designs but did not build, and the Unibus interface. Where the thesis
is silent or contradicts itself, the choice made here is stated below, in the module
headers, and in the "Where this model fills gaps" section.

```
 host bus ──► interface_unit ──ir/start──► control_unit ──dec, tim──► cell_array
 (Unibus)     IR1 IR2 DR DSR BAR/CMR        decoder           broadcast     63 x 63 array_cell
              ASC address                   sequencer                       + 63 buffer cells
              ▲        │ serial DR bit      cell addressing ──row/col lines─► cell_enable (CEI/CEO)
              └────────┴──────────────────────────────────────────────────── assoc_detector
```

## Bit-serial timing

Everything in the array is timed by one clock, and **one clock is one bit cycle**. The
thesis splits a bit cycle into a read half and a write half. Here they are merged:
- in a single clock the cell reads bit *k* of its operands, forms the result bit, and
  writes it back at the clock edge;
- so the cell output D_B is combinational;
- the only extra flip-flop is D_A, which holds the multiplier bit.

An operation goes through these steps (`sequencer.sv`):

| phase | clocks | what happens |
|---|---|---|
| start | – | writing IR1 from the host latches the decoded instruction and sets busy |
| preset 1 | 1 | carry flip-flop cleared (unless the instruction keeps the carry) |
| preset 2 | 1 | carry preset for subtract/complement/increment; zero flag cleared; D_A reset |
| bit cycles | 8–24 | bit counter steps; every cell processes bit `addr` of its words |
| end | – | `fin` pulse: convergence flag written, BAR stepped in automatic mode, busy cleared |

The bit counter's range depends on the arithmetic mode. This is how one 16-bit word can
hold either an integer or half of a floating-point number:

| mode | bits processed | accumulator loop | clocks incl. preset |
|---|---|---|---|
| INT integer | 0–15 | 16 bits | 18 |
| FB first byte | 0–7 (counter runs 8–15, address = counter − 8) | 24 bits | 10 |
| SB second byte | 8–15 | 24 bits | 10 |
| EX exponent | 8–15; bit 15 is exclusive-ORed, not added | 24 bits | 10 |
| AV absolute value | 0–14 (sign bit untouched) | 16 bits | 17 |
| INF integer, floating input | 0–15 | 24 bits | 18 |

These operations have their own lengths:
- SSR (spread sign) counts down from 15 to 0, 18 clocks.
- Parallel shifts take 1 clock, or 8 for a byte shift.
- MSG and ASC (associative capture) take 1 clock.
- Control-bit transfers (CIN, COU, CTR) take 4 clocks.
- Shifts, MSG, ASC and the control-bit transfers have no preset cycle.

The testbenches check every one of these counts.

**Accumulators.** AC1 and AC2 are 24-bit circulating shift registers (`cell_accumulator.sv`).
- They are read at bit 0.
- The bit being written enters at the top of the loop: bit 15 for integer modes, bit 23
  for floating modes. So after one full pass the word is back in place.
- They also shift in parallel: AC1 left or right, AC2 right, logical or rotate, by 1 or 8
  bits. This supports normalization and the software division.

**Memories.** The memories M3–M15 are bit-addressed. The bit counter is the bit address,
and all thirteen words are read at the same bit in every clock (`cell_memory.sv`).

## The cell

`array_cell.sv` wires these parts together:
- MPX A and MPX B pick the current bit of two of the fifteen words (`cell_word_mux`).
- MPX C (`cell_input_mux`) chooses where the Y operand comes from: the cell's own MPX B,
  a neighbour's output (N, S, E, W), the row buffer, the column buffer, or the central
  buffer (the host's data register).
- The one-bit ALU (`cell_alu`) is a full adder with optional complement of Y. Its output
  multiplexer gives sum, AND, OR or XOR. The carry flip-flop can be cleared and preset.
  Each instruction selects which inputs are enabled and which carry pulses it uses.
- The destination demultiplexer (`cell_dmpx`) write-enables the chosen word, or all
  words when the destination is 0. The write is blocked when the cell is inhibited, not
  selected, or skipping a multiply cycle.

Every neighbour link carries one bit per clock. So "M6 = M3 of the northern neighbour
+ M3 of the eastern neighbour" takes two instructions of 18 clocks each. At the planar
edges a missing neighbour reads as 0.

**Control bits** (`cell_control_bits.sv`):

| bit | meaning |
|---|---|
| Z | the last value written into AC1 was non-zero |
| S | that value was negative |
| I | the cell takes part in unconditional inhibit |
| C | the cell takes part in convergence tests |

- *Inhibit*: a 3-bit code in the instruction picks none, Z, S, or the AC1 top-bit
  detector, and can complement it. The unconditional-inhibit bit adds I.
- The condition is sampled when the operation starts and held for the whole operation.
  So an instruction that writes AC1 cannot inhibit itself halfway through.
- *Convergence*: while a tested operation writes, each bit is compared with the same bit
  of M15, from bit `cnv` upward, in every cell whose C bit is set. Any difference in any
  cell clears the system's convergence flag at the end. An operation with no difference
  sets it.
- The four bits form a chain that the CIN, COU and CTR instructions shift four times:
  - CIN loads the chain from the host;
  - COU reads it out by rotating, so it is not lost;
  - CTR copies it from a neighbour.

## Multiplication

Multiplication is the one operation that is not a single pass. `MPY` computes
M_D = M_D + AC1 × M_A. AC1 holds the multiplicand, and the low byte of M_A is the
multiplier.

The sequencer runs eight cycles after the preset. Each cycle has 16 bit clocks, or 24
for a floating (mantissa) multiply, followed by one shift clock:

1. On bit clock *k* of cycle *k*, the cell interrogates multiplier bit *k*.
   - It uses the bit directly on that clock.
   - It latches the bit in D_A for the rest of the cycle.
2. If the bit is 1, the whole cycle adds AC1 into M_D. If it is 0, the demultiplexer
   is inhibited and M_D is rewritten unchanged. Bits below *k* have already passed, and
   are written before D_A is set, so the add is only enabled from bit *k* upward.
   Those lower bits of AC1 are zero anyway (see step 3).
3. On the shift clock, AC1 shifts left by one, D_A resets and the carry clears.

An integer multiply therefore takes 2 + 8 × 17 = **138 clocks**, and a floating one
2 + 8 × 25 = 202. Afterwards AC1 holds the multiplicand shifted left by 8. The product
is the low 16 (or 24) bits. Eight bits of multiplier match the mantissa bytes of the
floating format, where a 24-bit mantissa times one byte is one step of the software
routines.

## Instruction formats

The host writes the high half (IR2) first and then the low half (IR1). Writing IR1 is
the start pulse. Two formats are distinguished by bit 16.

**Arithmetic/logic (bit 16 = 0)**

| bits | field |
|---|---|
| 3:0 | opcode: 1 ADD, 2 SUB, 3 SSR, 4 DEC, 5 LOR, 6 EXO, 7 AND, 8 MPY, 9 COM, 10 TCM, 11 INC, 12 MOV, 13 SHR, 14 special |
| 7:4 | destination word D (0 = all words, 1 = AC1, 2 = AC2, 3–15 = M3–M15) |
| 11:8 | operand A |
| 15:12 | operand B |
| 19:17 | Y source: own, N, S, E, W, row buffer, column buffer, central buffer |
| 22:20 | mode: INT, FB, SB, EX, AV, INF |
| 23 | unconditional inhibit |
| 26:24 | conditional inhibit code |
| 30:27 | convergence test from this bit upward (0 = no test) |
| 31 | keep carry (chained multi-word arithmetic) |

Operands of the one-operand opcodes:
- COM, TCM, INC and MOV take B.
- DEC takes A.
- SSR reads and writes A.
- MPY uses A as the multiplier and D as the accumulated product, and bit 20 selects
  the floating form.

Fields of the other opcodes:
- SHR uses bits 5:4 for the register (1 AC1 left, 2 AC1 right, 3 AC2 right), bit 6 for
  rotate, bit 7 for an 8-bit shift and bit 8 for floating.
- Opcode 14 is one of four special operations:
  - MSG (bit 8): sign to AC2;
  - ICH (bit 9): AC1 into word D;
  - MAI (bit 10): inverted AC2 into word D in absolute-value mode, used by division;
  - ASC (bit 11): capture the inhibit condition for associative search.

**Communication (bit 16 = 1)**

| bits 2:0 | operation | addressing |
|---|---|---|
| 1 DIN | data register → word D of the addressed cell(s) | bits 9:8 mode, 12:10 row, 15:13 column |
| 2 DOU | word D of one cell → data register | same |
| 3 CIN | data register bits 3:0 → control chain | same |
| 4 COU | control chain → data register | same |
| 5 CTR | every selected cell copies a neighbour's control bits (bits 19:17) | CMR |
| 6 BUF | bit 3: 0 = array → buffer (TTB), 1 = buffer → array (TFB); bit 11: by column; D in 7:4, source in 15:12 | CMR/BAR |

## Cell addressing

The addressing system (`cell_addressing.sv`, `cell_enable.sv`) is the most unusual part
of the control unit.

**Decoders and the selection matrix.**
- A 6-to-64 row decoder and a 6-to-64 column decoder drive lines 0–63.
- Cell (r, c) sits at the intersection of row line r+1 and column line c+1.
- **Line 0 means "every row" (or "every column")**, so one mechanism addresses:
  - one cell: (j, i);
  - a whole row: (j, 0);
  - a whole column: (0, i);
  - the whole array: (0, 0).
- This is why the array is 63 × 63 and not 64 × 64.
- Each cell's CEI (enable input) gate ORs the four point combinations, plus three
  global lines for "all cells", "even rows" and "odd rows".

**Where the decoders get their address.** The source depends on the operation:

- Host transfers (DIN, DOU, CIN, COU) use the mode in instruction bits 9:8:
  - *direct*: row and column come from 3-bit instruction fields. This reaches the 7 × 7
    corner and the broadcast lines.
  - *concatenated*: the upper three bits come from the BAR (Basic Address Register) and
    the lower three from the instruction. The array is seen as 8 × 8 sectors of
    8 × 8 cells.
  - *automatic*: the BAR itself is the address.
    - At the end of each such transfer, the BAR's row and/or column counter steps up or
      down, as instruction bits 11/12 and 14/15 ask.
    - If the row counter wraps, the column counter steps too.
    - So a run of DINs can lay boundary values along a row or column, or scan the
      whole array.
- Computing operations ignore the instruction's address fields. Instead the 2-bit Cell
  Mode Register (CMR) chooses:
  - 0: all cells;
  - 1: the cell, row or column in the BAR;
  - 2: even rows only;
  - 3: odd rows only.
  Modes 2 and 3 let one row act as a processor and its neighbour as extra storage.

**Output enables.** The CEO gate selects which cell drives a shared line:
- for DOU and COU, the exact point drives the data register;
- for TTB, the selected row or column drives the buffer.

**The buffer** (`cell_array.sv`) is one set of 63 full cells, shared between rows and
columns. For a transfer by row, buffer cell k takes the output of the enabled cell in
column k. For a transfer by column, it takes row k. On the way back, cell (r, c) reads
buffer cell c as its "row" input and buffer cell r as its "column" input. Transposing
row k into column k is therefore:
1. TTB by row with BAR = (k, 0);
2. TFB by column with BAR = (0, k).

Both testbenches transpose this way.

## Associative search

The array can also act as a content-addressed memory, one word position at a time.
For example, to find the cells whose M3 equals a key:
1. The host puts the key in the data register.
2. It issues `SUB AC1 = M3 - central buffer`.
3. It issues ASC (special opcode, bit 11) with inhibit code 3, "AC1 = 0". ASC takes one
   clock. Each enabled cell loads its associative flip-flop with the condition its
   inhibit multiplexer selects.

The detector (`assoc_detector.sv`) finds the matching cell with the highest priority.
Priority goes to the lowest row, then the lowest column:
- A row encoder picks the first row whose flip-flops OR to 1.
- Only that row's flip-flops feed a column encoder, which picks the first column.

The host reads the result at 167762: bit 15 found, row line in 11:6, column line in 5:0.
Row and column lines are numbered as in the BAR, so the host can write them straight
into the BAR. A write to the same address resets that cell's flip-flop, and the next
match appears. The thesis proposes this as an extension and does not build it. Its
ASC encoding and register address are this model's choices.

## Host interface

`interface_unit.sv` places five registers on the 18-bit Unibus. The upper five address
bits must be 1 and bits 12:3 must match the jumper value 0777 (0776 for BAR/CMR).

| 16-bit address | register | access |
|---|---|---|
| 167770 | IR1, instruction bits 15:0; writing it starts the operation | write |
| 167772 | IR2, instruction bits 31:16 | write |
| 167774 | DR, data register / central buffer; the array reads and writes it one bit at a time at the bit address | read/write |
| 167776 | DSR: bit 7 busy, bit 15 convergence | read |
| 167760 | BAR/CMR: column 5:0, row 11:6, CMR 13:12 | write |
| 167762 | associative address: found 15, row 11:6, column 5:0; a write resets that cell | read/write |

On the 18-bit bus these addresses appear as 767770 and so on.

The host's loop is:
1. Poll DSR until the busy bit is clear.
2. Write IR2, then IR1.
3. For output, wait for busy to clear, then read DR.

Writes to IR1 or BAR/CMR while busy are ignored. The top level also asserts that no
start arrives while busy.

## Where this model fills gaps or departs from the thesis

- One clock per bit cycle, in place of read/write half cycles. D_B is combinational.
- The preset cycle is two clocks: clear, then preset. Shifts, MSG and control-bit
  transfers have no preset.
- Integer multiply interrogates multiplier bits 0–7 in eight cycles. The thesis says
  "bits 0-8", which contradicts its own eight cycles.
- The CMR is 2 bits. The thesis calls it both a 12-bit and a 2-bit register, and only
  four modes are defined.
- The bit positions of DSR busy and convergence, the BAR/CMR register address (jumper
  0776) and its field layout are this model's choices. The thesis only says such a
  register "would be necessary".
- The encodings of the SHR register field, the buffer-direction bit and the special
  opcode are this model's choices.
- Inhibit is sampled at the start of the operation. The BAR steps at the end of each
  automatic-mode transfer.
- In EX mode, bit 15 is formed as X xor Y with the carry held.
- SSR works only on M3–M15.
- Memories and flip-flops are cleared by reset. The thesis's memories have no reset.
- The associative flip-flops and priority detector, which the thesis proposes as an
  extension, are built. Their instruction bit and register address are this model's
  choices.
- Division, floating point and transcendental functions are host programs
  (microprogramming) in the thesis too, so they have no hardware here.

## Simulation

Every module has its own self-checking testbench in `tb/`:
- each prints `TB_RESULT checks=… failures=…`;
- each has a watchdog;
- each checks cycle counts where timing matters.

For example:

```
verilator --binary --timing --assert -Irtl rtl/hpcs_pkg.sv rtl/*.sv tb/tb_hpcs_top.sv --top-module tb_hpcs_top
./obj_dir/Vtb_hpcs_top
```

- `tb_hpcs_top` runs a 4 × 5 array end to end through the bus. It exercises and counts
  every mechanism: direct, concatenated and automatic addressing; all four CMR modes;
  neighbour transfers; row and column buffer transposition; conditional inhibit;
  multiply; control-bit transfer; the convergence flag both setting and clearing; and
  the associative search with its priority readout.
- `tb_laplace` solves Laplace's equation on a 6 × 6 mesh by Jacobi iteration:
  - the boundary cells are fixed by unconditional inhibit;
  - the host loops until the convergence flag is set (37 iterations);
  - every cell is checked against a model of the same integer arithmetic.
- `tb_hpcs_top_large` runs a 16 × 16 array, the largest size simulated here. It does a
  broadcast, whole-array addition, a neighbour move and a last-row-to-last-column
  transposition, and reads back the corner and centre cells through the BAR.
  - The default 63 × 63 configuration passes lint and elaboration.
  - Under verilator its C++ build takes well over ten minutes because of the 4032 cell
    instances, so no testbench here runs at the full default size.
  - Nothing in the RTL depends on the array size beyond the parameters: the decoders
    are always 6-to-64, and the buffer is max(ROWS, COLS) cells.
- `tb_cell_array` uses a 3 × 4 array, so the buffer is longer than one side of the array.
