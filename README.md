# P.LISP — a microprogrammed LISP processor

P.LISP is a processor meant to run the LISP interpreter as microcode rather than
as a machine-language program. The interpreter's primitives (CAR/CDR chains,
CONS, EQ, property-list search, garbage collection) are microroutines that call
each other recursively through a hardware push-down stack. That way the machine
spends its memory cycles on list data instead of on fetching and decoding
instructions. The microcode lives in the shared primary memory of the host
system (C.ai), so it can be rewritten. A microprogram cache keeps the
most-used microwords close to the engine. A second cache fronts the same memory
for LISP programs and data.

This repository holds synthesizable SystemVerilog for the processor, a
self-checking testbench for every block, and an end-to-end testbench. That
testbench runs real microprograms, including a structure-access walk, a
recursive call and return, a property-table search and self-modifying
microcode, on the design at its default sizes. A second whole-processor
testbench runs the LISP functions CONS, EQ, a recursive EQUAL and the
property-list search GET as microcode.

## Words carry their type

Every 64-bit word has a 4-bit TYPE in its leftmost bits. Microwords carry one
too. The RTL numbers bits like the register descriptions do: bit 0 is the
**leftmost** bit. All words are declared `logic [0:63]`, so the field
`CELL<40:63>` is simply `word[40:63]`.

| word | fields |
|---|---|
| list cell | TYPE<0:3> GC<4:5> UUB<6:11> AM1<12:13> CAR<14:37> AM2<38:39> CDR<40:63> |
| property-list element | TYPE GC PN<6:11> AM1 VL<14:37> AM2 NP<40:63> |
| pointer | TYPE GC … AM2<38:39> ADDR<40:63> |
| structure access vector | TYPE GC COUNTER<6:11> VECTOR<12:63> |
| saved UPC | TYPE='UPC', displacement in <48:63> |

The numeric type codes are listed in `plisp_pkg` (`wtype_e`). They are this
design's own encoding.

## The micro-engine

```
            microbase + UPC                         Mp port (req/ack)
 micro_sequencer ──► micro_cache ─┐         ┌─ mp_arbiter ◄─ data_cache ◄── MAR/MBR
      ▲                 │ microword          │
      │           micro_decoder              │
      │  jumps          │ controls           │
      └──── conditions ─┼──────────────┬─────┘
                        ▼              ▼
    local_store (R, T, A[16], F[16], PDT, ODT) + STACK, SAVCR, IAR, MAR, MBR, UPC
        │ bus 1: byte_transfer        │ bus 2: byte_transfer      │ L(3)/L(4)
        └──────────── writes ◄────────┴────────────────────────── alu_unit (S(5))
```

One microword executes per clock. All reads are combinational, and every
register write happens at the clock edge that ends the microword. The engine
waits (stalls) in three cases:

* the microword is not in the microprogram cache (refill from Mp);
* the microword starts a memory read or write that the data cache has not
  finished;
* the microword stores an ALU result that has not settled yet.

While the engine waits, nothing changes state except the caches and the ALU.

### Microword formats

The six formats (OP = bits <4:6>) follow the processor's microword layouts.
Bits <59:61> release the bus 1 latch, the bus 2 latch and the ALU in any format.

| OP | does | fields |
|---|---|---|
| 1 | ALU launch, a full-word transfer, an indirect transfer | ALUE<7> B1<8:15> B2<16:23> FN<24:28>; TFE<29> TBS<30> R1<31:38> R2<39:46>; ITFE<47> ITFT<48> ITBS<49> Ri<50:57> |
| 2 | byte transfer R2<IBP2:FBP2> ← R1<IBP1:…>, optional jump | TBS<7> R1<8:15> IBP1<16:21> R2<22:29> IBP2<30:35> FBP2<36:41> JE<42> NEXT<43:58> |
| 3 | store ALU result, two parallel transfers | SALUE<7> TBS<8> R1<9:16>; B1: E<17> src<18:25> dst<26:33>; B2: E<34> src<35:42> dst<43:50> |
| 4 | jump on conditions | sense<7>, condition select<8:42>, target<43:58> |
| 5 | set/reset conditions, commands | commands<7:18>, set flags<19:38>, reset flags<39:58> |
| 6 | compare a byte with an immediate pattern, jump on (not) equal | BS<7> R1<8:15> IBP1<16:21> BL<22:25> pattern<26:41> JC<42> target<43:58> |

The layouts of formats 4 and 5 are this design's own, because the original
leaves their condition fields open:

* **Format 4.** A direct mask selects any of 35 conditions: the 20 flags,
  SAV counter zero, LASTBIT, ALU zero/negative/carry/ready, stack
  empty/full, and 7 external inputs. With sense 0 it jumps if any selected
  condition is 1. With sense 1 it jumps if none is. Sense 1 with an empty mask
  is an unconditional jump.
* **Format 5.** It carries the commands the register-transfer microcode
  needs but has no field for: `MBR←M[MAR]`, `M[MAR]←MBR`, flush the
  microprogram cache, IAR ±1, SAV pop/push, and halt.

A microword whose TYPE is not "microcommand", or whose OP is 0 or 7, stops the
engine with `uerr`.

### Two buses with byte-transfer switches

Both buses carry one transfer per microword. Every transfer goes through a
byte-transfer switch pair, and a full-word move is just the byte 0..63. The
switch (`byte_transfer`) is the "diagonal" matrix:

* A one-hot input diagonal picks the first source bit i and drives transfer
  line t[m] from src[i+m].
* A one-hot output diagonal picks the first destination bit j and drives
  out[j+m] from t[m].
* `byte_mask_gen` builds the enable mask IBP2..FBP2 with two ripple chains
  running toward each other. Bits outside the mask keep the destination's old
  value.

This is the variant with the cheapest control: three 6-bit fields and about
4096 two-input AND gates. Any contiguous field can be moved anywhere without
shifting code, for example `MAR ← R2<CAR>`, which is `R2<14:37>` into
`MAR<40:63>`. A format-6 compare uses the same switch to bring the byte to the
right-hand end of a zero word.

### The asynchronous ALU

A format-1 microword latches two operands and a function into the ALU. The
microprogram goes on, and a later format-3 microword stores the result over one
of the buses. The simplest function needs two microsteps: launch, then store in
the very next microword. The adder functions (add, subtract, increment,
decrement, negate) take one microstep more (`ARITH_STEPS = 3`, this design's
choice). A store that comes too early makes the engine wait instead of storing
garbage. The release bit clears the latched operands and the result.

### Local memory and the special registers

Register fields are 8 bits wide, so the local memory has 256 addresses
(`plisp_pkg` gives the map):

| address | register |
|---|---|
| 00 | ZERO (reads 0) |
| 01–06 | R1 R2 R3 T1 T2 T3 |
| 08 | **STACK**: a write pushes, a read pops |
| 09 | **UPC**: a read gives a TYPE-UPC word holding UPC+1, a write jumps |
| 0A | SAVCR |
| 0B | IAR (8 bits) |
| 0C / 0D | MAR (24 bits, word <40:63>) / MBR |
| 0E | flags (read only) |
| 10–1F | A[0..15], argument registers |
| 20–2F | F[0..15] |
| 40–7F | PDT[0..63], property descriptor table (TYPE + 24-bit pointer kept) |
| 80–BF | ODT[0..63], operator descriptor table (TYPE + 16-bit pointer kept) |

**Recursion.** STACK and UPC make the microcode recursive without any call or
return hardware:

* **Call.** A format-2 microword moves UPC to STACK (which pushes UPC+1) and
  jumps to the routine.
* **Return.** `T1←STACK`, then a format-6 compare of T1's TYPE with 'UPC'
  that loops back while they differ, then `UPC←T1`. Each loop pops one more
  word, so a return also discards whatever the routine left on the stack.

**IAR.** IAR indexes the whole local memory for the indirect transfer of
format 1. It is how microcode scans the PDT and the ODT: load IAR with
`40h + index`, read `M(LOCAL)[IAR]`, step IAR with a format-5 command.

### SAVCR: following a path of CARs and CDRs

A structure access vector encodes a path such as
`(CADDR (CDDDDR (CAR L)))` as up to 52 bits, 0 for CAR and 1 for CDR, plus a
6-bit count. SAVCR is a mod-64 up/down counter and a 52-bit shift register used
as a bit stack whose top is the rightmost bit (LASTBIT). The CHAIN microroutine
does the following until the counter is zero:

1. Load the vector into SAVCR.
2. Read the current cell.
3. Test LASTBIT and move CAR or CDR into MAR with one byte transfer.
4. Pop SAVCR, which halves the vector and decrements the counter.

The end-to-end testbench runs this routine.

### Caches and the memory port

Microword addresses in Mp are `microbase + UPC`. The operating system chooses
the microbase per language.

* **Microprogram cache** (`micro_cache`, 1024 words): direct-mapped with
  one-word lines. It fetches a missing word over the shared port.
* **Data cache** (`data_cache`, 2048 words): direct-mapped and write-through.
  A read hit completes in the same cycle.
* **Arbiter** (`mp_arbiter`): joins the two caches onto one req/ack port and
  favours the microprogram cache.

Microcode that rewrites microwords in Mp uses the flush command so that the
new words are fetched again. The `ucache_flush` input does the same from
outside.

## Top-level ports (`plisp_top`)

| port | purpose |
|---|---|
| `microbase[23:0]`, `start`, `start_disp[15:0]` | select the language's microcode; start at a displacement |
| `host_we/host_addr/host_wdata`, `host_raddr/host_rdata` | load a register (e.g. arguments in A[ ]) while stopped; inspect any register |
| `mp_req/mp_we/mp_addr/mp_wdata`, `mp_ack/mp_rdata` | primary-memory port: req held until a one-cycle ack |
| `running`, `uerr`, `upc` | engine state |
| `flags[19:0]` | condition bits microcode sets/resets for the outside world (bit 0 = ERRORFLAG, bit 1 = IFLAG) |
| `ext_in[6:0]` | outside conditions testable by format 4 |
| `ucache_flush` | invalidate the microprogram cache |
| `stack_overflow/underflow`, `bus1_latch/bus2_latch` | status |

Parameters: `LS_REGS=256`, `STACK_DEPTH=64`, `UCACHE_WORDS=1024`,
`DCACHE_WORDS=2048`, `ALU_LOGIC_STEPS=2`, `ALU_ARITH_STEPS=3`.

## Where this RTL goes beyond or departs from the original description

The original fixes the register set, the word and microword layouts, the byte
switch, the SAV unit and the overall organisation. It leaves much open, and
this RTL fills those gaps as follows:

* Numeric type codes, the local-memory address map and the ALU function set
  are this design's own.
* Format 4 uses a direct condition mask: its 36-bit field is a sense bit and
  35 condition-select bits. Format 5 is split into commands, flag-set bits
  and flag-reset bits.
* The original UPC is a 20-bit register: a 4-bit TYPE and a 16-bit
  displacement. Here it travels on a 64-bit bus as a TYPE-UPC word with the
  displacement in bits <48:63> and zeros between the two.
* Memory reads and writes are format-5 commands, because no microword field
  exists for them.
* In the byte-transfer format, FBP2 is taken at bits <36:41>. The textual
  field list gives it the same bits as IBP2, and <36:41> is the only free
  place.
* A compare's byte length is BL+1 bits (1..16).
* Cache organisations and sizes are this design's own. The microprogram
  cache has 1024 words. The data cache's 2048 words follow a remark that 2K
  words serve LISP well.
* Stack depth (64) and its overflow and underflow behaviour are this design's
  own.
* The ALU makes the engine wait for an unsettled result. In the original, the
  microprogrammer counts "safe" microsteps.
* The host register port is an addition. It stands in for the operating
  system placing arguments.
* Not built: the operating system and the garbage collectors are microcode
  and software, not hardware. Floating point and compact-list variants are
  only suggested in the original. The 100 ns microcycle is a timing target
  that RTL does not model.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
Run them from the repository root with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_plisp_top rtl/plisp_pkg.sv tb/tb_plisp_top.sv
./obj_dir/Vtb_plisp_top
```

* `tb/plisp_asm_pkg.sv` is a small microword assembler, one function per
  format plus helpers (`mov`, `call`, `jmp`, `salu`, `jtype`, ...). Use it to
  write new microprograms.
* `tb/mp_model.sv` models the primary-memory port with a fixed latency.
* `tb_plisp_top` runs the design at its default parameters. Its checks:
  * 40 CHAIN calls over a random 256-cell list structure with vectors of 0..52
    steps. Each result is compared with a reference walk and written back to
    Mp.
  * An argument of the wrong type, which must set ERRORFLAG.
  * A PDT search.
  * Self-modifying microcode.
  * The ALU wait, cycle-exact.
  * That every mechanism happens at least once: both cache miss kinds,
    data-cache hits, ALU and memory waits, stack push and pop, return through
    UPC, byte transfers, compare and condition jumps, indirect transfers, SAV
    steps, IAR counting, cache flush and memory writes.

  It finishes in well under a second.
* `tb_plisp_lisp` also runs the processor at its default sizes. It runs four
  LISP functions written as microcode:
  * CONS calls GETCELL, which takes the next free cell and advances the free
    pointer with the ALU. CONS then builds the new cell with four byte
    transfers and writes it to memory. The test builds a 12-element list this
    way and checks every cell. A non-pointer argument must set ERRORFLAG.
  * EQ returns TRUE or NIL from an ALU comparison.
  * EQUAL recurses on CARs and iterates on CDRs. It pushes a CORK marker,
    saves both CDR pointers on the stack and calls itself through a saved UPC.
    On the first mismatch it pops everything down to the CORK.

  * GET searches an atom's property list. Each element carries a 6-bit
    property number. IAR is pointed at that PDT entry. GET compares the entry
    with the wanted property. GETI (which sets IFLAG) compares the index
    itself. The search follows the next-element pointers until it finds a
    match or an element marked as last. Forty random lists are searched for
    present and absent properties, with both flavours.

  The test compares EQUAL on 30 pairs of random nested lists with a
  reference. The pairs are equal copies, copies with one atom changed, and
  unrelated lists. After every call the stack must be empty.
* Unit testbenches: `tb_byte_mask_gen` (exhaustive), `tb_byte_transfer`,
  `tb_savcr_unit`, `tb_alu_unit`, `tb_pushdown_stack`, `tb_local_store`,
  `tb_micro_decoder`, `tb_micro_cache`, `tb_data_cache`, `tb_mp_arbiter` and
  `tb_micro_sequencer` each compare their block with an independent model.
