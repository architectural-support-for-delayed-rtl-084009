# Partial unification as a one-cycle schema (LIBRA and SPARC)

Prolog spends close to half its time in unification. In the Warren Abstract Machine (WAM), unifying two
terms means looking at both operand types, then choosing one of a few leaf actions: bind one
variable to the other term, follow a reference, compare two constants, or call a general recursive
unifier. Coded as ordinary instructions, this is a tree of compares and branches, about five
instructions deep.

The idea built here is the *schema*. A schema is an instruction word whose meaning is not fixed. When
the processor meets it, a *specialization function* picks the operation to perform from the word
and from part of the processor state. For unification that state is the tags of the two operands and
the zero flag. The whole branch tree collapses into one table lookup, done while the instruction is
decoded, so `unify` takes one cycle whatever the two types are. The selected operation is then one of:

* **store**: bind a variable;
* **load**: dereference a bound variable;
* **goto**: fail, or call the recursive unifier;
* **nop**: the terms already unify.

The same mechanism is shown in two machines, which share no hardware and stand side by side in
`delayed_spec_top`:

* **LIBRA**, a microcoded Prolog processor. The unify opcode steers the microcode address
  multiplexer to a 64 x 8 mapping ROM, which is indexed by the two latched 3-bit operand tags.
* **SPARC**, extended minimally. Two 2-bit tag buses feed tag latches, and the random-logic
  instruction decoder is modified for one new instruction, `unify`.

## How code uses the schema

The tags are not read by `unify` itself. Any instruction that sets the condition codes (in practice
a `sub`/`subcc` of the two operands) latches both operand tags. It also leaves `Z = 1` when the two
words are equal. The latched tags stay put until the next condition-setting instruction. Ordinary
instructions in between leave them alone. `unify` is then decoded against the latched tags and Z.

LIBRA sequence, with one `unify` per cycle:

```
loop: sub   A,B        ; latch tag(A), tag(B); Z = (A == B)
      unify A,B        ; selected operation; a load also does PC-2 -> back to loop
```

SPARC sequence:

```
loop: subcc A,B        ; latch tag(A), tag(B); icc.Z = (A == B)
      unify A,B        ; selected operation; sets Z after a load, clears it otherwise
      be    loop       ; repeat until both operands are dereferenced
```

On LIBRA, a load is followed by "PC-2": the program counter steps back two instructions.
The `sub` therefore runs again on the dereferenced operand, the new tags are latched, and `unify`
re-specializes. On SPARC the same loop is closed by an ordinary conditional branch on Z. If the
compiler knows no dereferencing is needed, the branch can be left out.

## The unification tables

These tables are the heart of the design. A is the first operand and B the second. "A != B" means the
Z flag from the preceding subtract is clear.

LIBRA, eight types (3-bit tag). This is the version that dereferences bound variables:

| A \ B      | Bound  | Unb      | Int      | Sym      | List1    | List2    | Struc1   | Struc2   |
|------------|--------|----------|----------|----------|----------|----------|----------|----------|
| **Bound**  | load A | load A   | load A   | load A   | load A   | load A   | load A   | load A   |
| **Unb**    | load B | bind jr→sr | bind A→B | bind A→B | bind A→B | bind A→B | bind A→B | bind A→B |
| **Int**    | load B | bind B→A | fail if A≠B | fail  | fail     | fail     | fail     | fail     |
| **Sym**    | load B | bind B→A | fail     | fail if A≠B | fail  | fail     | fail     | fail     |
| **List1**  | load B | bind B→A | fail     | fail     | call if A≠B | fail  | fail     | fail     |
| **List2**  | load B | bind B→A | fail     | fail     | fail     | call if A≠B | fail  | fail     |
| **Struc1** | load B | bind B→A | fail     | fail     | fail     | fail     | call if A≠B | fail  |
| **Struc2** | load B | bind B→A | fail     | fail     | fail     | fail     | fail     | call if A≠B |

Both loads on LIBRA also do PC-2. "call if A≠B" calls the recursive unifier, but only when the two
pointers differ. Equal structure pointers need no further work, and this is where the schema saves
most branches.

SPARC, four types. The tag is in bits 1:0: `00` bound, `01` unbound, `10` atom, `11` structure.

| A \ B     | Bound      | Unb        | Atom         | Struc        |
|-----------|------------|------------|--------------|--------------|
| **Bound** | load A, Z=1 | load A, Z=1 | load A, Z=1 | load A, Z=1 |
| **Unb**   | load B, Z=1 | bind jr→sr | bind A→B     | bind A→B     |
| **Atom**  | load B, Z=1 | bind B→A   | fail if A≠B  | fail         |
| **Struc** | load B, Z=1 | bind B→A   | fail         | call if A≠B  |

Atoms cover both integers and symbols, and structures cover both lists and structures. Bit 31 of the
word tells the two apart. The type check therefore needs no extra logic: the full-word subtract
already makes an integer and a symbol unequal.

## LIBRA control path

The path is `libra_partial_unify`. Timing: `unify` decoded in cycle t acts in cycle t+1.

1. `tag_latch` (TAG_W = 3) captures `op1_tag`/`op2_tag` when `set_cc` is high. That is the register
   fetch of the condition-setting instruction.
2. `libra_unify_map_rom` is the 64 x 8 ROM, indexed by `{tag_a, tag_b}`. Its word is a microcode
   address, `{2'b10, op[2:0], cond, 1'b0, z}`. For the conditional entries ("if A≠B"), the Z flag is
   merged into bit 0, so that Z selects the success word.
3. `libra_uaddr_select` compares the opcode in decode with `111000`. On a match, the microcode address
   comes from the mapping ROM. Otherwise it comes from the opcode mapping, which here is simply
   `{2'b00, opcode}`.
4. `libra_ucode_rom` reads the microword and latches it at the end of decode. The microword is
   `libra_uword_t`: valid, is_unify, operation, pc_back2, opcode.
5. `unify_exec` turns the latched operation and the execute-stage operands into a memory store
   (bind), a load request, PC-2, `fail` or `call`.

Operands are `{tag[2:0], value[31:0]}`. A variable's value is the address of its cell.

## SPARC extension

The path is `sparc_unify_unit`. Timing: `unify` decoded in cycle t acts in cycle t+1.

* `tag_latch` (TAG_W = 2) takes bits 1:0 of the rs1/rs2 operand buses of the condition-setting
  instruction.
* `sparc_unify_decoder` is the modified decoder. It recognises `unify` as format 3, with `op = 2` and
  `op3 = 0x2C`, a code SPARC V8 leaves unused. From the latched tags and `icc.Z` it selects the
  operation, and it gives the Z value that `unify` writes back.
* A decode/execute register holds the operation. `unify_exec` then produces the store, load, fail
  or call, together with the `icc.Z` write (`z_we`, `z_wdata`).

A variable's cell is the word address in bits 31:2 (`AW = 30`).

## Choices made in this RTL

The table contents, the one-cycle schema, the 64 x 8 ROM, the opcode `111000`, the latching rule and
the SPARC tag codes follow the published description. The following are this implementation's own:

* The 3-bit LIBRA tag codes (table order, Bound = 0 ... Struc2 = 7).
* The LIBRA word layout, 3-bit tag plus 32-bit value. The garbage-collection bits are left out.
* The microcode address map, the microword fields and the identity opcode mapping. The real LIBRA
  microcode is not available; only the unify words are defined.
* How Z enters the ROM: it is merged after the ROM rather than used as an address bit. A 64-entry ROM
  has room only for the two tags.
* "Bind junior to senior" binds the variable at the higher address (the younger one, in usual WAM
  order) to the other. Two references to the same cell bind nothing.
* On SPARC, `unify` clears Z when it does not load, so that the following branch falls through.
  Also the `unify` opcode and the tag position in bits 1:0.
* Bindings are not trailed, and fail/call only raise a flag. The failure and unifier addresses
  belong to the program-counter logic outside.

## Not included

The rest of both processors is outside `delayed_spec_top`, and its signals are the top's ports:

* LIBRA: instruction fetch ALU, trap ROM, tag, garbage-collection and value ALUs, register files,
  trail-check registers and scoreboard, forwarding, memory interface.
* SPARC: register file, ALU, shifter, PCs, state registers.

The trailing schema that goes with dereferencing and unification is only named in the source
material, so it is not built. The simpler LIBRA table without dereferencing, in which bound
variables had no entry, is an earlier version and is not built either.

## Files and simulation

`rtl/` holds one unit per file:

* packages `unify_pkg` (the operation enum), `libra_pkg` and `sparc_unify_pkg`;
* modules `tag_latch`, `libra_unify_map_rom`, `libra_uaddr_select`, `libra_ucode_rom`,
  `unify_exec`, `libra_partial_unify`, `sparc_unify_decoder`, `sparc_unify_unit` and
  `delayed_spec_top`.

Each module in `tb/` has a self-checking testbench `tb_<module>`, which prints
`TB_RESULT checks=N failures=M`.

* The leaf testbenches check the whole tables exhaustively, against character grids written
  independently of the RTL.
* `tb_libra_partial_unify`, `tb_sparc_unify_unit` and `tb_delayed_spec_top` play the instruction
  sequences above on random heaps. They include reference chains, self-references and shared
  variables. The outcome, the heap afterwards and the number of dereferencing loads are compared
  with a software unifier.
* The top testbench runs at the default parameters. It counts every table operation on both
  machines, the conditional success and failure, the ordinary-opcode path, tag holding, PC-2 and the
  branch back, and fails if one of them never happens.

Build and run any testbench with Verilator 5. The packages go first:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_delayed_spec_top \
  rtl/unify_pkg.sv rtl/libra_pkg.sv rtl/sparc_unify_pkg.sv \
  rtl/tag_latch.sv rtl/libra_unify_map_rom.sv rtl/libra_uaddr_select.sv rtl/libra_ucode_rom.sv \
  rtl/unify_exec.sv rtl/libra_partial_unify.sv rtl/sparc_unify_decoder.sv rtl/sparc_unify_unit.sv \
  rtl/delayed_spec_top.sv tb/tb_delayed_spec_top.sv -o sim
./obj_dir/sim
```

Each testbench finishes in well under a second. After coarse synthesis, the whole of `delayed_spec_top` comes to
about 116 word-level cells and 27 flip-flops. Of that, the LIBRA half has 51 cells and 18 flip-flops,
and the SPARC half has 65 cells and 9 flip-flops. The logic is small, which is the point of the scheme.
