// sparc_unify_decoder: the unify part of the modified SPARC instruction
// decoder. SPARC has no microcode, so the specialization function is random
// logic: when the instruction in decode is unify, the two latched 2-bit tags
// and the Z flag select the operation of the SPARC unification table:
//   A bound                -> load A, set Z
//   B bound (A not bound)  -> load B, set Z
//   unbound / unbound      -> bind junior to senior
//   unbound / atom, struc  -> bind A to B;  atom, struc / unbound -> bind B to A
//   atom / atom            -> fail if A != B
//   struc / struc          -> call recursive unifier if A != B
//   atom / struc, struc / atom -> fail always
// Unify writes Z: 1 after a dereferencing load, so that a following "branch
// if equal" back to the condition-setting instruction repeats unify until both
// operands are dereferenced; 0 otherwise (this clearing is this design's
// choice). "A != B" is the inverse of the Z flag of the preceding subtract of
// the two full words, whose bit 31 separates integers from symbols and lists
// from structures.
// Interface: combinational.
module sparc_unify_decoder
  import unify_pkg::*;
  import sparc_unify_pkg::*;
(
  input  logic        dec_valid,
  input  logic [31:0] instr,      // instruction word in decode
  input  logic [1:0]  tag_a,      // latched tag of rs1
  input  logic [1:0]  tag_b,      // latched tag of rs2
  input  logic        zero,       // icc.Z from the last condition-setting instruction
  output logic        is_unify,
  output uop_e        uop,
  output logic        z_new       // value unify writes into icc.Z
);

  sparc_tag_e a, b;

  assign a = sparc_tag_e'(tag_a);
  assign b = sparc_tag_e'(tag_b);
  assign is_unify = dec_valid && (instr[31:30] == SPARC_OP_ARITH) && (instr[24:19] == SPARC_OP3_UNIFY);

  always_comb begin
    if (a == ST_BOUND)                   uop = UOP_LOAD_A;
    else if (b == ST_BOUND)              uop = UOP_LOAD_B;
    else if (a == ST_UNB && b == ST_UNB) uop = UOP_BIND_JR;
    else if (a == ST_UNB)                uop = UOP_BIND_A;
    else if (b == ST_UNB)                uop = UOP_BIND_B;
    else if (a != b)                     uop = UOP_FAIL;
    else if (a == ST_ATOM)               uop = zero ? UOP_NOP : UOP_FAIL;
    else                                 uop = zero ? UOP_NOP : UOP_CALL;
    if (!is_unify) uop = UOP_NOP;
    z_new = is_unify && (uop == UOP_LOAD_A || uop == UOP_LOAD_B);
  end

endmodule
