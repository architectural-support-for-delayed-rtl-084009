// unify_pkg: operations that a partial-unification schema can be specialized into.
// Both the LIBRA control path and the SPARC extension select one of these per
// execution of unify; unify_exec turns the selected operation into its action.
// The set follows the legends of the two unification tables (bind junior to
// senior, bind A to B, bind B to A, fail if A != B, fail always, call the
// recursive unifier if A != B, load A, load B). The 3-bit encoding is this
// design's own choice.
package unify_pkg;

  typedef enum logic [2:0] {
    UOP_NOP     = 3'd0,  // success, nothing to do
    UOP_BIND_A  = 3'd1,  // bind A to B: store B into the cell of variable A
    UOP_BIND_B  = 3'd2,  // bind B to A: store A into the cell of variable B
    UOP_BIND_JR = 3'd3,  // two unbound variables: bind the junior one to the senior one
    UOP_LOAD_A  = 3'd4,  // A is a bound variable: dereference it (A <- mem[A])
    UOP_LOAD_B  = 3'd5,  // B is a bound variable: dereference it (B <- mem[B])
    UOP_FAIL    = 3'd6,  // goto the failure routine
    UOP_CALL    = 3'd7   // call the recursive (general) unifier
  } uop_e;

endpackage
