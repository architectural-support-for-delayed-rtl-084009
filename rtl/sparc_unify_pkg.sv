// sparc_unify_pkg: tag encoding and opcode of the unify schema added to SPARC.
// The 2-bit tag codes are the ones the design defines for WAM operands
// (00 bound, 01 unbound, 10 atom, 11 structure). Tags sit in the two low bits
// of a 32-bit word, the SPARC tag field. The unify instruction uses format 3
// (op = 2) with op3 = 6'h2C, a code SPARC V8 leaves unused; that encoding is
// this design's own choice.
package sparc_unify_pkg;

  typedef enum logic [1:0] {
    ST_BOUND = 2'b00,
    ST_UNB   = 2'b01,
    ST_ATOM  = 2'b10,
    ST_STRUC = 2'b11
  } sparc_tag_e;

  localparam logic [1:0] SPARC_OP_ARITH = 2'b10;
  localparam logic [5:0] SPARC_OP3_UNIFY = 6'h2C;

endpackage
