// libra_unify_map_rom: the LIBRA partial unify mapping ROM, i.e. the
// specialization function of the unify schema.
// A 64 x 8 read-only memory is indexed by the two latched 3-bit operand tags
// {tag_a, tag_b}. Each word is the microcode address of the operation for that
// pair of types, following the unification table with dereferencing:
//   A bound                 -> load A, PC-2 (dereference A and repeat)
//   B bound (A not bound)   -> load B, PC-2
//   unbound / unbound       -> bind junior to senior
//   unbound / other         -> bind A to B;  other / unbound -> bind B to A
//   int/int, sym/sym        -> fail if A != B
//   list1/list1, list2/list2, struc1/struc1, struc2/struc2 -> call unifier if A != B
//   every other pair        -> fail always
// Word format (this design's choice): {2'b10, uop[2:0], cond, 2'b00}. For a
// conditional word (cond = 1) the zero flag, set by the preceding sub when
// A = B, is merged into address bit 0 and selects the "A = B" microword.
// Interface: combinational; tag_a, tag_b, zero in, uaddr out.
module libra_unify_map_rom
  import unify_pkg::*;
  import libra_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 8
) (
  input  logic [LIBRA_TAG_W-1:0]   tag_a,
  input  logic [LIBRA_TAG_W-1:0]   tag_b,
  input  logic                     zero,   // zero status flag (A = B)
  output logic [LIBRA_UADDR_W-1:0] uaddr
);

  // Contents of one entry of the table.
  function automatic logic [7:0] entry(input libra_tag_e a, input libra_tag_e b);
    uop_e op;
    logic cond;
    cond = 1'b0;
    if (a == LT_BOUND)                   op = UOP_LOAD_A;
    else if (b == LT_BOUND)              op = UOP_LOAD_B;
    else if (a == LT_UNB && b == LT_UNB) op = UOP_BIND_JR;
    else if (a == LT_UNB)                op = UOP_BIND_A;
    else if (b == LT_UNB)                op = UOP_BIND_B;
    else if (a != b)                     op = UOP_FAIL;
    else if (a == LT_INT || a == LT_SYM) begin op = UOP_FAIL; cond = 1'b1; end
    else                                 begin op = UOP_CALL; cond = 1'b1; end
    return {UA_REGION_UNIFY, op, cond, 2'b00};
  endfunction

  function automatic logic [DEPTH*WIDTH-1:0] build_rom();
    logic [DEPTH*WIDTH-1:0] r;
    r = '0;
    for (int i = 0; i < DEPTH; i++)
      r[i*WIDTH +: WIDTH] = WIDTH'(entry(libra_tag_e'(i[5:3]), libra_tag_e'(i[2:0])));
    return r;
  endfunction

  localparam logic [DEPTH*WIDTH-1:0] ROM = build_rom();

  logic [5:0]       index;
  logic [WIDTH-1:0] word;

  assign index = {tag_a, tag_b};
  assign word  = ROM[index*WIDTH +: WIDTH];
  // Conditional entries: the zero flag picks the success word (A = B).
  assign uaddr = LIBRA_UADDR_W'({word[WIDTH-1:1], word[0] | (word[2] & zero)});

endmodule
