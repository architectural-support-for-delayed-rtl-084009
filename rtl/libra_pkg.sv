// libra_pkg: types and constants of the LIBRA partial-unification control path.
// The eight operand types are the rows and columns of the LIBRA unification
// table; their 3-bit codes (table order) are this design's choice. The unify
// opcode is the bit string 111000 that enables the mapping ROM output. The
// microword holds only the fields this control path produces; the rest of
// the LIBRA microword is not modelled.
package libra_pkg;
  import unify_pkg::*;

  typedef enum logic [2:0] {
    LT_BOUND  = 3'd0,  // bound variable (reference to another cell)
    LT_UNB    = 3'd1,  // unbound variable
    LT_INT    = 3'd2,
    LT_SYM    = 3'd3,
    LT_LIST1  = 3'd4,
    LT_LIST2  = 3'd5,
    LT_STRUC1 = 3'd6,
    LT_STRUC2 = 3'd7
  } libra_tag_e;

  localparam int unsigned LIBRA_TAG_W   = 3;
  localparam int unsigned LIBRA_OPC_W   = 6;
  localparam int unsigned LIBRA_UADDR_W = 8;
  localparam logic [LIBRA_OPC_W-1:0] LIBRA_UNIFY_OPC = 6'b111000;

  // Microcode address map (this design's choice):
  //   00oooooo : ordinary instruction with opcode oooooo (opcode mapping)
  //   10uuuc0z : unify operation uuu; c = conditional on Z; z = zero flag (A = B)
  localparam logic [1:0] UA_REGION_OPC   = 2'b00;
  localparam logic [1:0] UA_REGION_UNIFY = 2'b10;

  // Latched microword driving the execute stage.
  typedef struct packed {
    logic                   valid;     // a microword is being executed
    logic                   is_unify;  // word belongs to the unify schema
    uop_e                   uop;       // unify operation (UOP_NOP for instructions)
    logic                   pc_back2;  // re-execute the condition-setting instruction and unify (PC-2)
    logic [LIBRA_OPC_W-1:0] opcode;    // ordinary instruction: opcode for the datapath control
  } libra_uword_t;

endpackage
