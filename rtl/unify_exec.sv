// unify_exec: the action of the operation selected by a partial-unification
// schema, for the execute stage.
//   bind A to B / B to A : store the other operand word into the variable's cell
//   bind junior to senior: both are unbound variables; the one at the higher
//                          address (the younger) is bound to the other; two
//                          references to the same cell bind nothing
//   load A / load B      : read the cell the bound variable refers to, to
//                          replace that operand (dereference step)
//   fail / call          : branch to the failure routine / call the general
//                          recursive unifier
//   nop                  : the operands unify, nothing to do
// Which variable is the junior one and the "same cell" rule are this design's
// choices (the usual WAM age order: higher address is younger).
// Interface: combinational. addr_a/addr_b are the cell addresses carried by
// the operands (only meaningful for variables), word_a/word_b the full words.
module unify_exec
  import unify_pkg::*;
#(
  parameter int unsigned W  = 32,
  parameter int unsigned AW = 32
) (
  input  logic          valid,      // a unify operation executes this cycle
  input  uop_e          uop,
  input  logic [W-1:0]  word_a,
  input  logic [W-1:0]  word_b,
  input  logic [AW-1:0] addr_a,
  input  logic [AW-1:0] addr_b,
  output logic          mem_we,     // binding store
  output logic [AW-1:0] mem_waddr,
  output logic [W-1:0]  mem_wdata,
  output logic          ld_req,     // dereference load
  output logic [AW-1:0] ld_addr,
  output logic          ld_to_b,    // 0: loaded word replaces A, 1: replaces B
  output logic          fail,       // goto failure routine
  output logic          call        // call recursive unifier
);

  always_comb begin
    mem_we    = 1'b0;
    mem_waddr = addr_a;
    mem_wdata = word_b;
    ld_req    = 1'b0;
    ld_addr   = addr_a;
    ld_to_b   = 1'b0;
    fail      = 1'b0;
    call      = 1'b0;
    if (valid) begin
      unique case (uop)
        UOP_NOP: ;
        UOP_BIND_A: mem_we = 1'b1;
        UOP_BIND_B: begin
          mem_we    = 1'b1;
          mem_waddr = addr_b;
          mem_wdata = word_a;
        end
        UOP_BIND_JR: begin
          if (addr_a > addr_b) begin
            mem_we = 1'b1;
          end else if (addr_b > addr_a) begin
            mem_we    = 1'b1;
            mem_waddr = addr_b;
            mem_wdata = word_a;
          end
        end
        UOP_LOAD_A: ld_req = 1'b1;
        UOP_LOAD_B: begin
          ld_req  = 1'b1;
          ld_addr = addr_b;
          ld_to_b = 1'b1;
        end
        UOP_FAIL: fail = 1'b1;
        UOP_CALL: call = 1'b1;
        default: ;
      endcase
    end
  end

  // At most one kind of action per operation.
  always_comb begin
    assert ($onehot0({mem_we, ld_req, fail, call}))
      else $error("unify_exec: more than one action selected");
  end

endmodule
