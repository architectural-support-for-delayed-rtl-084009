// libra_partial_unify: the LIBRA unify schema, from tag latch to the action of
// the selected operation.
// 1. When an instruction that sets the condition codes is in register fetch
//    (set_cc), the tags of its two operands are latched.
// 2. During the decoding of every later instruction the latched tags and the
//    zero status flag address the 64 x 8 partial unify mapping ROM.
// 3. If the opcode being decoded is unify (111000), the microcode address
//    multiplexer takes the mapping ROM output instead of the opcode mapping.
// 4. The address reads the microcode ROM, and
// 5. the selected microword is latched and controls the next (execute) cycle,
//    where unify_exec turns it into a store (bind), load (dereference, with
//    PC-2 so that the condition-setting instruction and unify run again),
//    goto (fail or call of the recursive unifier) or nop.
// Operands are LIBRA words with a separate 3-bit tag and a value field; a
// variable's value is the address of its cell. The value width (32) and the
// address taken from the low value bits are this design's choices.
// Timing: unify decoded in cycle t is executed in cycle t+1 (one cycle per
// schema); ex_a/ex_b are the unify operands presented in that execute cycle.
module libra_partial_unify
  import unify_pkg::*;
  import libra_pkg::*;
#(
  parameter int unsigned VALUE_W = 32,
  parameter int unsigned AW      = 32
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // register fetch of a condition-setting instruction
  input  logic                         set_cc,
  input  logic [LIBRA_TAG_W-1:0]       op1_tag,
  input  logic [LIBRA_TAG_W-1:0]       op2_tag,
  // processor status
  input  logic                         zero,       // Z flag set by the last condition-setting instruction
  // decode
  input  logic                         dec_valid,
  input  logic [LIBRA_OPC_W-1:0]       opcode,
  output logic                         dec_is_unify,
  // execute
  input  logic [LIBRA_TAG_W+VALUE_W-1:0] ex_a,     // operand A word {tag, value}
  input  logic [LIBRA_TAG_W+VALUE_W-1:0] ex_b,     // operand B word {tag, value}
  output libra_uword_t                 uword,      // latched microword
  output logic                         mem_we,
  output logic [AW-1:0]                mem_waddr,
  output logic [LIBRA_TAG_W+VALUE_W-1:0] mem_wdata,
  output logic                         ld_req,
  output logic [AW-1:0]                ld_addr,
  output logic                         ld_to_b,
  output logic                         pc_back2,   // re-execute the previous two instructions
  output logic                         fail,
  output logic                         call
);

  localparam int unsigned W = LIBRA_TAG_W + VALUE_W;

  logic [LIBRA_TAG_W-1:0]   tag_a, tag_b;
  logic [LIBRA_UADDR_W-1:0] map_uaddr, uaddr;

  tag_latch #(.TAG_W(LIBRA_TAG_W)) u_tag_latch (
    .clk, .rst_n, .set_cc,
    .tag_a_in(op1_tag), .tag_b_in(op2_tag),
    .tag_a, .tag_b
  );

  libra_unify_map_rom u_map_rom (
    .tag_a, .tag_b, .zero, .uaddr(map_uaddr)
  );

  libra_uaddr_select u_sel (
    .opcode, .map_uaddr, .is_unify(dec_is_unify), .uaddr
  );

  libra_ucode_rom u_ucode (
    .clk, .rst_n, .dec_valid, .uaddr, .uword
  );

  unify_exec #(.W(W), .AW(AW)) u_exec (
    .valid     (uword.valid && uword.is_unify),
    .uop       (uword.uop),
    .word_a    (ex_a),
    .word_b    (ex_b),
    .addr_a    (ex_a[AW-1:0]),
    .addr_b    (ex_b[AW-1:0]),
    .mem_we, .mem_waddr, .mem_wdata,
    .ld_req, .ld_addr, .ld_to_b,
    .fail, .call
  );

  assign pc_back2 = uword.valid && uword.is_unify && uword.pc_back2;

  // PC-2 goes with, and only with, a dereferencing load.
  a_back2_load: assert property (@(posedge clk) disable iff (!rst_n) pc_back2 == ld_req)
    else $error("libra_partial_unify: PC-2 without a load, or a load without PC-2");

endmodule
