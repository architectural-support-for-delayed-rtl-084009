// sparc_unify_unit: the additions to the SPARC integer unit for the unify
// schema. Two 2-bit tag buses carry the tag fields (bits 1:0) of the rs1 and
// rs2 operand buses to the tag latches, which capture them whenever a
// condition-setting instruction (e.g. subcc) executes. The modified
// instruction decoder specializes unify from the latched tags and icc.Z; a
// decode/execute register carries the selected operation to the execute
// stage, where its action is produced and Z is written.
// Words are 32 bits; a variable holds the word address of its cell in bits
// 31:2 (AW = 30), which is this design's choice.
// Interface: set_cc with cc_rs1/cc_rs2 (operand buses of the condition-setting
// instruction), dec_valid/instr (decode), ex_rs1/ex_rs2 (unify operands in
// execute). Timing: unify decoded in cycle t acts in cycle t+1.
module sparc_unify_unit
  import unify_pkg::*;
  import sparc_unify_pkg::*;
#(
  parameter int unsigned W  = 32,
  parameter int unsigned AW = 30
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          set_cc,
  input  logic [W-1:0]  cc_rs1,
  input  logic [W-1:0]  cc_rs2,
  input  logic          icc_z,
  input  logic          dec_valid,
  input  logic [31:0]   instr,
  output logic          dec_is_unify,
  input  logic [W-1:0]  ex_rs1,
  input  logic [W-1:0]  ex_rs2,
  output logic          ex_unify,     // a unify executes this cycle
  output uop_e          ex_uop,
  output logic          z_we,         // write icc.Z
  output logic          z_wdata,
  output logic          mem_we,
  output logic [AW-1:0] mem_waddr,
  output logic [W-1:0]  mem_wdata,
  output logic          ld_req,
  output logic [AW-1:0] ld_addr,
  output logic          ld_to_b,
  output logic          fail,
  output logic          call
);

  logic [1:0] tag_a, tag_b;
  uop_e       dec_uop;
  logic       dec_z;

  tag_latch #(.TAG_W(2)) u_tag_latch (
    .clk, .rst_n, .set_cc,
    .tag_a_in(cc_rs1[1:0]), .tag_b_in(cc_rs2[1:0]),
    .tag_a, .tag_b
  );

  sparc_unify_decoder u_dec (
    .dec_valid, .instr, .tag_a, .tag_b, .zero(icc_z),
    .is_unify(dec_is_unify), .uop(dec_uop), .z_new(dec_z)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_unify <= 1'b0;
      ex_uop   <= UOP_NOP;
      z_wdata  <= 1'b0;
    end else begin
      ex_unify <= dec_is_unify;
      ex_uop   <= dec_uop;
      z_wdata  <= dec_z;
    end
  end

  assign z_we = ex_unify;

  // unify sets Z exactly when it dereferences.
  a_z_load: assert property (@(posedge clk) disable iff (!rst_n) ex_unify |-> (z_wdata == ld_req))
    else $error("sparc_unify_unit: Z does not match the dereferencing load");

  unify_exec #(.W(W), .AW(AW)) u_exec (
    .valid  (ex_unify),
    .uop    (ex_uop),
    .word_a (ex_rs1),
    .word_b (ex_rs2),
    .addr_a (ex_rs1[AW+1:2]),
    .addr_b (ex_rs2[AW+1:2]),
    .mem_we, .mem_waddr, .mem_wdata,
    .ld_req, .ld_addr, .ld_to_b,
    .fail, .call
  );

endmodule
