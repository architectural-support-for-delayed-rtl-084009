// delayed_spec_top: partial unification as a delayed-specialization schema,
// in the two machines it is described for, side by side.
//  - l_*: the LIBRA control path (libra_partial_unify): a microcoded decoder
//    in which the unify opcode steers the microcode address multiplexer to a
//    64 x 8 mapping ROM indexed by the latched operand tags.
//  - s_*: the SPARC integer-unit extension (sparc_unify_unit): 2-bit tag
//    buses, tag latches and a modified random-logic instruction decoder.
// The two share no hardware. The register files, status registers, program
// counters and memory of both machines are outside this module; their signals
// are the ports below. Timing of both: a unify decoded in cycle t acts in
// cycle t+1.
module delayed_spec_top
  import unify_pkg::*;
  import libra_pkg::*;
#(
  parameter int unsigned LIBRA_VALUE_W = 32,
  parameter int unsigned LIBRA_AW      = 32,
  parameter int unsigned SPARC_W       = 32,
  parameter int unsigned SPARC_AW      = 30
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // ---------------- LIBRA ----------------
  input  logic                                  l_set_cc,
  input  logic [LIBRA_TAG_W-1:0]                l_op1_tag,
  input  logic [LIBRA_TAG_W-1:0]                l_op2_tag,
  input  logic                                  l_zero,
  input  logic                                  l_dec_valid,
  input  logic [LIBRA_OPC_W-1:0]                l_opcode,
  output logic                                  l_dec_is_unify,
  input  logic [LIBRA_TAG_W+LIBRA_VALUE_W-1:0]  l_ex_a,
  input  logic [LIBRA_TAG_W+LIBRA_VALUE_W-1:0]  l_ex_b,
  output libra_uword_t                          l_uword,
  output logic                                  l_mem_we,
  output logic [LIBRA_AW-1:0]                   l_mem_waddr,
  output logic [LIBRA_TAG_W+LIBRA_VALUE_W-1:0]  l_mem_wdata,
  output logic                                  l_ld_req,
  output logic [LIBRA_AW-1:0]                   l_ld_addr,
  output logic                                  l_ld_to_b,
  output logic                                  l_pc_back2,
  output logic                                  l_fail,
  output logic                                  l_call,
  // ---------------- SPARC ----------------
  input  logic                                  s_set_cc,
  input  logic [SPARC_W-1:0]                    s_cc_rs1,
  input  logic [SPARC_W-1:0]                    s_cc_rs2,
  input  logic                                  s_icc_z,
  input  logic                                  s_dec_valid,
  input  logic [31:0]                           s_instr,
  output logic                                  s_dec_is_unify,
  input  logic [SPARC_W-1:0]                    s_ex_rs1,
  input  logic [SPARC_W-1:0]                    s_ex_rs2,
  output logic                                  s_ex_unify,
  output uop_e                                  s_ex_uop,
  output logic                                  s_z_we,
  output logic                                  s_z_wdata,
  output logic                                  s_mem_we,
  output logic [SPARC_AW-1:0]                   s_mem_waddr,
  output logic [SPARC_W-1:0]                    s_mem_wdata,
  output logic                                  s_ld_req,
  output logic [SPARC_AW-1:0]                   s_ld_addr,
  output logic                                  s_ld_to_b,
  output logic                                  s_fail,
  output logic                                  s_call
);

  libra_partial_unify #(.VALUE_W(LIBRA_VALUE_W), .AW(LIBRA_AW)) u_libra (
    .clk, .rst_n,
    .set_cc(l_set_cc), .op1_tag(l_op1_tag), .op2_tag(l_op2_tag), .zero(l_zero),
    .dec_valid(l_dec_valid), .opcode(l_opcode), .dec_is_unify(l_dec_is_unify),
    .ex_a(l_ex_a), .ex_b(l_ex_b), .uword(l_uword),
    .mem_we(l_mem_we), .mem_waddr(l_mem_waddr), .mem_wdata(l_mem_wdata),
    .ld_req(l_ld_req), .ld_addr(l_ld_addr), .ld_to_b(l_ld_to_b),
    .pc_back2(l_pc_back2), .fail(l_fail), .call(l_call)
  );

  sparc_unify_unit #(.W(SPARC_W), .AW(SPARC_AW)) u_sparc (
    .clk, .rst_n,
    .set_cc(s_set_cc), .cc_rs1(s_cc_rs1), .cc_rs2(s_cc_rs2), .icc_z(s_icc_z),
    .dec_valid(s_dec_valid), .instr(s_instr), .dec_is_unify(s_dec_is_unify),
    .ex_rs1(s_ex_rs1), .ex_rs2(s_ex_rs2),
    .ex_unify(s_ex_unify), .ex_uop(s_ex_uop), .z_we(s_z_we), .z_wdata(s_z_wdata),
    .mem_we(s_mem_we), .mem_waddr(s_mem_waddr), .mem_wdata(s_mem_wdata),
    .ld_req(s_ld_req), .ld_addr(s_ld_addr), .ld_to_b(s_ld_to_b),
    .fail(s_fail), .call(s_call)
  );

endmodule
