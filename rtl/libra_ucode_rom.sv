// libra_ucode_rom: the microcode ROM and microword latch of the LIBRA decoder.
// The microcode address chosen during decode (from the opcode mapping or from
// the partial unify mapping ROM) reads one microword, which is latched at the
// end of the decode cycle and controls the following execute cycle. The full
// LIBRA microcode is not part of the design description; this ROM holds the
// words of the unify schema and, for ordinary instructions, a word that hands
// the opcode on to the (not modelled) datapath control.
// Unify region layout (this design's choice, matching libra_unify_map_rom):
//   10uuuc0z: operation uuu; a conditional word (c = 1) with z = 1 (A = B) is
//   a successful nop. Load operations also request PC-2, so the
//   condition-setting instruction and unify run again on the loaded operand.
// Interface: dec_valid qualifies uaddr; uword is the latched microword.
// Timing: one cycle from uaddr to uword.
module libra_ucode_rom
  import unify_pkg::*;
  import libra_pkg::*;
#(
  parameter int unsigned UADDR_W = LIBRA_UADDR_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               dec_valid,  // an instruction is being decoded this cycle
  input  logic [UADDR_W-1:0] uaddr,
  output libra_uword_t       uword       // latched microword (execute stage)
);

  localparam int unsigned DEPTH = 1 << UADDR_W;
  localparam int unsigned UW    = $bits(libra_uword_t);

  function automatic libra_uword_t contents(input logic [UADDR_W-1:0] a);
    libra_uword_t w;
    uop_e         op;
    w = '0;
    w.valid = 1'b1;
    if (a[7:6] == UA_REGION_OPC) begin
      w.opcode = a[5:0];
    end else if (a[7:6] == UA_REGION_UNIFY) begin
      w.is_unify = 1'b1;
      w.opcode   = LIBRA_UNIFY_OPC;
      op = uop_e'(a[5:3]);
      if (a[2] && a[0]) op = UOP_NOP;  // conditional entry and A = B: success
      w.uop      = op;
      w.pc_back2 = (op == UOP_LOAD_A) || (op == UOP_LOAD_B);
    end
    return w;
  endfunction

  function automatic logic [DEPTH*UW-1:0] build_rom();
    logic [DEPTH*UW-1:0] r;
    for (int i = 0; i < DEPTH; i++)
      r[i*UW +: UW] = contents(UADDR_W'(i));
    return r;
  endfunction

  localparam logic [DEPTH*UW-1:0] ROM = build_rom();

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         uword <= '0;
    else if (dec_valid) uword <= ROM[uaddr*UW +: UW];
    else                uword <= '0;
  end

endmodule
