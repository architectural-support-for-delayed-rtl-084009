// libra_uaddr_select: microcode address selection of the LIBRA decoder.
// A gate network recognises the unify bit string 111000 in the opcode being
// decoded; this is the second "input" of the specialization function and
// enables its output. When unify is seen the microcode address multiplexer
// passes the address from the partial unify mapping ROM; otherwise it passes
// the address from the opcode mapping. The opcode mapping (decode PLA) contents
// are not part of the design description; here opcode o maps to microcode
// address {2'b00, o}, which is this design's choice.
// Interface: combinational; opcode and map_uaddr in, uaddr and is_unify out.
module libra_uaddr_select
  import libra_pkg::*;
#(
  parameter int unsigned               OPC_W     = LIBRA_OPC_W,
  parameter logic [LIBRA_OPC_W-1:0]    UNIFY_OPC = LIBRA_UNIFY_OPC
) (
  input  logic [OPC_W-1:0]         opcode,     // opcode field of the instruction in decode
  input  logic [LIBRA_UADDR_W-1:0] map_uaddr,  // address from the unify mapping ROM
  output logic                     is_unify,
  output logic [LIBRA_UADDR_W-1:0] uaddr       // address sent to the microcode ROM
);

  logic [LIBRA_UADDR_W-1:0] opc_uaddr;

  assign is_unify  = (opcode == UNIFY_OPC);
  assign opc_uaddr = LIBRA_UADDR_W'(opcode);
  assign uaddr     = is_unify ? map_uaddr : opc_uaddr;

endmodule
