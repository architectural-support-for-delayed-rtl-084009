// tag_latch: the tag latches of the partial-unification schema.
// When an instruction that sets the condition codes executes (in practice a
// dyadic operation such as sub or add), the tags of its two operands, taken
// from the operand buses, are captured here. They stay unchanged and are
// presented to the unify specialization function during the decoding of all
// later instructions, until the next condition-setting instruction.
// Interface: set_cc qualifies tag_a_in/tag_b_in; tag_a/tag_b are the held tags.
// Timing: one register stage; the tags are visible the cycle after set_cc.
// The capture rule follows the design; reset to tag 0 is this design's choice.
module tag_latch #(
  parameter int unsigned TAG_W = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             set_cc,    // the executing instruction sets the condition codes
  input  logic [TAG_W-1:0] tag_a_in,  // tag of operand 1 (A)
  input  logic [TAG_W-1:0] tag_b_in,  // tag of operand 2 (B)
  output logic [TAG_W-1:0] tag_a,
  output logic [TAG_W-1:0] tag_b
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_a <= '0;
      tag_b <= '0;
    end else if (set_cc) begin
      tag_a <= tag_a_in;
      tag_b <= tag_b_in;
    end
  end

endmodule
