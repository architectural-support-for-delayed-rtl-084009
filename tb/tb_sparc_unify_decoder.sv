// tb_sparc_unify_decoder: all 16 tag pairs, both Z values, for the unify
// instruction, a non-unify instruction of the same format and dec_valid low.
// Expected operations come from a character grid of the SPARC unification
// table (rows A, columns B: bound, unb, atom, struc):
//   L load A + set Z, D load B + set Z, J bind junior to senior, a bind A to
//   B, b bind B to A, E fail if A != B, C call if A != B, F fail always.
module tb_sparc_unify_decoder;
  import unify_pkg::*;
  int checks = 0, failures = 0;

  logic        dec_valid, zero, is_unify, z_new;
  logic [31:0] instr;
  logic [1:0]  tag_a, tag_b;
  uop_e        uop;

  sparc_unify_decoder dut (.dec_valid, .instr, .tag_a, .tag_b, .zero, .is_unify, .uop, .z_new);

  string grid [4] = '{ "LLLL", "DJaa", "DbEF", "DbFC" };

  function automatic uop_e expect_op(input int a, input int b, input bit z);
    case (grid[a][b])
      "L": return UOP_LOAD_A;
      "D": return UOP_LOAD_B;
      "J": return UOP_BIND_JR;
      "a": return UOP_BIND_A;
      "b": return UOP_BIND_B;
      "E": return z ? UOP_NOP : UOP_FAIL;
      "C": return z ? UOP_NOP : UOP_CALL;
      default: return UOP_FAIL;
    endcase
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    uop_e e;
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        for (int z = 0; z < 2; z++) begin
          tag_a = 2'(a); tag_b = 2'(b); zero = z[0];
          // unify: op = 10, op3 = 101100, random register fields
          dec_valid = 1'b1;
          instr = {2'b10, 5'($urandom), 6'h2C, 19'($urandom)};
          #1;
          e = expect_op(a, b, z[0]);
          check(is_unify, "unify decoded");
          check(uop == e, $sformatf("a=%0d b=%0d z=%0d got %s want %s", a, b, z, uop.name(), e.name()));
          check(z_new == (e == UOP_LOAD_A || e == UOP_LOAD_B), "Z written by unify");
          // subcc (op3 = 010100) is not unify
          instr = {2'b10, 5'($urandom), 6'h14, 19'($urandom)};
          #1;
          check(!is_unify && uop == UOP_NOP && !z_new, "subcc is not unify");
          // unify code in the wrong format (op = 11)
          instr = {2'b11, 5'($urandom), 6'h2C, 19'($urandom)};
          #1;
          check(!is_unify, "format 3 op=11 is not unify");
          instr = {2'b10, 5'($urandom), 6'h2C, 19'($urandom)};
          dec_valid = 1'b0;
          #1;
          check(!is_unify && !z_new, "no decode without dec_valid");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
