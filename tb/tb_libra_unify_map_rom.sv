// tb_libra_unify_map_rom: all 64 tag pairs with the zero flag clear and set.
// The expected operation comes from a character grid of the LIBRA
// unification table with dereferencing (rows A, columns B, in the order
// bound, unb, int, sym, list1, list2, struc1, struc2):
//   L load A, D load B, J bind junior to senior, a bind A to B, b bind B to A,
//   E fail if A != B, C call if A != B, F fail always.
// The microcode address is decoded as {10, uop, cond, 0, z}; a conditional
// word with z = 1 means success (nop).
module tb_libra_unify_map_rom;
  import unify_pkg::*;
  int checks = 0, failures = 0;

  logic [2:0] tag_a, tag_b;
  logic       zero;
  logic [7:0] uaddr;

  libra_unify_map_rom dut (.tag_a, .tag_b, .zero, .uaddr);

  string grid [8] = '{
    "LLLLLLLL",
    "DJaaaaaa",
    "DbEFFFFF",
    "DbFEFFFF",
    "DbFFCFFF",
    "DbFFFCFF",
    "DbFFFFCF",
    "DbFFFFFC"
  };

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
    uop_e got;
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++)
        for (int z = 0; z < 2; z++) begin
          tag_a = 3'(a); tag_b = 3'(b); zero = z[0];
          #1;
          got = uop_e'(uaddr[5:3]);
          if (uaddr[2] && uaddr[0]) got = UOP_NOP;
          check(uaddr[7:6] == 2'b10 && uaddr[1] == 1'b0, $sformatf("region a=%0d b=%0d", a, b));
          check(got == expect_op(a, b, z[0]),
                $sformatf("a=%0d b=%0d z=%0d got %s", a, b, z, got.name()));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
