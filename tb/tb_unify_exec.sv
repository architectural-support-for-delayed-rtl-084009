// tb_unify_exec: each operation with random operand words and addresses,
// against the expected store, load, fail and call outputs. Includes the
// junior/senior binding in both age orders and for the same cell.
module tb_unify_exec;
  import unify_pkg::*;
  int checks = 0, failures = 0;

  logic        valid;
  uop_e        uop;
  logic [31:0] word_a, word_b, addr_a, addr_b, mem_waddr, mem_wdata, ld_addr;
  logic        mem_we, ld_req, ld_to_b, fail, call;

  unify_exec dut (.valid, .uop, .word_a, .word_b, .addr_a, .addr_b, .mem_we, .mem_waddr,
                  .mem_wdata, .ld_req, .ld_addr, .ld_to_b, .fail, .call);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 800; i++) begin
      valid  = ($urandom_range(0, 7) != 0);
      uop    = uop_e'(i % 8);
      word_a = $urandom; word_b = $urandom;
      addr_a = $urandom_range(0, 15); addr_b = $urandom_range(0, 15);
      #1;
      if (!valid) begin
        check(!mem_we && !ld_req && !fail && !call, "idle when not valid");
        continue;
      end
      check(fail == (uop == UOP_FAIL), $sformatf("fail for %s", uop.name()));
      check(call == (uop == UOP_CALL), $sformatf("call for %s", uop.name()));
      check(ld_req == (uop == UOP_LOAD_A || uop == UOP_LOAD_B), $sformatf("load for %s", uop.name()));
      if (uop == UOP_LOAD_A) check(ld_addr == addr_a && !ld_to_b, "load A address");
      if (uop == UOP_LOAD_B) check(ld_addr == addr_b && ld_to_b, "load B address");
      case (uop)
        UOP_BIND_A: check(mem_we && mem_waddr == addr_a && mem_wdata == word_b, "bind A to B");
        UOP_BIND_B: check(mem_we && mem_waddr == addr_b && mem_wdata == word_a, "bind B to A");
        UOP_BIND_JR:
          if (addr_a == addr_b)     check(!mem_we, "same cell: no binding");
          else if (addr_a > addr_b) check(mem_we && mem_waddr == addr_a && mem_wdata == word_b, "A junior");
          else                      check(mem_we && mem_waddr == addr_b && mem_wdata == word_a, "B junior");
        default: check(!mem_we, $sformatf("no store for %s", uop.name()));
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
