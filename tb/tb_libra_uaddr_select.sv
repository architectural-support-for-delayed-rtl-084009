// tb_libra_uaddr_select: every 6-bit opcode with random mapping-ROM addresses.
// Only 111000 may select the mapping ROM and raise is_unify; all other
// opcodes must produce their own opcode mapping address {00, opcode}.
module tb_libra_uaddr_select;
  int checks = 0, failures = 0;

  logic [5:0] opcode;
  logic [7:0] map_uaddr, uaddr;
  logic       is_unify;

  libra_uaddr_select dut (.opcode, .map_uaddr, .is_unify, .uaddr);

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
    for (int rep = 0; rep < 4; rep++)
      for (int o = 0; o < 64; o++) begin
        opcode = 6'(o);
        map_uaddr = 8'($urandom) | 8'h80;
        #1;
        if (o == 'b111000) begin
          check(is_unify == 1'b1, "unify detected");
          check(uaddr == map_uaddr, "unify takes mapping ROM address");
        end else begin
          check(is_unify == 1'b0, $sformatf("opcode %b not unify", o[5:0]));
          check(uaddr == {2'b00, 6'(o)}, $sformatf("opcode %b mapping", o[5:0]));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
