// tb_libra_ucode_rom: reads every microcode address and checks the latched
// microword one cycle later. Opcode addresses must hand on their opcode;
// unify addresses {10, uop, cond, 0, z} must give that operation (nop when a
// conditional word sees z = 1), with PC-2 only for the two loads. A cycle
// without dec_valid must leave an invalid word.
module tb_libra_ucode_rom;
  import unify_pkg::*;
  import libra_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic         dec_valid;
  logic [7:0]   uaddr;
  libra_uword_t uword;

  libra_ucode_rom dut (.clk, .rst_n, .dec_valid, .uaddr, .uword);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    uop_e op;
    dec_valid = 1'b0; uaddr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 256; i++) begin
      if (i[7:6] != 2'b00 && i[7:6] != 2'b10) continue;
      if (i[7:6] == 2'b10 && i[1]) continue;
      @(negedge clk);
      dec_valid = 1'b1; uaddr = 8'(i);
      @(negedge clk);
      dec_valid = 1'b0;
      check(uword.valid, $sformatf("valid at %02x", i));
      if (i[7:6] == 2'b00) begin
        check(!uword.is_unify && uword.opcode == 6'(i) && !uword.pc_back2,
              $sformatf("opcode word at %02x", i));
      end else begin
        op = uop_e'(i[5:3]);
        if (i[2] && i[0]) op = UOP_NOP;
        check(uword.is_unify && uword.uop == op, $sformatf("unify word at %02x", i));
        check(uword.pc_back2 == (op == UOP_LOAD_A || op == UOP_LOAD_B), $sformatf("PC-2 at %02x", i));
      end
      @(negedge clk);
      check(!uword.valid, "no word without dec_valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
