// tb_tag_latch: random condition-setting and non-condition-setting cycles
// against a reference copy of the held tags, for the 3-bit (LIBRA) and 2-bit
// (SPARC) widths. Checks reset value, capture on set_cc and hold otherwise.
module tb_tag_latch;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, cycles = 0;

  logic       set_cc;
  logic [2:0] a_in, b_in, a3, b3;
  logic [1:0] a2, b2;
  logic [2:0] ref_a, ref_b;

  tag_latch #(.TAG_W(3)) dut3 (.clk, .rst_n, .set_cc, .tag_a_in(a_in), .tag_b_in(b_in), .tag_a(a3), .tag_b(b3));
  tag_latch #(.TAG_W(2)) dut2 (.clk, .rst_n, .set_cc, .tag_a_in(a_in[1:0]), .tag_b_in(b_in[1:0]), .tag_a(a2), .tag_b(b2));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

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
    set_cc = 1'b0; a_in = 3'd5; b_in = 3'd6;
    repeat (2) @(posedge clk);
    #1 check(a3 == 0 && b3 == 0 && a2 == 0 && b2 == 0, "reset value");
    rst_n = 1'b1;
    ref_a = 0; ref_b = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      set_cc = ($urandom_range(0, 2) == 0);
      a_in   = 3'($urandom);
      b_in   = 3'($urandom);
      @(posedge clk);
      if (set_cc) begin ref_a = a_in; ref_b = b_in; end
      #1;
      check(a3 == ref_a && b3 == ref_b, $sformatf("3-bit latch cycle %0d", i));
      check(a2 == ref_a[1:0] && b2 == ref_b[1:0], $sformatf("2-bit latch cycle %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
