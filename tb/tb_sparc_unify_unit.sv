// tb_sparc_unify_unit: runs the SPARC unify schema the way compiled code
// uses it. For each random pair of terms on a small heap the testbench plays
//     loop: subcc A,B   (tags of rs1/rs2 latched, icc.Z = (A == B))
//           unify A,B   (schema; a dereferencing load sets Z)
//           be loop     (taken while unify set Z)
// and applies the stores and loads the unit asks for. Outcome, heap and number
// of loads are compared with a software partial unifier over the 2-bit types
// (bound, unbound, atom, structure; bit 31 separates integer from symbol and
// list from structure). Unify must act exactly one cycle after decode, and
// every table operation must occur at least once.
module tb_sparc_unify_unit;
  import unify_pkg::*;
  import sparc_unify_pkg::*;

  localparam int N = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic        set_cc, icc_z, dec_valid, dec_is_unify, ex_unify, z_we, z_wdata;
  logic [31:0] cc_rs1, cc_rs2, instr, ex_rs1, ex_rs2, mem_wdata;
  logic [29:0] mem_waddr, ld_addr;
  logic        mem_we, ld_req, ld_to_b, fail, call;
  uop_e        ex_uop;

  sparc_unify_unit dut (.clk, .rst_n, .set_cc, .cc_rs1, .cc_rs2, .icc_z, .dec_valid, .instr,
    .dec_is_unify, .ex_rs1, .ex_rs2, .ex_unify, .ex_uop, .z_we, .z_wdata, .mem_we, .mem_waddr,
    .mem_wdata, .ld_req, .ld_addr, .ld_to_b, .fail, .call);

  always #5 clk = ~clk;

  logic [31:0] heap [N];
  logic [31:0] ref_heap [N];
  int op_count [8];
  int n_branch_back;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_to(input sparc_tag_e t, input int idx);
    return {30'(idx), t};
  endfunction

  function automatic logic [31:0] const_word(input sparc_tag_e t);
    return {1'($urandom), 29'($urandom_range(0, 1)), t};
  endfunction

  function automatic sparc_tag_e tg(input logic [31:0] w);
    return sparc_tag_e'(w[1:0]);
  endfunction

  function automatic int cell_of(input logic [31:0] w);
    return int'(w[6:2]);
  endfunction

  task automatic make_heap();
    for (int i = 0; i < N; i++) begin
      int k = $urandom_range(0, 9);
      if (i >= 4 && k < 3) heap[i] = ref_to(ST_BOUND, $urandom_range(0, i - 1));
      else if (k < 5)      heap[i] = ref_to(ST_UNB, i);
      else                 heap[i] = const_word(k < 8 ? ST_ATOM : ST_STRUC);
    end
  endtask

  function automatic logic [31:0] rand_operand();
    int k = $urandom_range(0, 3);
    if (k == 0) return ref_to(ST_BOUND, $urandom_range(0, N - 1));
    if (k == 1) return const_word($urandom_range(0, 1) ? ST_ATOM : ST_STRUC);
    return heap[$urandom_range(0, N - 1)];
  endfunction

  function automatic int ref_unify(input logic [31:0] a, input logic [31:0] b, output int loads);
    loads = 0;
    while (tg(a) == ST_BOUND || tg(b) == ST_BOUND) begin
      if (tg(a) == ST_BOUND) a = ref_heap[cell_of(a)];
      else                   b = ref_heap[cell_of(b)];
      loads++;
    end
    if (tg(a) == ST_UNB && tg(b) == ST_UNB) begin
      if (a[31:2] > b[31:2])      ref_heap[cell_of(a)] = b;
      else if (b[31:2] > a[31:2]) ref_heap[cell_of(b)] = a;
      return 0;
    end
    if (tg(a) == ST_UNB) begin ref_heap[cell_of(a)] = b; return 0; end
    if (tg(b) == ST_UNB) begin ref_heap[cell_of(b)] = a; return 0; end
    if (tg(a) != tg(b)) return 1;
    if (a == b) return 0;
    return (tg(a) == ST_ATOM) ? 1 : 2;
  endfunction

  task automatic idle();
    set_cc = 0; dec_valid = 0; instr = '0; cc_rs1 = '0; cc_rs2 = '0;
  endtask

  task automatic run_unify(input logic [31:0] a0, input logic [31:0] b0, output int outcome, output int loads);
    logic [31:0] a, b;
    bit done;
    a = a0; b = b0; loads = 0; done = 0; outcome = 0;
    while (!done) begin
      // subcc A,B
      @(negedge clk);
      idle();
      set_cc = 1; cc_rs1 = a; cc_rs2 = b;
      @(posedge clk);
      icc_z <= (a == b);
      // unify A,B
      @(negedge clk);
      idle();
      dec_valid = 1; instr = {2'b10, 5'd1, SPARC_OP3_UNIFY, 5'd2, 9'd0, 5'd3};
      #1 check(dec_is_unify, "unify detected in decode");
      @(negedge clk);
      idle();
      ex_rs1 = a; ex_rs2 = b;
      #1;
      check(ex_unify && z_we, "unify acts one cycle after decode");
      op_count[ex_uop]++;
      check(z_wdata == ld_req, "Z set exactly when dereferencing");
      if (mem_we) heap[mem_waddr[4:0]] = mem_wdata;
      if (ld_req) begin
        loads++;
        if (ld_to_b) b = heap[ld_addr[4:0]];
        else         a = heap[ld_addr[4:0]];
      end else begin
        outcome = fail ? 1 : call ? 2 : 0;
      end
      @(posedge clk);
      icc_z <= z_wdata;
      // be loop: taken while Z is set
      @(negedge clk);
      if (icc_z) n_branch_back++;
      else done = 1;
      if (loads > 40) begin check(0, "dereference does not end"); done = 1; end
    end
  endtask

  initial begin
    int out, loads, rout, rloads;
    logic [31:0] a, b;
    idle(); icc_z = 0; ex_rs1 = '0; ex_rs2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      make_heap();
      a = rand_operand(); b = rand_operand();
      if ($urandom_range(0, 5) == 0) b = a;
      ref_heap = heap;
      rout = ref_unify(a, b, rloads);
      run_unify(a, b, out, loads);
      check(out == rout, $sformatf("test %0d outcome %0d want %0d", t, out, rout));
      check(loads == rloads, $sformatf("test %0d loads %0d want %0d", t, loads, rloads));
      check(heap == ref_heap, $sformatf("test %0d heap after unify", t));
    end
    for (int i = 0; i < 8; i++) begin
      $display("count %-12s %0d", uop_e'(i), op_count[i]);
      check(op_count[i] > 0, $sformatf("operation %0d never occurred", i));
    end
    $display("count branch_back %0d", n_branch_back);
    check(n_branch_back > 0, "branch back seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
