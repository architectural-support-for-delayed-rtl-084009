// tb_delayed_spec_top: end-to-end test of the whole design. The LIBRA and
// SPARC halves of delayed_spec_top run concurrently, each playing its
// instruction sequence for partial unification on its own random heap:
//   LIBRA: sub A,B ; [ordinary instruction] ; unify A,B   (load -> PC-2)
//   SPARC: subcc A,B ; unify A,B ; be back                (load sets Z)
// Outcomes, heaps and dereference counts are compared with software partial
// unifiers. Each mechanism (every table operation on both machines, the
// conditional success and failure, the opcode path, tag holding across an
// ordinary instruction, PC-2 re-execution, the branch back on Z) is counted,
// and one that never happens is a failure. The top runs with its default
// parameters.
module tb_delayed_spec_top;
  import unify_pkg::*;
  import libra_pkg::*;
  import sparc_unify_pkg::*;

  localparam int N = 32;
  typedef logic [34:0] word_t;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic         l_set_cc, l_zero, l_dec_valid, l_dec_is_unify;
  logic [2:0]   l_op1_tag, l_op2_tag;
  logic [5:0]   l_opcode;
  word_t        l_ex_a, l_ex_b, l_mem_wdata;
  libra_uword_t l_uword;
  logic         l_mem_we, l_ld_req, l_ld_to_b, l_pc_back2, l_fail, l_call;
  logic [31:0]  l_mem_waddr, l_ld_addr;

  logic        s_set_cc, s_icc_z, s_dec_valid, s_dec_is_unify, s_ex_unify, s_z_we, s_z_wdata;
  logic [31:0] s_cc_rs1, s_cc_rs2, s_instr, s_ex_rs1, s_ex_rs2, s_mem_wdata;
  logic [29:0] s_mem_waddr, s_ld_addr;
  logic        s_mem_we, s_ld_req, s_ld_to_b, s_fail, s_call;
  uop_e        s_ex_uop;

  delayed_spec_top dut (.clk, .rst_n,
    .l_set_cc, .l_op1_tag, .l_op2_tag, .l_zero, .l_dec_valid, .l_opcode, .l_dec_is_unify,
    .l_ex_a, .l_ex_b, .l_uword, .l_mem_we, .l_mem_waddr, .l_mem_wdata, .l_ld_req, .l_ld_addr,
    .l_ld_to_b, .l_pc_back2, .l_fail, .l_call,
    .s_set_cc, .s_cc_rs1, .s_cc_rs2, .s_icc_z, .s_dec_valid, .s_instr, .s_dec_is_unify,
    .s_ex_rs1, .s_ex_rs2, .s_ex_unify, .s_ex_uop, .s_z_we, .s_z_wdata, .s_mem_we, .s_mem_waddr,
    .s_mem_wdata, .s_ld_req, .s_ld_addr, .s_ld_to_b, .s_fail, .s_call);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t l_heap [N];
  word_t l_ref_heap [N];
  int    l_op_count [8];
  int    n_cond_success, n_cond_fail, n_opcode_path, n_hold, n_repeat;

  function automatic word_t l_mk(input libra_tag_e t, input logic [31:0] v);
    return {t, v};
  endfunction

  function automatic libra_tag_e l_tg(input word_t w);
    return libra_tag_e'(w[34:32]);
  endfunction

  // Random l_heap: cells 0..3 hold no references; a bound cell refers to a
  // lower cell, so every reference chain ends.
  task automatic l_make_heap();
    for (int i = 0; i < N; i++) begin
      int k = $urandom_range(0, 9);
      if (i >= 4 && k < 3)  l_heap[i] = l_mk(LT_BOUND, 32'($urandom_range(0, i - 1)));
      else if (k < 5)       l_heap[i] = l_mk(LT_UNB, 32'(i));
      else                  l_heap[i] = l_mk(libra_tag_e'($urandom_range(2, 7)), 32'($urandom_range(0, 2)));
    end
  endtask

  function automatic word_t l_rand_operand();
    int k = $urandom_range(0, 3);
    if (k == 0) return l_mk(LT_BOUND, 32'($urandom_range(0, N - 1)));
    if (k == 1) return l_mk(libra_tag_e'($urandom_range(2, 7)), 32'($urandom_range(0, 2)));
    return l_heap[$urandom_range(0, N - 1)];
  endfunction

  // Software partial unifier: 0 success, 1 l_fail, 2 l_call. Works on l_ref_heap.
  function automatic int l_ref_unify(input word_t a, input word_t b, output int loads);
    loads = 0;
    while (l_tg(a) == LT_BOUND || l_tg(b) == LT_BOUND) begin
      if (l_tg(a) == LT_BOUND) a = l_ref_heap[a[4:0]];
      else                   b = l_ref_heap[b[4:0]];
      loads++;
    end
    if (l_tg(a) == LT_UNB && l_tg(b) == LT_UNB) begin
      if (a[31:0] > b[31:0])      l_ref_heap[a[4:0]] = b;
      else if (b[31:0] > a[31:0]) l_ref_heap[b[4:0]] = a;
      return 0;
    end
    if (l_tg(a) == LT_UNB) begin l_ref_heap[a[4:0]] = b; return 0; end
    if (l_tg(b) == LT_UNB) begin l_ref_heap[b[4:0]] = a; return 0; end
    if (l_tg(a) != l_tg(b)) return 1;
    if (a == b) return 0;
    return (l_tg(a) == LT_INT || l_tg(a) == LT_SYM) ? 1 : 2;
  endfunction

  task automatic l_idle();
    l_set_cc = 0; l_dec_valid = 0; l_opcode = '0; l_op1_tag = '0; l_op2_tag = '0;
  endtask

  // Run one unification on the block; returns outcome and load count.
  task automatic l_run_unify(input word_t a0, input word_t b0, output int outcome, output int loads);
    word_t a, b;
    bit    done;
    a = a0; b = b0; loads = 0; done = 0; outcome = 0;
    while (!done) begin
      // sub A,B
      @(negedge clk);
      l_idle();
      l_set_cc = 1; l_op1_tag = a[34:32]; l_op2_tag = b[34:32];
      @(posedge clk);
      l_zero <= (a == b);
      // an ordinary instruction in between (tags must be held)
      if ($urandom_range(0, 2) == 0) begin
        logic [5:0] o;
        o = 6'($urandom_range(0, 55));
        @(negedge clk);
        l_idle();
        l_dec_valid = 1; l_opcode = o;
        l_op1_tag = 3'($urandom); l_op2_tag = 3'($urandom);  // not latched: l_set_cc is low
        #1 check(!l_dec_is_unify, "ordinary l_opcode is not unify");
        @(negedge clk);
        l_idle();
        check(l_uword.valid && !l_uword.is_unify && l_uword.opcode == o, "ordinary l_opcode microword");
        n_opcode_path++; n_hold++;
      end
      // unify A,B
      @(negedge clk);
      l_idle();
      l_dec_valid = 1; l_opcode = LIBRA_UNIFY_OPC;
      #1 check(l_dec_is_unify, "unify detected in decode");
      @(negedge clk);
      l_idle();
      // execute cycle: the microword latched one cycle after decode
      l_ex_a = a; l_ex_b = b;
      #1;
      check(l_uword.valid && l_uword.is_unify, "unify microword one cycle after decode");
      l_op_count[l_uword.uop]++;
      if (l_uword.uop == UOP_NOP && l_tg(a) == l_tg(b) && l_tg(a) >= LT_INT) n_cond_success++;
      if (l_uword.uop == UOP_FAIL && l_tg(a) == l_tg(b)) n_cond_fail++;
      if (l_mem_we) l_heap[l_mem_waddr[4:0]] = l_mem_wdata;
      if (l_ld_req) begin
        loads++;
        check(l_pc_back2, "load requests PC-2");
        if (l_ld_to_b) b = l_heap[l_ld_addr[4:0]];
        else         a = l_heap[l_ld_addr[4:0]];
        n_repeat++;
      end else begin
        check(!l_pc_back2, "PC-2 only with a load");
        done = 1;
        outcome = l_fail ? 1 : l_call ? 2 : 0;
        check(!(l_fail && l_call), "l_fail and l_call exclusive");
      end
      if (loads > 40) begin check(0, "dereference does not end"); done = 1; end
    end
  endtask

  logic [31:0] s_heap [N];
  logic [31:0] s_ref_heap [N];
  int s_op_count [8];
  int s_n_branch_back;

  function automatic logic [31:0] s_ref_to(input sparc_tag_e t, input int idx);
    return {30'(idx), t};
  endfunction

  function automatic logic [31:0] s_const_word(input sparc_tag_e t);
    return {1'($urandom), 29'($urandom_range(0, 1)), t};
  endfunction

  function automatic sparc_tag_e s_tg(input logic [31:0] w);
    return sparc_tag_e'(w[1:0]);
  endfunction

  function automatic int s_cell_of(input logic [31:0] w);
    return int'(w[6:2]);
  endfunction

  task automatic s_make_heap();
    for (int i = 0; i < N; i++) begin
      int k = $urandom_range(0, 9);
      if (i >= 4 && k < 3) s_heap[i] = s_ref_to(ST_BOUND, $urandom_range(0, i - 1));
      else if (k < 5)      s_heap[i] = s_ref_to(ST_UNB, i);
      else                 s_heap[i] = s_const_word(k < 8 ? ST_ATOM : ST_STRUC);
    end
  endtask

  function automatic logic [31:0] s_rand_operand();
    int k = $urandom_range(0, 3);
    if (k == 0) return s_ref_to(ST_BOUND, $urandom_range(0, N - 1));
    if (k == 1) return s_const_word($urandom_range(0, 1) ? ST_ATOM : ST_STRUC);
    return s_heap[$urandom_range(0, N - 1)];
  endfunction

  function automatic int s_ref_unify(input logic [31:0] a, input logic [31:0] b, output int loads);
    loads = 0;
    while (s_tg(a) == ST_BOUND || s_tg(b) == ST_BOUND) begin
      if (s_tg(a) == ST_BOUND) a = s_ref_heap[s_cell_of(a)];
      else                   b = s_ref_heap[s_cell_of(b)];
      loads++;
    end
    if (s_tg(a) == ST_UNB && s_tg(b) == ST_UNB) begin
      if (a[31:2] > b[31:2])      s_ref_heap[s_cell_of(a)] = b;
      else if (b[31:2] > a[31:2]) s_ref_heap[s_cell_of(b)] = a;
      return 0;
    end
    if (s_tg(a) == ST_UNB) begin s_ref_heap[s_cell_of(a)] = b; return 0; end
    if (s_tg(b) == ST_UNB) begin s_ref_heap[s_cell_of(b)] = a; return 0; end
    if (s_tg(a) != s_tg(b)) return 1;
    if (a == b) return 0;
    return (s_tg(a) == ST_ATOM) ? 1 : 2;
  endfunction

  task automatic s_idle();
    s_set_cc = 0; s_dec_valid = 0; s_instr = '0; s_cc_rs1 = '0; s_cc_rs2 = '0;
  endtask

  task automatic s_run_unify(input logic [31:0] a0, input logic [31:0] b0, output int outcome, output int loads);
    logic [31:0] a, b;
    bit done;
    a = a0; b = b0; loads = 0; done = 0; outcome = 0;
    while (!done) begin
      // subcc A,B
      @(negedge clk);
      s_idle();
      s_set_cc = 1; s_cc_rs1 = a; s_cc_rs2 = b;
      @(posedge clk);
      s_icc_z <= (a == b);
      // unify A,B
      @(negedge clk);
      s_idle();
      s_dec_valid = 1; s_instr = {2'b10, 5'd1, SPARC_OP3_UNIFY, 5'd2, 9'd0, 5'd3};
      #1 check(s_dec_is_unify, "unify detected in decode");
      @(negedge clk);
      s_idle();
      s_ex_rs1 = a; s_ex_rs2 = b;
      #1;
      check(s_ex_unify && s_z_we, "unify acts one cycle after decode");
      s_op_count[s_ex_uop]++;
      check(s_z_wdata == s_ld_req, "Z set exactly when dereferencing");
      if (s_mem_we) s_heap[s_mem_waddr[4:0]] = s_mem_wdata;
      if (s_ld_req) begin
        loads++;
        if (s_ld_to_b) b = s_heap[s_ld_addr[4:0]];
        else         a = s_heap[s_ld_addr[4:0]];
      end else begin
        outcome = s_fail ? 1 : s_call ? 2 : 0;
      end
      @(posedge clk);
      s_icc_z <= s_z_wdata;
      // be loop: taken while Z is set
      @(negedge clk);
      if (s_icc_z) s_n_branch_back++;
      else done = 1;
      if (loads > 40) begin check(0, "dereference does not end"); done = 1; end
    end
  endtask

  initial begin
    l_idle(); l_zero = 0; l_ex_a = '0; l_ex_b = '0;
    s_idle(); s_icc_z = 0; s_ex_rs1 = '0; s_ex_rs2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin : libra_side
        int out, loads, rout, rloads;
        word_t a, b;
    for (int t = 0; t < 600; t++) begin
      l_make_heap();
      a = l_rand_operand(); b = l_rand_operand();
      // sometimes the same term on both sides
      if ($urandom_range(0, 5) == 0) b = a;
      l_ref_heap = l_heap;
      rout = l_ref_unify(a, b, rloads);
      l_run_unify(a, b, out, loads);
      check(out == rout, $sformatf("test %0d outcome %0d want %0d", t, out, rout));
      check(loads == rloads, $sformatf("test %0d loads %0d want %0d", t, loads, rloads));
      check(l_heap == l_ref_heap, $sformatf("test %0d l_heap after unify", t));
    end
    for (int i = 0; i < 8; i++) begin
      $display("count libra %-12s %0d", uop_e'(i), l_op_count[i]);
      check(l_op_count[i] > 0, $sformatf("operation %0d never occurred", i));
    end
    $display("count libra cond_success %0d cond_fail %0d opcode_path %0d tag_hold %0d pc_back2 %0d",
             n_cond_success, n_cond_fail, n_opcode_path, n_hold, n_repeat);
    check(n_cond_success > 0 && n_cond_fail > 0 && n_opcode_path > 0 && n_repeat > 0, "mechanisms seen");
      end
      begin : sparc_side
        int out, loads, rout, rloads;
        logic [31:0] a, b;
    for (int t = 0; t < 600; t++) begin
      s_make_heap();
      a = s_rand_operand(); b = s_rand_operand();
      if ($urandom_range(0, 5) == 0) b = a;
      s_ref_heap = s_heap;
      rout = s_ref_unify(a, b, rloads);
      s_run_unify(a, b, out, loads);
      check(out == rout, $sformatf("test %0d outcome %0d want %0d", t, out, rout));
      check(loads == rloads, $sformatf("test %0d loads %0d want %0d", t, loads, rloads));
      check(s_heap == s_ref_heap, $sformatf("test %0d s_heap after unify", t));
    end
    for (int i = 0; i < 8; i++) begin
      $display("count sparc %-12s %0d", uop_e'(i), s_op_count[i]);
      check(s_op_count[i] > 0, $sformatf("operation %0d never occurred", i));
    end
    $display("count sparc branch_back %0d", s_n_branch_back);
    check(s_n_branch_back > 0, "branch back seen");
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
