// tb_libra_partial_unify: runs the LIBRA unify schema the way compiled code
// uses it. For each random pair of terms on a small heap the testbench plays
// the instruction sequence
//     sub A,B        (sets the condition codes; tags latched, Z = (A == B))
//     [other op]     (sometimes: an ordinary instruction that does not set cc)
//     unify A,B      (schema; a load re-runs sub and unify through PC-2)
// and applies the stores and loads the block asks for to its heap and operand
// registers. The outcome (success, fail, call of the recursive unifier), the
// heap afterwards and the number of dereferencing loads are compared with a
// software partial unifier. The microword must be latched exactly one cycle
// after unify is decoded. Every table operation must occur at least once.
module tb_libra_partial_unify;
  import unify_pkg::*;
  import libra_pkg::*;

  localparam int N = 32;  // heap cells
  typedef logic [34:0] word_t;  // {tag[2:0], value[31:0]}

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic         set_cc, zero, dec_valid, dec_is_unify;
  logic [2:0]   op1_tag, op2_tag;
  logic [5:0]   opcode;
  word_t        ex_a, ex_b, mem_wdata;
  libra_uword_t uword;
  logic         mem_we, ld_req, ld_to_b, pc_back2, fail, call;
  logic [31:0]  mem_waddr, ld_addr;

  libra_partial_unify dut (.clk, .rst_n, .set_cc, .op1_tag, .op2_tag, .zero, .dec_valid, .opcode,
    .dec_is_unify, .ex_a, .ex_b, .uword, .mem_we, .mem_waddr, .mem_wdata, .ld_req, .ld_addr,
    .ld_to_b, .pc_back2, .fail, .call);

  always #5 clk = ~clk;

  word_t heap [N];
  word_t ref_heap [N];
  int    op_count [8];
  int    n_cond_success, n_cond_fail, n_opcode_path, n_hold, n_repeat;

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

  function automatic word_t mk(input libra_tag_e t, input logic [31:0] v);
    return {t, v};
  endfunction

  function automatic libra_tag_e tg(input word_t w);
    return libra_tag_e'(w[34:32]);
  endfunction

  // Random heap: cells 0..3 hold no references; a bound cell refers to a
  // lower cell, so every reference chain ends.
  task automatic make_heap();
    for (int i = 0; i < N; i++) begin
      int k = $urandom_range(0, 9);
      if (i >= 4 && k < 3)  heap[i] = mk(LT_BOUND, 32'($urandom_range(0, i - 1)));
      else if (k < 5)       heap[i] = mk(LT_UNB, 32'(i));
      else                  heap[i] = mk(libra_tag_e'($urandom_range(2, 7)), 32'($urandom_range(0, 2)));
    end
  endtask

  function automatic word_t rand_operand();
    int k = $urandom_range(0, 3);
    if (k == 0) return mk(LT_BOUND, 32'($urandom_range(0, N - 1)));
    if (k == 1) return mk(libra_tag_e'($urandom_range(2, 7)), 32'($urandom_range(0, 2)));
    return heap[$urandom_range(0, N - 1)];
  endfunction

  // Software partial unifier: 0 success, 1 fail, 2 call. Works on ref_heap.
  function automatic int ref_unify(input word_t a, input word_t b, output int loads);
    loads = 0;
    while (tg(a) == LT_BOUND || tg(b) == LT_BOUND) begin
      if (tg(a) == LT_BOUND) a = ref_heap[a[4:0]];
      else                   b = ref_heap[b[4:0]];
      loads++;
    end
    if (tg(a) == LT_UNB && tg(b) == LT_UNB) begin
      if (a[31:0] > b[31:0])      ref_heap[a[4:0]] = b;
      else if (b[31:0] > a[31:0]) ref_heap[b[4:0]] = a;
      return 0;
    end
    if (tg(a) == LT_UNB) begin ref_heap[a[4:0]] = b; return 0; end
    if (tg(b) == LT_UNB) begin ref_heap[b[4:0]] = a; return 0; end
    if (tg(a) != tg(b)) return 1;
    if (a == b) return 0;
    return (tg(a) == LT_INT || tg(a) == LT_SYM) ? 1 : 2;
  endfunction

  task automatic idle();
    set_cc = 0; dec_valid = 0; opcode = '0; op1_tag = '0; op2_tag = '0;
  endtask

  // Run one unification on the block; returns outcome and load count.
  task automatic run_unify(input word_t a0, input word_t b0, output int outcome, output int loads);
    word_t a, b;
    bit    done;
    a = a0; b = b0; loads = 0; done = 0; outcome = 0;
    while (!done) begin
      // sub A,B
      @(negedge clk);
      idle();
      set_cc = 1; op1_tag = a[34:32]; op2_tag = b[34:32];
      @(posedge clk);
      zero <= (a == b);
      // an ordinary instruction in between (tags must be held)
      if ($urandom_range(0, 2) == 0) begin
        logic [5:0] o;
        o = 6'($urandom_range(0, 55));
        @(negedge clk);
        idle();
        dec_valid = 1; opcode = o;
        op1_tag = 3'($urandom); op2_tag = 3'($urandom);  // not latched: set_cc is low
        #1 check(!dec_is_unify, "ordinary opcode is not unify");
        @(negedge clk);
        idle();
        check(uword.valid && !uword.is_unify && uword.opcode == o, "ordinary opcode microword");
        n_opcode_path++; n_hold++;
      end
      // unify A,B
      @(negedge clk);
      idle();
      dec_valid = 1; opcode = LIBRA_UNIFY_OPC;
      #1 check(dec_is_unify, "unify detected in decode");
      @(negedge clk);
      idle();
      // execute cycle: the microword latched one cycle after decode
      ex_a = a; ex_b = b;
      #1;
      check(uword.valid && uword.is_unify, "unify microword one cycle after decode");
      op_count[uword.uop]++;
      if (uword.uop == UOP_NOP && tg(a) == tg(b) && tg(a) >= LT_INT) n_cond_success++;
      if (uword.uop == UOP_FAIL && tg(a) == tg(b)) n_cond_fail++;
      if (mem_we) heap[mem_waddr[4:0]] = mem_wdata;
      if (ld_req) begin
        loads++;
        check(pc_back2, "load requests PC-2");
        if (ld_to_b) b = heap[ld_addr[4:0]];
        else         a = heap[ld_addr[4:0]];
        n_repeat++;
      end else begin
        check(!pc_back2, "PC-2 only with a load");
        done = 1;
        outcome = fail ? 1 : call ? 2 : 0;
        check(!(fail && call), "fail and call exclusive");
      end
      if (loads > 40) begin check(0, "dereference does not end"); done = 1; end
    end
  endtask

  initial begin
    int out, loads, rout, rloads;
    word_t a, b;
    idle(); zero = 0; ex_a = '0; ex_b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      make_heap();
      a = rand_operand(); b = rand_operand();
      // sometimes the same term on both sides
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
    $display("count cond_success %0d cond_fail %0d opcode_path %0d tag_hold %0d pc_back2 %0d",
             n_cond_success, n_cond_fail, n_opcode_path, n_hold, n_repeat);
    check(n_cond_success > 0 && n_cond_fail > 0 && n_opcode_path > 0 && n_repeat > 0, "mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
