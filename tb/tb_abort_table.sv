// tb_abort_table: self-checking test of the abort table.
// Checks allocation to the lowest free entry and the FULL flag, that a
// condition written in a tick is only seen after the latch (pre-value
// semantics), that the query returns the outermost triggered abort of a
// thread and kind, and release / clear-from-level of entries.
module tb_abort_table;
  import pretc_pkg::*;
  localparam int N = 8, M = 4, X = 4;
  logic clk = 0, rst_n = 0;
  at_op_e op;
  logic [$clog2(N)-1:0] tid, q_tid;
  logic [$clog2(X)-1:0] pvi;
  logic ws, val, q_ws, q_hit, full;
  logic [PC_W-1:0] pa, q_pa;
  logic [$clog2(M)-1:0] al, q_al;
  logic [1:0] any_trig;
  logic [M-1:0] valid;
  logic [X-1:0] pv;
  int checks = 0, failures = 0;

  abort_table #(.N(N), .M(M), .X(X)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (valid=%b pv=%b hit=%b pa=%h al=%0d)", what, valid, pv, q_hit, q_pa, q_al);
    end
  endtask

  task automatic do_op(input at_op_e o, input int t, input int p, input logic w,
                       input int a, input int l, input logic v);
    @(negedge clk);
    op = o; tid = t[$clog2(N)-1:0]; pvi = p[$clog2(X)-1:0]; ws = w; pa = a;
    al = l[$clog2(M)-1:0]; val = v;
    @(negedge clk);
    op = AT_NOP;
  endtask

  task automatic query(input int t, input logic w);
    q_tid = t[$clog2(N)-1:0]; q_ws = w;
    #1;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = AT_NOP; tid = '0; pvi = '0; ws = 0; pa = '0; al = '0; val = 0;
    q_tid = '0; q_ws = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(valid == 0 && !full && pv == 0, "empty after reset");
    // thread 0: strong abort on cond 1 (level 0); thread 0: weak on cond 2 (level 1)
    do_op(AT_ALLOC, 0, 1, 0, 'h1000, 0, 0);
    do_op(AT_ALLOC, 0, 2, 1, 'h2000, 1, 0);
    // thread 3: strong abort on cond 1 at level 0 and 1
    do_op(AT_ALLOC, 3, 1, 0, 'h3000, 0, 0);
    check(valid == 4'b0111, "three entries in the lowest slots");
    do_op(AT_ALLOC, 3, 1, 0, 'h3100, 1, 0);
    check(valid == 4'b1111 && full, "full after M entries");
    do_op(AT_ALLOC, 5, 0, 0, 'h5000, 0, 0);
    check(valid == 4'b1111, "allocation ignored when full");
    query(0, 0);
    check(!q_hit && any_trig == 0, "no pre-value yet");
    // condition 1 becomes true during the tick: not visible before latch
    do_op(AT_SET_PV, 0, 1, 0, 0, 0, 1);
    query(0, 0);
    check(!q_hit && pv == 0, "staged value not yet a pre-value");
    do_op(AT_LATCH, 0, 0, 0, 0, 0, 0);
    check(pv == 4'b0010, "latched pre-value");
    query(0, 0);
    check(q_hit && q_pa == 'h1000 && q_al == 0, "thread 0 strong abort fires");
    query(0, 1);
    check(!q_hit, "thread 0 weak abort: its condition is false");
    query(3, 0);
    check(q_hit && q_pa == 'h3000 && q_al == 0, "thread 3: outermost abort wins");
    query(4, 0);
    check(!q_hit, "thread 4 has no abort");
    check(any_trig == 2'b01, "a strong abort is pending, no weak");
    do_op(AT_SET_PV, 0, 2, 0, 0, 0, 1);
    do_op(AT_LATCH, 0, 0, 0, 0, 0, 0);
    query(0, 1);
    check(q_hit && q_pa == 'h2000 && q_al == 1, "weak abort fires after latch");
    check(any_trig == 2'b11, "both kinds pending");
    // release thread 3's inner abort, then its outer one
    do_op(AT_RELEASE, 3, 0, 0, 0, 1, 0);
    check(valid == 4'b0111 && !full, "inner abort of thread 3 released");
    query(3, 0);
    check(q_hit && q_pa == 'h3000, "outer abort of thread 3 remains");
    // new allocation reuses the freed slot
    do_op(AT_ALLOC, 6, 3, 1, 'h6000, 0, 0);
    check(valid == 4'b1111, "freed slot reused");
    // clear thread 0 from level 1 up: the weak one goes
    do_op(AT_CLR_FROM, 0, 0, 0, 0, 1, 0);
    check(valid == 4'b1101, "clear thread 0 levels >= 1");
    do_op(AT_CLR_FROM, 3, 0, 0, 0, 0, 0);
    check(valid == 4'b1001, "clear every abort of thread 3");
    // condition falls: stays a pre-value until the next latch
    do_op(AT_SET_PV, 0, 1, 0, 0, 0, 0);
    query(0, 0);
    check(q_hit, "old pre-value kept until the tick ends");
    do_op(AT_LATCH, 0, 0, 0, 0, 0, 0);
    query(0, 0);
    check(!q_hit && pv == 4'b0100, "pre-value cleared at the next tick");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
