// tb_thread_table: self-checking test of the thread table.
// A directed sequence plays a PAR of two threads under a main thread:
// spawn, suspend of the parent, EOT, the global tick, termination of both
// children (the parent resumes when the last one ends), abort-level counting,
// kill and preemption restart. Each step is checked against hand-worked
// expected field values.
module tb_thread_table;
  import pretc_pkg::*;
  localparam int N = 8, M = 4;
  logic clk = 0, rst_n = 0;
  tt_op_e op;
  logic [$clog2(N)-1:0] idx, cur;
  logic [PC_W-1:0] pc;
  logic [$clog2(M)-1:0] al;
  logic [N-1:0] tda, tsp, tlt;
  logic [PC_W-1:0] pc_o [N];
  logic [$clog2(N)-1:0] pid_o [N];
  logic [$clog2(M)-1:0] alc_o [N];
  logic [SC_W-1:0] sc_o [N];
  int checks = 0, failures = 0;

  thread_table #(.N(N), .M(M)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (tda=%b tsp=%b tlt=%b)", what, tda, tsp, tlt);
    end
  endtask

  task automatic do_op(input tt_op_e o, input int i, input int c, input int p, input int a);
    @(negedge clk);
    op = o; idx = i[$clog2(N)-1:0]; cur = c[$clog2(N)-1:0]; pc = p; al = a[$clog2(M)-1:0];
    @(negedge clk);
    op = TT_NOP;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = TT_NOP; idx = '0; cur = '0; pc = '0; al = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(tda == 8'b0000_0001 && tsp == 0 && tlt == 0, "reset: only main alive");
    check(pid_o[0] == 0 && sc_o[0] == 0, "reset: main is its own parent");
    // PAR(T1, T2) from main
    do_op(TT_SPAWN, 1, 0, 'h100, 0);
    do_op(TT_SPAWN, 2, 0, 'h200, 0);
    check(tda == 8'b0000_0111, "spawn: slots 1 and 2 alive");
    check(pc_o[1] == 'h100 && pc_o[2] == 'h200, "spawn: start PCs");
    check(pid_o[1] == 0 && pid_o[2] == 0, "spawn: parent is main");
    check(sc_o[0] == 2, "spawn: main has two children");
    check(tlt[1] == 0 && tsp[1] == 0, "spawn: child runnable");
    do_op(TT_SUSPEND, 0, 0, 'h50, 0);
    check(tsp == 8'b0000_0001 && pc_o[0] == 'h50, "suspend: main waits, resume PC stored");
    do_op(TT_EOT, 0, 1, 'h110, 0);
    check(tlt == 8'b0000_0010 && pc_o[1] == 'h110, "EOT: local tick of T1");
    do_op(TT_EOT, 0, 2, 'h210, 0);
    check(tlt == 8'b0000_0110, "EOT: local tick of T2");
    do_op(TT_TICK, 0, 0, 0, 0);
    check(tlt == 0, "global tick clears TLT");
    do_op(TT_TERM, 0, 1, 0, 0);
    check(tda == 8'b0000_0101 && sc_o[0] == 1 && tsp[0], "T1 ends, main still waits");
    do_op(TT_TERM, 0, 2, 0, 0);
    check(tda == 8'b0000_0001 && sc_o[0] == 0 && !tsp[0], "T2 ends, main resumes (join)");
    // abort levels
    do_op(TT_ALC_INC, 0, 0, 0, 0);
    do_op(TT_ALC_INC, 0, 0, 0, 0);
    check(alc_o[0] == 2, "two nested abort scopes");
    do_op(TT_ALC_DEC, 0, 0, 0, 0);
    check(alc_o[0] == 1, "left one abort scope");
    // preemption: spawn a child, kill it, restart main at its abort handler
    do_op(TT_SPAWN, 3, 0, 'h400, 0);
    do_op(TT_SUSPEND, 0, 0, 'h60, 0);
    check(tsp[0] && tda[3] && sc_o[0] == 1, "second PAR");
    do_op(TT_EOT, 0, 0, 'h999, 0);
    do_op(TT_KILL, 3, 0, 0, 0);
    check(!tda[3], "kill");
    do_op(TT_FIRE, 0, 0, 'h300, 0);
    check(pc_o[0] == 'h300 && !tsp[0] && !tlt[0] && sc_o[0] == 0 && alc_o[0] == 0,
          "fire: main restarts at the abort address");
    // suspend with no live child does not block the thread
    do_op(TT_SUSPEND, 0, 0, 'h70, 0);
    check(!tsp[0] && pc_o[0] == 'h70, "suspend without children does not block");
    // respawn a dead slot under a child parent
    do_op(TT_SPAWN, 5, 0, 'h500, 0);
    do_op(TT_SPAWN, 6, 5, 'h600, 0);
    check(pid_o[6] == 5 && sc_o[5] == 1 && sc_o[0] == 1, "nested spawn");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
