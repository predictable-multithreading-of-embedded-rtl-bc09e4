// tb_pfu: self-checking test of the Predictable Functional Unit.
//
// The testbench plays the processor (fsl_host) running a producer-consumer
// style PRET-C program: main (slot 0) opens an abort scope and spawns
// sampler (slot 1) and display (slot 2). Every PC handed back is compared
// with the one worked out by hand from the PRET-C rules: fixed priority
// inside a tick, a new tick only when every thread has reached its EOT,
// join when the last child ends, strong abort at the start of the tick after
// the condition was true (also over a nested PAR, killing grandchildren),
// weak abort at the end of the instant, nested PAR,
// constant tick length in constant mode, overrun and bad commands.
module tb_pfu;
  import pretc_pkg::*;
  localparam int N = 8, M = 4, X = 4;
  localparam int WCRT = 60;
  logic clk = 0, rst_n = 0;
  logic [31:0] in_data, out_data, wcrt;
  logic in_exists, in_read, out_write, out_full, rx_take;
  logic const_mode, tick_start, tick_end, preempt, overrun, bad_cmd, any_alive;
  int checks = 0, failures = 0;
  int n_ticks = 0, n_preempt = 0, n_overrun = 0, n_bad = 0;
  longint last_tick = 0, tick_len = 0;

  pfu #(.N(N), .M(M), .X(X)) dut (
    .clk, .rst_n, .in_data, .in_exists, .in_read, .out_data, .out_write,
    .out_full, .const_mode, .wcrt, .tick_start, .tick_end, .preempt,
    .overrun, .bad_cmd, .any_alive
  );

  fsl_host host (
    .clk, .rst_n, .tx_data(in_data), .tx_valid(in_exists), .tx_ready(in_read),
    .rx_data(out_data), .rx_valid(out_write), .rx_take
  );
  assign out_full = !rx_take;

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (tick_start) begin
      n_ticks++;
      tick_len  = host.cycle - last_tick;
      last_tick = host.cycle;
    end
    if (preempt) n_preempt++;
    if (overrun) n_overrun++;
    if (bad_cmd) n_bad++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic cmd(input cmd_id_e id, input int opnd = 0, input logic flag = 0,
                     input logic [31:0] arg = 0);
    host.send_cmd(id, opnd, flag, arg, cmd_lookup(8'(id)).n_reads != 0);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + host.checks, failures + host.failures);
    $finish;
  end

  initial begin
    int t0;
    const_mode = 0; wcrt = WCRT;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(any_alive && n_ticks == 0, "main alive after reset");

    // ---- tick 1: main: abort (strong, cond 0) { PAR(sampler, display) }
    cmd(CMD_ABORT_START, 0, 0, 32'hA0);
    cmd(CMD_SPAWN, 1, 0, 32'h100);
    cmd(CMD_SPAWN, 2, 0, 32'h200);
    cmd(CMD_SUSPEND, 0, 0, 32'h80);
    host.expect_pc(32'h100, "PAR starts the higher-priority sampler");
    cmd(CMD_EOT, 0, 0, 32'h110);
    host.expect_pc(32'h200, "then display in the same tick");
    check(n_ticks == 0, "still the first tick");
    cmd(CMD_EOT, 0, 0, 32'h210);
    host.expect_pc(32'h110, "tick 2 starts with sampler");
    check(n_ticks == 1, "one global tick elapsed");
    // ---- tick 2
    cmd(CMD_EOT, 0, 0, 32'h120);
    host.expect_pc(32'h210, "display in tick 2");
    cmd(CMD_EOT, 0, 0, 32'h220);
    host.expect_pc(32'h120, "sampler first in tick 3");
    // ---- tick 3: reset pressed; display terminates
    cmd(CMD_SET_PV, 0, 1);
    cmd(CMD_EOT, 0, 0, 32'h110);
    host.expect_pc(32'h220, "display in tick 3");
    cmd(CMD_TERMINATE);
    // ---- tick 4: pre(reset) is true: strong abort kills sampler, main at PA
    host.expect_pc(32'hA0, "strong abort: main resumes at the abort address");
    check(n_preempt == 1, "one preemption");
    check(dut.tda == 8'b0000_0001, "sampler killed by the abort");
    check(dut.u_aborts.valid == 0, "abort context dropped");
    cmd(CMD_SET_PV, 0, 0);
    cmd(CMD_EOT, 0, 0, 32'h10);
    host.expect_pc(32'h10, "main alone in tick 5");
    check(n_preempt == 1, "pre(reset) false: no further abort");
    // ---- tick 5: weak abort (cond 1) around PAR(sampler)
    cmd(CMD_ABORT_START, 1, 1, 32'hB0);
    cmd(CMD_SPAWN, 1, 0, 32'h100);
    cmd(CMD_SUSPEND, 0, 0, 32'h80);
    host.expect_pc(32'h100, "sampler spawned again");
    cmd(CMD_EOT, 0, 0, 32'h110);
    host.expect_pc(32'h110, "sampler alone in tick 6");
    // ---- tick 6: nested PAR inside sampler
    cmd(CMD_SPAWN, 3, 0, 32'h300);
    cmd(CMD_SPAWN, 4, 0, 32'h400);
    cmd(CMD_SUSPEND, 0, 0, 32'h130);
    host.expect_pc(32'h300, "nested PAR: first grandchild");
    check(dut.u_threads.pid_o[3] == 1 && dut.u_threads.pid_o[4] == 1, "grandchildren's parent is sampler");
    t0 = n_ticks;
    cmd(CMD_TERMINATE);
    host.expect_pc(32'h400, "second grandchild");
    cmd(CMD_TERMINATE);
    host.expect_pc(32'h130, "join: sampler resumes in the same tick");
    cmd(CMD_TERMINATE);
    host.expect_pc(32'h80, "join: main resumes after its PAR");
    check(n_ticks == t0, "joins take no tick");
    cmd(CMD_ABORT_END);
    cmd(CMD_EOT, 0, 0, 32'h90);
    host.expect_pc(32'h90, "main in tick 7");
    check(dut.u_aborts.valid == 0 && dut.u_threads.alc_o[0] == 0, "abort scope closed");
    // ---- tick 7: weak abort; condition becomes true in this tick
    cmd(CMD_ABORT_START, 1, 1, 32'hB0);
    cmd(CMD_SET_PV, 1, 1);
    cmd(CMD_SPAWN, 1, 0, 32'h100);
    cmd(CMD_SUSPEND, 0, 0, 32'h80);
    host.expect_pc(32'h100, "sampler spawned under a weak abort");
    t0 = n_ticks;
    cmd(CMD_EOT, 0, 0, 32'h110);
    host.expect_pc(32'h110, "weak abort not taken in the tick its condition rose");
    check(n_ticks == t0 + 1 && n_preempt == 1, "tick 8 started, no preemption");
    // ---- tick 8: body runs, then the weak abort fires at the end of the instant
    cmd(CMD_EOT, 0, 0, 32'h111);
    host.expect_pc(32'hB0, "weak abort: main resumes at its abort address");
    check(n_ticks == t0 + 1, "weak abort resumes main in the same instant");
    check(n_preempt == 2 && dut.tda == 8'b0000_0001, "sampler killed by the weak abort");
    cmd(CMD_SET_PV, 1, 0);
    cmd(CMD_EOT, 0, 0, 32'hC0);
    host.expect_pc(32'hC0, "main in tick 9");
    check(n_ticks == t0 + 2, "one tick after the weak abort");
    // ---- constant tick length
    const_mode = 1;
    for (int i = 0; i < 6; i++) begin
      repeat ($urandom_range(0, 30)) @(negedge clk);
      cmd(CMD_EOT, 0, 0, 32'hD0 + i);
      host.expect_pc(32'hD0 + i, "main in constant mode");
      if (i > 0) check(tick_len == WCRT, $sformatf("constant mode tick length %0d", tick_len));
    end
    check(n_overrun == 0, "no overrun");
    repeat (WCRT + 20) @(negedge clk);
    cmd(CMD_EOT, 0, 0, 32'hE0);
    host.expect_pc(32'hE0, "late EOT");
    check(n_overrun == 1 && tick_len > WCRT, "overlong tick reported as overrun");
    const_mode = 0;
    // ---- strong abort over a nested PAR: children and grandchildren die
    cmd(CMD_ABORT_START, 2, 0, 32'hF0);
    cmd(CMD_SPAWN, 1, 0, 32'h100);
    cmd(CMD_SPAWN, 2, 0, 32'h200);
    cmd(CMD_SUSPEND, 0, 0, 32'h80);
    host.expect_pc(32'h100, "outer PAR: slot 1");
    cmd(CMD_SPAWN, 3, 0, 32'h300);
    cmd(CMD_SPAWN, 4, 0, 32'h400);
    cmd(CMD_SUSPEND, 0, 0, 32'h180);
    host.expect_pc(32'h200, "slot 2 before the grandchildren");
    cmd(CMD_ABORT_START, 3, 0, 32'h2F0);  // inner abort owned by slot 2
    cmd(CMD_SET_PV, 2, 1);
    cmd(CMD_EOT, 0, 0, 32'h210);
    host.expect_pc(32'h300, "grandchild 3");
    cmd(CMD_EOT, 0, 0, 32'h310);
    host.expect_pc(32'h400, "grandchild 4");
    check(dut.tda == 8'b0001_1111 && dut.u_aborts.valid == 4'b0011, "five threads, two aborts");
    t0 = n_preempt;
    cmd(CMD_EOT, 0, 0, 32'h410);
    host.expect_pc(32'hF0, "strong abort over nested PAR: main at its handler");
    check(dut.tda == 8'b0000_0001, "children and grandchildren killed");
    check(dut.u_aborts.valid == 0, "their abort contexts freed");
    check(n_preempt == t0 + 1, "one abort fired");
    cmd(CMD_SET_PV, 2, 0);
    cmd(CMD_EOT, 0, 0, 32'hF8);
    host.expect_pc(32'hF8, "main alone again");
    // ---- latency of a hand-over inside a tick: command word seen at t,
    // PC written at t+4.
    cmd(CMD_SPAWN, 1, 0, 32'h100);
    cmd(CMD_SUSPEND, 0, 0, 32'h80);
    host.expect_pc(32'h100, "sampler for latency test");
    cmd(CMD_SPAWN, 2, 0, 32'h200);
    host.drain();
    repeat (3) @(negedge clk);
    begin
      longint ts, te;
      cmd(CMD_EOT, 0, 0, 32'h140);
      @(posedge clk);
      while (!in_exists) @(posedge clk);
      ts = host.cycle;
      while (!out_write) @(posedge clk);
      te = host.cycle;
      check(te - ts == 4, $sformatf("EOT hand-over latency %0d cycles", te - ts));
    end
    host.expect_pc(32'h200, "display after sampler");
    // ---- unknown command
    host.send(32'h0000_0033);
    repeat (5) @(negedge clk);
    check(n_bad == 1, "unknown function ID flagged");
    cmd(CMD_TERMINATE);
    host.expect_pc(32'h140, "sampler next tick");
    cmd(CMD_TERMINATE);
    host.expect_pc(32'h80, "main after PAR");
    cmd(CMD_TERMINATE);
    repeat (10) @(negedge clk);
    check(!any_alive, "program terminated");
    check(host.rx_pending() == 0, "no stray PC");
    $display("ticks=%0d preemptions=%0d overruns=%0d", n_ticks, n_preempt, n_overrun);
    $display("TB_RESULT checks=%0d failures=%0d", checks + host.checks, failures + host.failures);
    $finish;
  end
endmodule
