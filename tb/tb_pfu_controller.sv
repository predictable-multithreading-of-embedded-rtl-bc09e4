// tb_pfu_controller: self-checking test of the PFU controller's command
// decoding. The controller is wired to real thread/abort tables, scheduler
// and timer (as inside the PFU); the testbench counts, for every function
// ID, how many FSL words the controller consumes and how many PCs it sends
// back, against the lookup table: SPAWN(10) 1 read / 0 writes, EOT(12) 1/1,
// SUSPEND(14) 1/1 as the document's table gives, plus this design's
// TERMINATE(16) 0/1, ABORT_START(18) 1/0, ABORT_END(20) 0/0, SET_PV(22) 0/0.
// Unknown IDs must be dropped (one word) and flagged. It also checks that
// the word after SPAWN becomes the new thread's PC and the cycle count of an
// EOT hand-over.
module tb_pfu_controller;
  import pretc_pkg::*;
  localparam int N = 8, M = 4, X = 4;
  localparam int TW = $clog2(N), AW = $clog2(M), PW = $clog2(X);
  logic clk = 0, rst_n = 0;
  logic [31:0] in_data, out_data;
  logic in_exists, in_read, out_write, out_full, rx_take;
  tt_op_e tt_op;
  logic [TW-1:0] tt_idx, cur, at_tid, q_tid, sel;
  logic [PC_W-1:0] tt_pc, at_pa, q_pa;
  logic [AW-1:0] tt_al, at_al, q_al;
  logic [N-1:0] tda, tsp, tlt;
  logic [PC_W-1:0] pc_a [N];
  logic [TW-1:0] pid_a [N];
  logic [AW-1:0] alc_a [N];
  logic [SC_W-1:0] sc_a [N];
  at_op_e at_op;
  logic [PW-1:0] at_pvi;
  logic at_ws, at_val, q_ws, q_hit, at_full, sel_valid, any_alive, release_ok;
  logic tick_start, tick_end, preempt, bad_cmd;
  logic [1:0] any_trig;
  logic [M-1:0] at_valid;
  logic [X-1:0] pv;
  logic [31:0] tcount;
  int checks = 0, failures = 0;
  int n_read = 0, n_write = 0, n_bad = 0;
  logic [7:0] ids[5] = '{8'd0, 8'd11, 8'd13, 8'd24, 8'd255};

  pfu_controller #(.N(N), .M(M), .X(X)) dut (
    .clk, .rst_n, .in_data, .in_exists, .in_read, .out_data, .out_write,
    .out_full, .tt_op, .tt_idx, .cur, .tt_pc, .tt_al, .tda, .pc_i(pc_a),
    .pid_i(pid_a), .alc_i(alc_a), .at_op, .at_tid, .at_pvi, .at_ws, .at_pa,
    .at_al, .at_val, .q_tid, .q_ws, .q_hit, .q_pa, .q_al, .any_trig,
    .at_full, .sel_valid, .sel, .any_alive, .release_ok, .tick_start,
    .tick_end, .preempt, .bad_cmd
  );
  thread_table #(.N(N), .M(M)) u_tt (
    .clk, .rst_n, .op(tt_op), .idx(tt_idx), .cur, .pc(tt_pc), .al(tt_al),
    .tda, .tsp, .tlt, .pc_o(pc_a), .pid_o(pid_a), .alc_o(alc_a), .sc_o(sc_a)
  );
  abort_table #(.N(N), .M(M), .X(X)) u_at (
    .clk, .rst_n, .op(at_op), .tid(at_tid), .pvi(at_pvi), .ws(at_ws),
    .pa(at_pa), .al(at_al), .val(at_val), .q_tid, .q_ws, .q_hit, .q_pa, .q_al,
    .any_trig, .full(at_full), .valid(at_valid), .pv
  );
  pfu_scheduler #(.N(N)) u_sc (.tda, .tsp, .tlt, .sel_valid, .sel, .any_alive);
  wcrt_timer #(.CNT_W(32)) u_tm (
    .clk, .rst_n, .const_mode(1'b0), .wcrt(32'd0), .tick_start, .count(tcount),
    .release_ok, .overrun()
  );
  fsl_host host (
    .clk, .rst_n, .tx_data(in_data), .tx_valid(in_exists), .tx_ready(in_read),
    .rx_data(out_data), .rx_valid(out_write), .rx_take
  );
  assign out_full = !rx_take;

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (in_read && in_exists) n_read++;
    if (out_write && !out_full) n_write++;
    if (bad_cmd) n_bad++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Send one command plus 'extra' words and check the words consumed and
  // PCs returned.
  task automatic probe(input logic [31:0] word, input int extra, input int exp_reads,
                       input int exp_writes, input string name);
    int r0 = n_read, w0 = n_write;
    host.send(word);
    for (int i = 0; i < extra; i++) host.send(32'h1000 + i * 4);
    repeat (40) @(negedge clk);
    check(n_read - r0 == 1 + exp_reads,
          $sformatf("%s: %0d words read, expected %0d", name, n_read - r0, 1 + exp_reads));
    check(n_write - w0 == exp_writes,
          $sformatf("%s: %0d PCs written, expected %0d", name, n_write - w0, exp_writes));
    while (host.rx_pending() != 0) host.expect_pc(host.rxq[0], "drain");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + host.checks, failures + host.failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // SPAWN: id word, then the thread's start address
    probe(cmd_word(CMD_SPAWN, 8'd1, 1'b0), 1, 1, 0, "SPAWN");
    check(tda[1] && pc_a[1] == 32'h1000 && pid_a[1] == 0, "SPAWN stores the PC of the new thread");
    check(!tlt[1], "SPAWN clears the new thread's TLT");
    probe(cmd_word(CMD_ABORT_START, 8'd2, 1'b1), 1, 1, 0, "ABORT_START");
    check(at_valid == 4'b0001 && alc_a[0] == 1, "ABORT_START allocates a context");
    probe(cmd_word(CMD_ABORT_END, 8'd0, 1'b0), 0, 0, 0, "ABORT_END");
    check(at_valid == 4'b0000 && alc_a[0] == 0, "ABORT_END releases it");
    probe(cmd_word(CMD_SET_PV, 8'd3, 1'b1), 0, 0, 0, "SET_PV");
    probe(cmd_word(CMD_SUSPEND, 8'd0, 1'b0), 1, 1, 1, "SUSPEND");
    check(tsp[0] && cur == 1, "SUSPEND blocks main and hands over to slot 1");
    probe(cmd_word(CMD_EOT, 8'd0, 1'b0), 1, 1, 1, "EOT");
    check(pv[3], "staged pre-value latched at the tick");
    probe(cmd_word(CMD_TERMINATE, 8'd0, 1'b0), 0, 0, 1, "TERMINATE");
    check(!tda[1] && !tsp[0] && cur == 0, "TERMINATE: child ends, main resumes");
    // unknown IDs: one word dropped, flagged, no reply
    for (int k = 0; k < 5; k++) begin
      int b0;
      b0 = n_bad;
      probe({24'h0, ids[k]}, 0, 0, 0, $sformatf("unknown ID %0d", ids[k]));
      check(n_bad == b0 + 1, "unknown ID flagged");
    end
    check(tda == 8'b0000_0001 && !tsp[0], "unknown IDs change nothing");
    // EOT hand-over timing: command word seen at t, PC written at t+4
    begin
      longint ts, te;
      host.send(cmd_word(CMD_EOT, 8'd0, 1'b0));
      host.send(32'h2000);
      @(posedge clk);
      while (!in_exists) @(posedge clk);
      ts = host.cycle;
      while (!out_write) @(posedge clk);
      te = host.cycle;
      // 4 cycles for the hand-over plus 3 for the tick boundary (the tick
      // ends, the next one is released, the scheduler selects again)
      check(te - ts == 7, $sformatf("EOT with tick boundary: %0d cycles", te - ts));
      host.expect_pc(32'h2000, "main continues in the next tick");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + host.checks, failures + host.failures);
    $finish;
  end
endmodule
