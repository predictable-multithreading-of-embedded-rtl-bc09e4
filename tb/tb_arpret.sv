// tb_arpret: end-to-end test of the ARPRET platform at its default sizes
// (128 threads, 16 abort entries, 16 conditions, FSL depth 16).
//
// The testbench plays the processor. It runs the PRET-C producer-consumer
// program: main opens a strong abort on pre(reset) around PAR(sampler,
// display); sampler writes the sensor value into a circular buffer of
// BUF_N = 1000 entries every other tick (waiting while it is full), display
// takes one out every third tick and "writes it to the LCD". Each thread's
// code between two EOTs is modelled behaviourally and selected by the PC the
// PFU hands back; every command goes through the two FSL bridges.
//
// Phases and what they check:
//  A  variable tick length until the buffer is full: in every tick each
//     thread runs once, in priority order; displayed values come out in the
//     order they were sampled; the sampler waits while the buffer is full.
//  B  constant mode with WCRT = the longest tick measured in A plus a margin:
//     every tick lasts exactly WCRT cycles; one deliberately long tick is
//     reported as an overrun.
//  C  reset pressed for one tick: in the next tick the strong abort kills
//     both threads before they run and main restarts them with an empty
//     buffer.
//  D  a weak abort around a nested PAR with terminating threads (join), and a
//     burst of commands that fills the processor-to-PFU FSL bridge.
// Each mechanism is counted and must have happened at least once.
module tb_arpret;
  import pretc_pkg::*;
  localparam int BUF_N = 1000;
  // program labels (PCs): main 0x1xxx, sampler 0x2xxx, display 0x3xxx
  localparam logic [31:0] M_LOOP = 32'h1000, M_JOIN = 32'h1080, M_ABORTED = 32'h1100;
  localparam logic [31:0] S_START = 32'h2000, S_WAIT = 32'h2010, S_INC = 32'h2020;
  localparam logic [31:0] D_START = 32'h3000, D_WAIT = 32'h3010, D_DEC = 32'h3020,
                          D_LCD = 32'h3030;

  logic clk = 0, rst_n = 0;
  logic [31:0] mb_m_data, mb_s_data, wcrt;
  logic mb_m_write, mb_m_full, mb_s_exists, mb_s_read;
  logic const_mode, tick_start, tick_end, preempt, overrun, bad_cmd, any_alive;
  logic tx_valid, rx_take;
  int checks = 0, failures = 0;

  arpret dut (
    .clk, .rst_n, .mb_m_data, .mb_m_write, .mb_m_full, .mb_s_data,
    .mb_s_exists, .mb_s_read, .const_mode, .wcrt, .tick_start, .tick_end,
    .preempt, .overrun, .bad_cmd, .any_alive
  );

  fsl_host host (
    .clk, .rst_n, .tx_data(mb_m_data), .tx_valid, .tx_ready(!mb_m_full),
    .rx_data(mb_s_data), .rx_valid(mb_s_exists), .rx_take
  );
  assign mb_m_write = tx_valid && !mb_m_full;
  assign mb_s_read  = mb_s_exists && rx_take;

  always #5 clk = ~clk;

  // ---- mechanism counters
  int n_ticks = 0, n_preempt = 0, n_overrun = 0, n_bad = 0, n_full_cycles = 0;
  int n_spawn = 0, n_suspend = 0, n_eot = 0, n_term = 0, n_join = 0;
  int n_buf_full_waits = 0, n_buf_empty_waits = 0, n_const_ticks = 0;
  int n_strong = 0, n_weak = 0, n_displayed = 0;
  longint last_tick = 0, tick_len = 0, max_var_len = 0;
  always @(posedge clk) if (rst_n) begin
    if (tick_start) begin
      n_ticks++;
      tick_len  = host.cycle - last_tick;
      last_tick = host.cycle;
    end
    if (preempt) n_preempt++;
    if (overrun) n_overrun++;
    if (bad_cmd) n_bad++;
    if (tx_valid && mb_m_full) n_full_cycles++;
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
    case (id)
      CMD_SPAWN:     n_spawn++;
      CMD_SUSPEND:   n_suspend++;
      CMD_EOT:       n_eot++;
      CMD_TERMINATE: n_term++;
      default: ;
    endcase
  endtask

  // ---- shared program state (C globals of the PRET-C program)
  int cnt;
  logic [31:0] buffer [BUF_N];
  int s_i, d_i;
  logic [31:0] d_out;
  logic [31:0] expect_q[$];    // values written and not yet read
  logic reset_in = 0, reset_sent = 0;
  // per-tick bookkeeping
  int cur_tick = -1, last_slot = -1;
  logic ran_s, ran_d;
  int both_ran_ticks = 0;
  logic strict_order = 1;

  function automatic logic [31:0] sensor(int tick);
    return 32'(tick) * 32'h9E37_79B9 + 32'h1234;
  endfunction

  function automatic int slot_of(logic [31:0] pc);
    case (pc[15:12])
      4'h1: return 0;
      4'h2: return 1;
      4'h3: return 2;
      default: return 9;
    endcase
  endfunction

  // Run the code at 'pc' up to the next hand-over.
  task automatic run_step(input logic [31:0] pc);
    int slot = slot_of(pc);
    if (n_ticks != cur_tick) begin
      if (cur_tick >= 0 && ran_s && ran_d) both_ran_ticks++;
      cur_tick  = n_ticks;
      last_slot = -1;
      ran_s = 0;
      ran_d = 0;
      // reactive input sampled at the start of the tick
      if (reset_in != reset_sent) begin
        cmd(CMD_SET_PV, 0, reset_in);
        reset_sent = reset_in;
      end
    end
    if (strict_order)
      check(slot > last_slot, $sformatf("tick %0d: slot %0d ran after slot %0d", cur_tick, slot, last_slot));
    last_slot = slot;
    case (pc)
      M_LOOP: begin
        cmd(CMD_ABORT_START, 0, 1'b0, M_ABORTED);  // abort ... when pre(reset)
        cnt = 0;                                    // flush(buffer)
        expect_q.delete();
        cmd(CMD_SPAWN, 1, 0, S_START);
        cmd(CMD_SPAWN, 2, 0, D_START);
        cmd(CMD_SUSPEND, 0, 0, M_JOIN);
      end
      M_ABORTED: begin
        cnt = 0;
        cmd(CMD_EOT, 0, 0, M_LOOP);
      end
      S_START: begin
        s_i = 0;
        ran_s = 1;
        cmd(CMD_EOT, 0, 0, S_WAIT);
      end
      S_WAIT: begin
        ran_s = 1;
        if (cnt == BUF_N) begin
          n_buf_full_waits++;
          cmd(CMD_EOT, 0, 0, S_WAIT);
        end else begin
          buffer[s_i] = sensor(cur_tick);
          expect_q.push_back(buffer[s_i]);
          cmd(CMD_EOT, 0, 0, S_INC);
        end
      end
      S_INC: begin
        ran_s = 1;
        s_i = (s_i + 1) % BUF_N;
        cnt = cnt + 1;
        cmd(CMD_EOT, 0, 0, S_WAIT);
      end
      D_START: begin
        d_i = 0;
        ran_d = 1;
        cmd(CMD_EOT, 0, 0, D_WAIT);
      end
      D_WAIT: begin
        ran_d = 1;
        if (cnt == 0) begin
          n_buf_empty_waits++;
          cmd(CMD_EOT, 0, 0, D_WAIT);
        end else begin
          d_out = buffer[d_i];
          cmd(CMD_EOT, 0, 0, D_DEC);
        end
      end
      D_DEC: begin
        ran_d = 1;
        d_i = (d_i + 1) % BUF_N;
        cnt = cnt - 1;
        cmd(CMD_EOT, 0, 0, D_LCD);
      end
      D_LCD: begin                                   // WriteLCD(out)
        ran_d = 1;
        check(expect_q.size() != 0 && d_out == expect_q[0], "displayed value in sampling order");
        if (expect_q.size() != 0) void'(expect_q.pop_front());
        n_displayed++;
        cmd(CMD_EOT, 0, 0, D_WAIT);
      end
      default: check(1'b0, $sformatf("unexpected PC %h", pc));
    endcase
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + host.checks, failures + host.failures);
    $finish;
  end

  initial begin
    logic [31:0] pc;
    int t0;
    const_mode = 0; wcrt = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // main starts running at reset
    run_step(M_LOOP);

    // ---- A: variable tick length until the buffer has been full a while
    while (n_buf_full_waits < 20 && n_ticks < 8000) begin
      host.get_pc(pc);
      if (n_ticks > 2 && tick_len > max_var_len) max_var_len = tick_len;
      run_step(pc);
    end
    check(n_buf_full_waits >= 20, "buffer filled up (sampler waited while full)");
    check(cnt == BUF_N && expect_q.size() == BUF_N, "cnt agrees with the buffer contents");
    check(both_ran_ticks > 5000, $sformatf("both threads ran in %0d ticks", both_ran_ticks));
    $display("phase A: %0d ticks, longest tick %0d cycles, %0d values displayed",
             n_ticks, max_var_len, n_displayed);

    // ---- B: constant tick length
    wcrt = 32'(max_var_len + 8);
    const_mode = 1;
    t0 = n_ticks;
    while (n_ticks < t0 + 200) begin
      host.get_pc(pc);
      if (n_ticks > t0 + 2 && slot_of(pc) == 1 && pc != S_START) begin
        check(tick_len == longint'(wcrt), $sformatf("constant tick length %0d", tick_len));
        n_const_ticks++;
      end
      run_step(pc);
    end
    check(n_overrun == 0, "no overrun while within the WCRT");
    // one overlong tick: the processor stalls before its EOT
    host.get_pc(pc);
    repeat (2 * wcrt) @(negedge clk);
    run_step(pc);
    while (n_overrun == 0 && n_ticks < t0 + 210) begin
      host.get_pc(pc);
      run_step(pc);
    end
    check(n_overrun == 1, "overlong tick reported");
    const_mode = 0;

    // ---- C: reset pressed for one tick -> strong abort in the next one
    reset_in = 1;
    forever begin
      host.get_pc(pc);
      if (reset_sent && n_ticks != cur_tick) break;
      run_step(pc);
    end
    reset_in = 0;
    check(pc == M_ABORTED, $sformatf("strong abort: first PC of next tick %h", pc));
    check(n_preempt == 1, "one preemption");
    n_strong = n_preempt;
    check(dut.u_pfu.u_threads.tda[2:1] == 2'b00, "sampler and display killed");
    run_step(pc);
    host.get_pc(pc);
    check(pc == M_LOOP, "main loops back next tick");
    run_step(pc);
    check(cnt == 0, "buffer flushed");
    for (int k = 0; k < 60; k++) begin
      host.get_pc(pc);
      run_step(pc);
    end
    check(n_displayed > 0 && expect_q.size() <= 20, "producer-consumer restarted");
    check(n_preempt == 1, "no spurious preemption after reset released");

    // ---- D: weak abort around a nested PAR, terminating threads
    // main (suspended in its PAR) is restarted by a reset abort first
    reset_in = 1;
    forever begin
      host.get_pc(pc);
      if (reset_sent && n_ticks != cur_tick) break;
      run_step(pc);
    end
    reset_in = 0;
    check(pc == M_ABORTED, "second strong abort");
    cmd(CMD_SET_PV, 0, 0);
    reset_sent = 0;
    strict_order = 0;
    // main: weak abort on condition 3 around PAR(T1 = slot 1, T2 = slot 2)
    cmd(CMD_ABORT_START, 3, 1'b1, 32'h1200);
    cmd(CMD_SPAWN, 1, 0, 32'h4100);
    cmd(CMD_SPAWN, 2, 0, 32'h4200);
    cmd(CMD_SUSPEND, 0, 0, 32'h1180);
    host.expect_pc(32'h4100, "T1 first");
    // T1: PAR(T11 = slot 3, T12 = slot 4)
    cmd(CMD_SPAWN, 3, 0, 32'h4300);
    cmd(CMD_SPAWN, 4, 0, 32'h4400);
    cmd(CMD_SUSPEND, 0, 0, 32'h4180);
    host.expect_pc(32'h4200, "T2 (slot 2) before T1's children (slots 3, 4)");
    cmd(CMD_EOT, 0, 0, 32'h4210);
    host.expect_pc(32'h4300, "T11");
    cmd(CMD_TERMINATE);
    host.expect_pc(32'h4400, "T12");
    cmd(CMD_TERMINATE);
    host.expect_pc(32'h4180, "join: T1 resumes after its PAR in the same tick");
    n_join++;
    // condition 3 rises now; T1 ends its tick
    t0 = n_ticks;
    cmd(CMD_SET_PV, 3, 1);
    cmd(CMD_EOT, 0, 0, 32'h4190);
    host.expect_pc(32'h4190, "next tick: T1");
    check(n_ticks == t0 + 1, "one tick");
    cmd(CMD_EOT, 0, 0, 32'h4191);
    host.expect_pc(32'h4210, "T2 runs in the tick the weak abort fires");
    // burst of commands to fill the processor-to-PFU bridge
    for (int k = 0; k < 48; k++) cmd(CMD_SET_PV, 7, k[0]);
    cmd(CMD_SET_PV, 3, 0);
    cmd(CMD_EOT, 0, 0, 32'h4220);
    host.expect_pc(32'h1200, "weak abort: main resumes at the end of the instant");
    check(n_ticks == t0 + 1, "weak abort taken in the same instant");
    n_weak = n_preempt - n_strong;
    check(dut.u_pfu.u_threads.tda[4:1] == 4'b0000, "T1 and T2 killed by the weak abort");
    // main ends its PAR-free epilogue with a joinable PAR of one thread
    cmd(CMD_SPAWN, 5, 0, 32'h4500);
    cmd(CMD_SUSPEND, 0, 0, 32'h1300);
    host.expect_pc(32'h4500, "single-thread PAR");
    cmd(CMD_TERMINATE);
    host.expect_pc(32'h1300, "join: main resumes");
    n_join++;
    cmd(CMD_TERMINATE);
    repeat (20) @(negedge clk);
    check(!any_alive, "program terminated");
    check(n_bad == 0, "no bad command");

    // ---- every mechanism must have happened
    check(n_spawn > 0, "SPAWN used");
    check(n_suspend > 0, "SUSPEND used");
    check(n_eot > 0, "EOT used");
    check(n_term > 0, "TERMINATE used");
    check(n_join >= 2, "join happened");
    check(n_strong > 0, "strong abort happened");
    check(n_weak > 0, "weak abort happened");
    check(n_const_ticks > 100, "constant-length ticks happened");
    check(n_overrun > 0, "overrun happened");
    check(n_full_cycles > 0, "FSL bridge became full");
    check(n_buf_empty_waits > 0, "display waited on an empty buffer");
    check(n_buf_full_waits > 0, "sampler waited on a full buffer");
    $display("ticks=%0d spawn=%0d suspend=%0d eot=%0d terminate=%0d join=%0d strong=%0d weak=%0d",
             n_ticks, n_spawn, n_suspend, n_eot, n_term, n_join, n_strong, n_weak);
    $display("const_ticks=%0d overrun=%0d fsl_full_cycles=%0d buf_full_waits=%0d buf_empty_waits=%0d displayed=%0d",
             n_const_ticks, n_overrun, n_full_cycles, n_buf_full_waits, n_buf_empty_waits, n_displayed);
    $display("TB_RESULT checks=%0d failures=%0d", checks + host.checks, failures + host.failures);
    $finish;
  end
endmodule
