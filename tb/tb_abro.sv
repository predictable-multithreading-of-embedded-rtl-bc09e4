// tb_abro: the ABRO benchmark on the full ARPRET platform (default sizes).
//
// ABRO: emit O as soon as both A and B have been seen, restart whenever R
// was present. As a PRET-C program:
//   main:  while (1) { abort { PAR(waitA, waitB); O = 1; while (1) EOT; }
//                      when pre(R); }
//   waitA: EOT; while (!A) EOT;      (waitB likewise with B)
// The testbench is the processor: it runs each thread's code between two
// EOTs when the PFU hands it the thread's PC, and reports R to the PFU with
// SET_PV. Inputs A, B, R are random per tick. An independent tick-level
// reference of ABRO (A and B ignored in the first tick after a (re)start,
// restart in the tick after R) gives the ticks in which O must be emitted.
// It also reports the PFU-side reaction time per tick (cycles between tick
// starts), the hardware share of the figures given for this benchmark.
module tb_abro;
  import pretc_pkg::*;
  localparam int TICKS = 3000;
  localparam logic [31:0] M_LOOP = 32'h1000, M_JOIN = 32'h1010, M_HALT = 32'h1020,
                          M_ABORTED = 32'h1030;
  localparam logic [31:0] A_START = 32'h2000, A_WAIT = 32'h2010;
  localparam logic [31:0] B_START = 32'h3000, B_WAIT = 32'h3010;

  logic clk = 0, rst_n = 0;
  logic [31:0] mb_m_data, mb_s_data;
  logic mb_m_write, mb_m_full, mb_s_exists, mb_s_read;
  logic tick_start, tick_end, preempt, overrun, bad_cmd, any_alive;
  logic tx_valid, rx_take;
  int checks = 0, failures = 0;

  arpret dut (
    .clk, .rst_n, .mb_m_data, .mb_m_write, .mb_m_full, .mb_s_data,
    .mb_s_exists, .mb_s_read, .const_mode(1'b0), .wcrt(32'd0), .tick_start,
    .tick_end, .preempt, .overrun, .bad_cmd, .any_alive
  );
  fsl_host host (
    .clk, .rst_n, .tx_data(mb_m_data), .tx_valid, .tx_ready(!mb_m_full),
    .rx_data(mb_s_data), .rx_valid(mb_s_exists), .rx_take
  );
  assign mb_m_write = tx_valid && !mb_m_full;
  assign mb_s_read  = mb_s_exists && rx_take;

  always #5 clk = ~clk;

  int n_ticks = 0, n_preempt = 0;
  longint last_tick = 0, tick_len = 0, sum_len = 0, max_len = 0;
  always @(posedge clk) if (rst_n) begin
    if (tick_start) begin
      n_ticks++;
      tick_len  = host.cycle - last_tick;
      last_tick = host.cycle;
      sum_len  += tick_len;
      if (tick_len > max_len) max_len = tick_len;
    end
    if (preempt) n_preempt++;
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

  // inputs per tick, outputs per tick
  logic in_a [TICKS+2];
  logic in_b [TICKS+2];
  logic in_r [TICKS+2];
  logic o_emitted [TICKS+2];
  int cur_tick = -1;
  logic r_sent = 0;
  int n_o = 0, n_restart = 0;

  task automatic run_step(input logic [31:0] pc);
    if (n_ticks != cur_tick) begin
      cur_tick = n_ticks;
      if (in_r[cur_tick] != r_sent) begin       // R sampled at the tick start
        cmd(CMD_SET_PV, 0, in_r[cur_tick]);
        r_sent = in_r[cur_tick];
      end
    end
    case (pc)
      M_LOOP, M_ABORTED: begin
        cmd(CMD_ABORT_START, 0, 1'b0, M_ABORTED);
        cmd(CMD_SPAWN, 1, 0, A_START);
        cmd(CMD_SPAWN, 2, 0, B_START);
        cmd(CMD_SUSPEND, 0, 0, M_JOIN);
      end
      M_JOIN: begin
        o_emitted[cur_tick] = 1'b1;                 // O = 1
        cmd(CMD_EOT, 0, 0, M_HALT);
      end
      M_HALT:  cmd(CMD_EOT, 0, 0, M_HALT);
      A_START: cmd(CMD_EOT, 0, 0, A_WAIT);
      B_START: cmd(CMD_EOT, 0, 0, B_WAIT);
      A_WAIT:  if (in_a[cur_tick]) cmd(CMD_TERMINATE); else cmd(CMD_EOT, 0, 0, A_WAIT);
      B_WAIT:  if (in_b[cur_tick]) cmd(CMD_TERMINATE); else cmd(CMD_EOT, 0, 0, B_WAIT);
      default: check(1'b0, $sformatf("unexpected PC %h", pc));
    endcase
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + host.checks, failures + host.failures);
    $finish;
  end

  initial begin
    logic [31:0] pc;
    for (int t = 0; t < TICKS + 2; t++) begin
      in_a[t] = ($urandom_range(0, 99) < 15);
      in_b[t] = ($urandom_range(0, 99) < 15);
      in_r[t] = ($urandom_range(0, 99) < 4);
      o_emitted[t] = 1'b0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_step(M_LOOP);
    while (n_ticks < TICKS) begin
      host.get_pc(pc);
      run_step(pc);
    end
    // reference ABRO, tick by tick
    begin
      logic got_a = 0, got_b = 0, done = 0;
      int started = 0;
      for (int t = 0; t < TICKS; t++) begin
        logic o_ref;
        o_ref = 0;
        if (t > 0 && in_r[t-1]) begin
          got_a = 0; got_b = 0; done = 0; started = t;
          n_restart++;
        end else if (t != started && !done) begin
          if (in_a[t]) got_a = 1;
          if (in_b[t]) got_b = 1;
          if (got_a && got_b) begin
            o_ref = 1;
            done  = 1;
          end
        end
        check(o_emitted[t] == o_ref, $sformatf("tick %0d: O=%0d, reference %0d", t, o_emitted[t], o_ref));
        n_o += o_ref;
      end
    end
    check(n_o > 10 && n_restart > 10, $sformatf("O emitted %0d times, %0d restarts", n_o, n_restart));
    check(n_preempt == n_restart || n_preempt == n_restart + 1,
          $sformatf("preemptions %0d vs restarts %0d", n_preempt, n_restart));
    $display("ABRO: %0d ticks, O %0d times, %0d restarts, tick length avg %0d max %0d cycles",
             TICKS, n_o, n_restart, sum_len / n_ticks, max_len);
    $display("TB_RESULT checks=%0d failures=%0d", checks + host.checks, failures + host.failures);
    $finish;
  end
endmodule
