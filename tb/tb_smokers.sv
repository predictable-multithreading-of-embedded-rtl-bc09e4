// tb_smokers: the cigarette smokers benchmark on the full ARPRET platform
// (default sizes), with weak preemption and constant-length ticks.
//
// The program (written here as a tick-level PRET-C program of this
// testbench's own; the testbench is the processor and runs each thread's
// code between two EOTs when the PFU hands it the thread's PC):
//   main:     PAR(agent, smoker0, smoker1, smoker2);
//   agent:    while (1) { if (table empty && agent_free) { put the two
//               ingredients other than c on the table, strength d;
//               agent_free = 0; } EOT; }
//   smoker i: while (1) { while (table != i) EOT; take them;
//               weak abort { while (1) { puff++; if (puff == d) done_i = 1;
//                                       EOT; } } when pre(done_i);
//               done_i = 0; agent_free = 1; EOT; }
// c and d (1..4) are random per cigarette. done_i is abort condition i+1,
// reported to the PFU with SET_PV. The agent has the higher priority, so a
// smoker takes the ingredients in the tick they are put down and the weak
// abort ends its cigarette at the end of the tick after its d-th puff. The
// agent sees agent_free one tick later. Cigarette k therefore starts at tick
// s(k) and ends at tick s(k) + d(k), with s(k+1) = s(k) + d(k) + 1; the
// testbench checks who smoked when against that formula.
//
// The first half runs in variable-tick mode and measures the longest tick.
// The second half runs in constant mode with wcrt = that length + 8: every
// tick must then start exactly wcrt cycles after the previous one, with no
// overrun.
module tb_smokers;
  import pretc_pkg::*;
  localparam int NCIG = 400;
  localparam logic [31:0] M_START = 32'h1000, M_JOIN = 32'h1010;
  localparam logic [31:0] AGENT = 32'h2000;
  localparam logic [31:0] S_BASE = 32'h3000;     // + 0x100*i: WAIT, +0x10 SMOKE, +0x20 DONE

  logic clk = 0, rst_n = 0;
  logic [31:0] mb_m_data, mb_s_data;
  logic mb_m_write, mb_m_full, mb_s_exists, mb_s_read;
  logic tick_start, tick_end, preempt, overrun, bad_cmd, any_alive;
  logic tx_valid, rx_take;
  logic const_mode = 1'b0;
  logic [31:0] wcrt = '0;
  int checks = 0, failures = 0;

  arpret dut (
    .clk, .rst_n, .mb_m_data, .mb_m_write, .mb_m_full, .mb_s_data,
    .mb_s_exists, .mb_s_read, .const_mode, .wcrt, .tick_start,
    .tick_end, .preempt, .overrun, .bad_cmd, .any_alive
  );
  fsl_host host (
    .clk, .rst_n, .tx_data(mb_m_data), .tx_valid, .tx_ready(!mb_m_full),
    .rx_data(mb_s_data), .rx_valid(mb_s_exists), .rx_take
  );
  assign mb_m_write = tx_valid && !mb_m_full;
  assign mb_s_read  = mb_s_exists && rx_take;

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // tick bookkeeping, measured on the PFU's tick_start pulses
  int n_ticks = 0, n_preempt = 0, n_overrun = 0, n_const = 0, n_bad = 0;
  int const_from = -1;                 // first tick whose spacing must be wcrt
  longint last_tick = 0, tick_len = 0, max_len = 0;
  always @(posedge clk) if (rst_n) begin
    if (tick_start) begin
      n_ticks++;
      tick_len  = host.cycle - last_tick;
      last_tick = host.cycle;
      if (const_from < 0 && tick_len > max_len) max_len = tick_len;
      if (const_from >= 0 && n_ticks >= const_from) begin
        n_const++;
        check(tick_len == longint'(wcrt),
              $sformatf("constant tick %0d lasted %0d, wcrt %0d", n_ticks, tick_len, wcrt));
      end
    end
    if (preempt) n_preempt++;
    if (overrun) n_overrun++;
    if (bad_cmd) n_bad++;
  end

  task automatic cmd(input cmd_id_e id, input int opnd = 0, input logic flag = 0,
                     input logic [31:0] arg = 0);
    host.send_cmd(id, opnd, flag, arg, cmd_lookup(8'(id)).n_reads != 0);
  endtask

  // the program's shared variables, and what the testbench logs
  int choice [NCIG];
  int dur    [NCIG];
  int take_tick [NCIG];
  int take_who  [NCIG];
  int done_tick [NCIG];
  int done_who  [NCIG];
  int table_c = -1, strength = 0, placed = 0, n_done = 0;
  logic agent_free = 1'b1;
  int puff [3];
  int my_d [3];
  int my_k [3];
  int cur_tick = 0;

  task automatic smoke(input int i);
    puff[i]++;
    if (puff[i] == my_d[i]) cmd(CMD_SET_PV, i + 1, 1'b1);
    cmd(CMD_EOT, 0, 0, S_BASE + 32'(i * 'h100) + 32'h10);
  endtask

  task automatic run_step(input logic [31:0] pc);
    int i;
    cur_tick = n_ticks;
    if (pc == M_START) begin
      cmd(CMD_SPAWN, 1, 0, AGENT);
      for (int s = 0; s < 3; s++) cmd(CMD_SPAWN, s + 2, 0, S_BASE + 32'(s * 'h100));
      cmd(CMD_SUSPEND, 0, 0, M_JOIN);
    end else if (pc == AGENT) begin
      if (table_c < 0 && agent_free && placed < NCIG) begin
        table_c    = choice[placed];
        strength   = dur[placed];
        agent_free = 1'b0;
        placed++;
      end
      cmd(CMD_EOT, 0, 0, AGENT);
    end else if (pc >= S_BASE && pc < S_BASE + 32'h300) begin
      i = int'((pc - S_BASE) >> 8);
      unique case (pc[7:0])
        8'h00: begin                                   // waiting for ingredients
          if (table_c == i) begin
            table_c = -1;
            my_d[i] = strength;
            my_k[i] = placed - 1;
            puff[i] = 0;
            take_tick[my_k[i]] = cur_tick;
            take_who[my_k[i]]  = i;
            cmd(CMD_ABORT_START, i + 1, 1'b1, S_BASE + 32'(i * 'h100) + 32'h20);
            smoke(i);
          end else begin
            cmd(CMD_EOT, 0, 0, pc);
          end
        end
        8'h10: smoke(i);
        8'h20: begin                                   // weak abort handler
          done_tick[my_k[i]] = cur_tick;
          done_who[my_k[i]]  = i;
          n_done++;
          agent_free = 1'b1;
          cmd(CMD_SET_PV, i + 1, 1'b0);
          cmd(CMD_EOT, 0, 0, S_BASE + 32'(i * 'h100));
        end
        default: check(1'b0, $sformatf("unexpected PC %h", pc));
      endcase
    end else begin
      check(1'b0, $sformatf("unexpected PC %h", pc));
    end
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
    int s;
    for (int k = 0; k < NCIG; k++) begin
      choice[k]    = $urandom_range(0, 2);
      dur[k]       = $urandom_range(1, 4);
      take_tick[k] = -1;
      done_tick[k] = -1;
      take_who[k]  = -1;
      done_who[k]  = -1;
    end
    for (int k = 0; k < 3; k++) begin
      puff[k] = 0;
      my_d[k] = 0;
      my_k[k] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_step(M_START);
    while (n_done < NCIG) begin
      host.get_pc(pc);
      if (const_from < 0 && n_done >= NCIG / 2) begin
        // switch to constant-length ticks between two steps
        wcrt       = 32'(max_len + 8);
        const_mode = 1'b1;
        const_from = n_ticks + 2;
      end
      run_step(pc);
    end
    // reference schedule
    s = 0;
    for (int k = 0; k < NCIG; k++) begin
      check(take_who[k] == choice[k] && done_who[k] == choice[k],
            $sformatf("cigarette %0d smoked by %0d/%0d, expected %0d", k, take_who[k], done_who[k], choice[k]));
      check(take_tick[k] == s && done_tick[k] == s + dur[k],
            $sformatf("cigarette %0d ticks %0d..%0d, expected %0d..%0d", k, take_tick[k], done_tick[k],
                      s, s + dur[k]));
      s = s + dur[k] + 1;
    end
    check(n_preempt == NCIG, $sformatf("weak preemptions %0d, expected %0d", n_preempt, NCIG));
    check(n_const > 100, $sformatf("only %0d constant-length ticks", n_const));
    check(n_overrun == 0, $sformatf("%0d overruns", n_overrun));
    check(n_bad == 0, $sformatf("%0d bad commands", n_bad));
    $display("Smokers: %0d cigarettes in %0d ticks, longest variable tick %0d cycles, %0d constant ticks of %0d",
             NCIG, n_ticks, max_len, n_const, wcrt);
    $display("TB_RESULT checks=%0d failures=%0d", checks + host.checks, failures + host.failures);
    $finish;
  end
endmodule
