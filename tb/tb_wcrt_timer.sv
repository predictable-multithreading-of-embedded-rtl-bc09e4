// tb_wcrt_timer: self-checking test of the tick-length timer.
// A small tick controller starts a tick whenever the timer allows it, after
// a random "work" time. In constant mode with work shorter than the WCRT,
// tick starts must be exactly WCRT cycles apart; with longer work the tick
// starts when the work ends and overrun is reported. In variable mode the
// tick starts as soon as the work ends (the testbench's own tick controller
// needs work + 1 cycles for that).
module tb_wcrt_timer;
  logic clk = 0, rst_n = 0;
  logic const_mode, tick_start, release_ok, overrun;
  logic [31:0] wcrt, count;
  int checks = 0, failures = 0;
  int n_overrun = 0;

  wcrt_timer #(.CNT_W(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run one tick of 'work' cycles and return the tick length
  task automatic one_tick(input int work, output int len, output logic ovr);
    len = 0;
    ovr = 0;
    // work phase: cycles after the previous tick start
    for (int i = 1; i < work; i++) begin
      @(negedge clk);
      len++;
    end
    // wait phase
    tick_start = 0;
    forever begin
      @(negedge clk);
      len++;
      if (release_ok) break;
    end
    tick_start = 1;
    #1 ovr = overrun;
    @(negedge clk);
    tick_start = 0;
    len++;
    // 'len' counted cycles from the last tick_start to this one
  endtask

  initial begin
    int len;
    logic ovr;
    const_mode = 1; wcrt = 40; tick_start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // align: first tick start
    wait (release_ok);
    @(negedge clk);
    tick_start = 1;
    @(negedge clk);
    tick_start = 0;
    for (int n = 0; n < 30; n++) begin
      int work = $urandom_range(1, 35);
      one_tick(work, len, ovr);
      check(len == 40, $sformatf("constant mode tick length %0d (work %0d)", len, work));
      check(!ovr, "no overrun when work < WCRT");
    end
    // overrun: work longer than the WCRT
    one_tick(60, len, ovr);
    check(len == 61, $sformatf("overlong tick %0d", len));
    check(ovr, "overrun reported");
    n_overrun += ovr;
    // variable mode: tick as soon as the work is done
    const_mode = 0;
    for (int n = 0; n < 20; n++) begin
      int work = $urandom_range(1, 35);
      one_tick(work, len, ovr);
      check(len == work + 1, $sformatf("variable mode tick length %0d (work %0d)", len, work));
      check(!ovr, "no overrun in variable mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
