// tb_pfu_scheduler: self-checking test of the fixed-priority thread selector.
// Random thread status vectors are compared with a reference that walks the
// slots from 0 (highest priority) and takes the first one that is alive, not
// suspended and has not reached its local tick.
module tb_pfu_scheduler;
  localparam int N = 128;
  logic [N-1:0] tda, tsp, tlt;
  logic sel_valid, any_alive;
  logic [$clog2(N)-1:0] sel;
  int checks = 0, failures = 0;

  pfu_scheduler #(.N(N)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s tda=%h tsp=%h tlt=%h sel=%0d", what, tda, tsp, tlt, sel);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int exp_sel;
      logic exp_valid;
      for (int w = 0; w < N / 32; w++) begin
        tda[w*32 +: 32] = (n % 4 == 0) ? $urandom & $urandom & $urandom : $urandom;
        tsp[w*32 +: 32] = $urandom & $urandom;
        tlt[w*32 +: 32] = (n % 3 == 0) ? ~32'h0 ^ (32'h1 << $urandom_range(0, 31)) : $urandom;
      end
      if (n == 5) tda = '0;
      #1;
      exp_valid = 0; exp_sel = 0;
      for (int i = 0; i < N; i++)
        if (!exp_valid && tda[i] && !tsp[i] && !tlt[i]) begin
          exp_valid = 1; exp_sel = i;
        end
      check(sel_valid == exp_valid, "valid");
      if (exp_valid) check(int'(sel) == exp_sel, "selected slot");
      check(any_alive == (tda != '0), "any_alive");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
