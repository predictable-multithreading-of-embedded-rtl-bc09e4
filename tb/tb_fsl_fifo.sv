// tb_fsl_fifo: self-checking test of the FSL bridge FIFO.
// Random writes and reads (never writing while full or reading while empty)
// are compared with a queue model: data order, the FULL flag at exactly
// DEPTH words, the EXISTS flag, and the one-cycle write-to-read latency.
module tb_fsl_fifo;
  localparam int W = 32, D = 16;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] m_data, s_data;
  logic m_write, m_full, s_exists, s_read;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  int saw_full = 0;

  fsl_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_write = 0; s_read = 0; m_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!s_exists && !m_full, "empty after reset");
    // latency: write at t, visible at t+1
    m_data = 32'hCAFE_0001; m_write = 1;
    @(negedge clk);
    m_write = 0;
    check(s_exists && s_data == 32'hCAFE_0001, "word visible one cycle after write");
    s_read = 1;
    @(negedge clk);
    s_read = 0;
    check(!s_exists, "empty after read");
    // fill to full
    for (int i = 0; i < D; i++) begin
      check(!m_full, "not full before DEPTH words");
      m_data = 32'h100 + i; m_write = 1;
      @(negedge clk);
    end
    m_write = 0;
    check(m_full, "full at DEPTH words");
    for (int i = 0; i < D; i++) begin
      check(s_exists && s_data == 32'h100 + i, "drain order");
      s_read = 1;
      @(negedge clk);
    end
    s_read = 0;
    check(!s_exists && !m_full, "empty after drain");
    // random traffic
    for (int n = 0; n < 5000; n++) begin
      m_write = !m_full && ($urandom_range(0, 2) != 0);
      s_read  = s_exists && ($urandom_range(0, 2) != 0);
      m_data  = $urandom;
      if (m_full) saw_full++;
      check(s_exists == (model.size() != 0), "exists matches model");
      check(m_full == (model.size() == D), "full matches model");
      if (s_exists && model.size() != 0) check(s_data == model[0], "data matches model");
      @(posedge clk);
      if (s_read) void'(model.pop_front());
      if (m_write) model.push_back(m_data);
      @(negedge clk);
    end
    m_write = 0; s_read = 0;
    $display("random phase: full seen %0d cycles", saw_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
