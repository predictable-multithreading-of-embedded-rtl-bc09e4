// fsl_host: testbench model of the processor's side of the two FSL links.
//
// It plays the part of the soft-core processor running compiled PRET-C
// code: send() queues command and data words for the PFU, expect_pc() waits
// for the next PC the PFU hands back and compares it with the expected value.
// Handshake (the same for a direct PFU connection and for the FSL FIFOs):
// a word leaves the transmit queue in a cycle with tx_valid && tx_ready, a
// word is taken from the PFU in a cycle with rx_valid && rx_take. rx_take
// can be withheld at random (stall_pct) to exercise back-pressure.
module fsl_host (
  input  logic        clk,
  input  logic        rst_n,   // links are ignored while reset is low
  output logic [31:0] tx_data,
  output logic        tx_valid,
  input  logic        tx_ready,
  input  logic [31:0] rx_data,
  input  logic        rx_valid,
  output logic        rx_take
);
  import pretc_pkg::*;

  logic [31:0] txq[$];
  logic [31:0] rxq[$];
  int checks = 0;
  int failures = 0;
  int stall_pct = 0;
  int stalls = 0;
  int words_sent = 0;
  longint cycle = 0;

  initial begin
    tx_valid = 1'b0;
    tx_data  = '0;
    rx_take  = 1'b1;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst_n) begin
      // nothing moves during reset
    end else if (tx_valid && tx_ready) begin
      void'(txq.pop_front());
      words_sent <= words_sent + 1;
    end
    if (rst_n && rx_valid && rx_take) rxq.push_back(rx_data);
    if (rst_n && rx_valid && !rx_take) stalls <= stalls + 1;
  end

  always @(negedge clk) begin
    tx_valid <= (txq.size() != 0);
    tx_data  <= (txq.size() != 0) ? txq[0] : 32'h0;
    rx_take  <= ($urandom_range(0, 99) >= stall_pct);
  end

  task automatic send(input logic [31:0] w);
    txq.push_back(w);
  endtask

  task automatic send_cmd(input cmd_id_e id, input int operand, input logic flag,
                          input logic [31:0] word2 = 32'h0, input logic has2 = 1'b0);
    txq.push_back(cmd_word(id, operand[7:0], flag));
    if (has2) txq.push_back(word2);
  endtask

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Wait (at most max_cycles) for the next PC from the PFU.
  task automatic expect_pc(input logic [31:0] pc, input string what, input int max_cycles = 2000);
    int n = 0;
    while (rxq.size() == 0 && n < max_cycles) begin
      @(posedge clk);
      n++;
    end
    #1;
    if (rxq.size() == 0) begin
      check(1'b0, $sformatf("%s: no PC within %0d cycles (expected %h)", what, max_cycles, pc));
    end else begin
      logic [31:0] got = rxq.pop_front();
      check(got == pc, $sformatf("%s: PC %h, expected %h", what, got, pc));
    end
  endtask

  // Wait for the next PC from the PFU and return it.
  task automatic get_pc(output logic [31:0] pc, input int max_cycles = 100000);
    int n = 0;
    while (rxq.size() == 0 && n < max_cycles) begin
      @(posedge clk);
      n++;
    end
    #1;
    if (rxq.size() == 0) begin
      check(1'b0, "no PC from the PFU");
      pc = 32'hFFFF_FFFF;
    end else begin
      pc = rxq.pop_front();
    end
  endtask

  // Wait until every queued word has been taken.
  task automatic drain();
    while (txq.size() != 0 || tx_valid) @(posedge clk);
    @(negedge clk);
  endtask

  function automatic int rx_pending();
    return rxq.size();
  endfunction
endmodule
