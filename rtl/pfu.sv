// pfu: Predictable Functional Unit, the hardware thread scheduler of ARPRET.
//
// It holds the context of every PRET-C thread (thread table), the abort
// contexts of all threads (abort table), a fixed-priority scheduler, the WCRT
// timer for constant-length ticks, and the controller that talks to the
// processor. The processor is the master: it spawns threads, suspends the
// parent of a PAR, and reports each EOT; after an EOT (or a suspend or a
// termination) it blocks until the PFU sends back the PC of the next thread.
//
// Interface: the two FSL links (in_* from the processor, out_* to it, both
// seen from the PFU), the execution mode and the WCRT bound, and status:
// tick_start (first cycle of each global tick), tick_end (every thread has
// reached its EOT), preempt (an abort fired), overrun (a constant-length
// tick ran past its WCRT), bad_cmd, and any_alive (0 once the program ended).
// Default sizes: N = 128 threads (the largest configuration the document
// measures), M = 16 abort entries and X = 16 pre-value bits (this design's
// choice; the document gives no numbers for them).
module pfu
  import pretc_pkg::*;
#(
  parameter int unsigned N = 128,
  parameter int unsigned M = 16,
  parameter int unsigned X = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [FSL_W-1:0] in_data,
  input  logic             in_exists,
  output logic             in_read,
  output logic [FSL_W-1:0] out_data,
  output logic             out_write,
  input  logic             out_full,
  input  logic             const_mode,
  input  logic [31:0]      wcrt,
  output logic             tick_start,
  output logic             tick_end,
  output logic             preempt,
  output logic             overrun,
  output logic             bad_cmd,
  output logic             any_alive
);
  localparam int unsigned TID_W = $clog2(N);
  localparam int unsigned AL_W  = $clog2(M);
  localparam int unsigned PVI_W = $clog2(X);

  // thread table
  tt_op_e           tt_op;
  logic [TID_W-1:0] tt_idx, cur;
  logic [PC_W-1:0]  tt_pc;
  logic [AL_W-1:0]  tt_al;
  logic [N-1:0]     tda, tsp, tlt;
  logic [PC_W-1:0]  pc_a  [N];
  logic [TID_W-1:0] pid_a [N];
  logic [AL_W-1:0]  alc_a [N];
  logic [SC_W-1:0]  sc_a  [N];
  // abort table
  at_op_e           at_op;
  logic [TID_W-1:0] at_tid, q_tid;
  logic [PVI_W-1:0] at_pvi;
  logic             at_ws, at_val, q_ws, q_hit, at_full;
  logic [PC_W-1:0]  at_pa, q_pa;
  logic [AL_W-1:0]  at_al, q_al;
  logic [1:0]       any_trig;
  logic [M-1:0]     at_valid;
  logic [X-1:0]     pv;
  // scheduler and timer
  logic             sel_valid, release_ok;
  logic [TID_W-1:0] sel;
  logic [31:0]      tick_count;

  thread_table #(.N(N), .M(M)) u_threads (
    .clk, .rst_n, .op(tt_op), .idx(tt_idx), .cur, .pc(tt_pc), .al(tt_al),
    .tda, .tsp, .tlt, .pc_o(pc_a), .pid_o(pid_a), .alc_o(alc_a), .sc_o(sc_a)
  );

  abort_table #(.N(N), .M(M), .X(X)) u_aborts (
    .clk, .rst_n, .op(at_op), .tid(at_tid), .pvi(at_pvi), .ws(at_ws),
    .pa(at_pa), .al(at_al), .val(at_val), .q_tid, .q_ws, .q_hit, .q_pa, .q_al,
    .any_trig, .full(at_full), .valid(at_valid), .pv
  );

  pfu_scheduler #(.N(N)) u_sched (
    .tda, .tsp, .tlt, .sel_valid, .sel, .any_alive
  );

  wcrt_timer #(.CNT_W(32)) u_timer (
    .clk, .rst_n, .const_mode, .wcrt, .tick_start, .count(tick_count),
    .release_ok, .overrun
  );

  pfu_controller #(.N(N), .M(M), .X(X)) u_ctrl (
    .clk, .rst_n, .in_data, .in_exists, .in_read, .out_data, .out_write,
    .out_full, .tt_op, .tt_idx, .cur, .tt_pc, .tt_al, .tda, .pc_i(pc_a),
    .pid_i(pid_a), .alc_i(alc_a), .at_op, .at_tid, .at_pvi, .at_ws, .at_pa,
    .at_al, .at_val, .q_tid, .q_ws, .q_hit, .q_pa, .q_al, .any_trig,
    .at_full, .sel_valid, .sel, .any_alive, .release_ok, .tick_start,
    .tick_end, .preempt, .bad_cmd
  );

endmodule
