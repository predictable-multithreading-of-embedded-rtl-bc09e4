// pfu_controller: the PFU's controller logic.
//
// It reads commands from the processor's FSL link, decodes them with the
// look-up table of pretc_pkg::cmd_lookup (function ID -> words to read and
// words to write), applies them to the thread and abort tables, and, for the
// commands that hand the processor over (EOT, SUSPEND, TERMINATE), answers with
// the PC of the next thread to run. The processor blocks on that FSL read.
//
// Scheduling follows the document: the next thread is the highest-priority
// alive, non-suspended thread whose local tick is not over. When none is left
// the global tick ends: every TLT bit is cleared, the staged abort conditions
// become the pre-values, and (constant mode) the controller waits for the
// WCRT timer before the next tick starts.
//
// Preemption is this design's reading of the document's abort semantics:
//  * weak aborts are checked once at the end of an instant, after every
//    thread has reached its EOT (the body ran in that instant); the owner
//    restarts at its preemption address within the same instant;
//  * strong aborts are checked at the start of each instant, before any
//    thread runs, so the aborted body does not run in it.
// A check scans the thread slots in order, one per clock, from slot 0 up to
// the highest alive slot (slot i's parent has a lower slot number, so one
// pass suffices). A thread whose abort fires
// restarts at PA with its inner abort contexts dropped; every descendant of
// it is killed and loses its abort contexts. The scan is only made when some
// abort of that kind has a true pre-value, so ticks without preemption cost
// nothing extra.
//
// Cycle cost: command word 1 clock, each extra word 1 clock, execute 1 clock,
// select 1 clock, answer 1 clock; a tick boundary adds 3 clocks (plus the WCRT
// wait) and a preemption scan (highest alive slot + 1) clocks.
module pfu_controller
  import pretc_pkg::*;
#(
  parameter int unsigned N = 128,  // thread slots (at most 256: 8-bit operand)
  parameter int unsigned M = 16,   // abort entries
  parameter int unsigned X = 16    // pre-value bits
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // FSL link from the processor (slave side)
  input  logic [FSL_W-1:0]      in_data,
  input  logic                  in_exists,
  output logic                  in_read,
  // FSL link to the processor (master side)
  output logic [FSL_W-1:0]      out_data,
  output logic                  out_write,
  input  logic                  out_full,
  // thread table
  output tt_op_e                tt_op,
  output logic [$clog2(N)-1:0]  tt_idx,
  output logic [$clog2(N)-1:0]  cur,
  output logic [PC_W-1:0]       tt_pc,
  output logic [$clog2(M)-1:0]  tt_al,
  input  logic [N-1:0]          tda,
  input  logic [PC_W-1:0]       pc_i  [N],
  input  logic [$clog2(N)-1:0]  pid_i [N],
  input  logic [$clog2(M)-1:0]  alc_i [N],
  // abort table
  output at_op_e                at_op,
  output logic [$clog2(N)-1:0]  at_tid,
  output logic [$clog2(X)-1:0]  at_pvi,
  output logic                  at_ws,
  output logic [PC_W-1:0]       at_pa,
  output logic [$clog2(M)-1:0]  at_al,
  output logic                  at_val,
  output logic [$clog2(N)-1:0]  q_tid,
  output logic                  q_ws,
  input  logic                  q_hit,
  input  logic [PC_W-1:0]       q_pa,
  input  logic [$clog2(M)-1:0]  q_al,
  input  logic [1:0]            any_trig,
  input  logic                  at_full,
  // scheduler
  input  logic                  sel_valid,
  input  logic [$clog2(N)-1:0]  sel,
  input  logic                  any_alive,
  // WCRT timer
  input  logic                  release_ok,
  output logic                  tick_start,
  // status
  output logic                  tick_end,    // every thread reached its EOT
  output logic                  preempt,     // an abort fired this clock
  output logic                  bad_cmd      // unknown ID or abort table full
);
  localparam int unsigned TID_W = $clog2(N);
  localparam int unsigned PVI_W = $clog2(X);

  typedef enum logic [2:0] {
    S_FETCH, S_ARG, S_EXEC, S_SCHED, S_TICK_END, S_WAIT, S_SCAN, S_SEND
  } state_e;

  state_e           state;
  logic [7:0]       cmd;
  logic [7:0]       opnd;
  logic             flag;
  logic [PC_W-1:0]  arg;
  cmd_info_t        info, in_info;
  logic [TID_W-1:0] scan_i;
  logic             scan_weak;
  logic             weak_done;
  logic [N-1:0]     doomed;
  logic [PC_W-1:0]  send_pc;

  assign in_info = cmd_lookup(in_data[7:0]);

  // Highest alive slot: the preemption scan stops there.
  logic [TID_W-1:0] hi_alive;
  always_comb begin
    hi_alive = '0;
    for (int i = 0; i < N; i++)
      if (tda[i]) hi_alive = TID_W'(i);
  end

  // Preemption scan: what happens to slot scan_i this clock.
  logic scan_kill, scan_fire;
  always_comb begin
    scan_kill = tda[scan_i] && pid_i[scan_i] != scan_i && doomed[pid_i[scan_i]];
    scan_fire = !scan_kill && tda[scan_i] && q_hit;
  end

  // Combinational command outputs.
  always_comb begin
    in_read    = 1'b0;
    out_write  = 1'b0;
    out_data   = send_pc;
    tt_op      = TT_NOP;
    tt_idx     = opnd[TID_W-1:0];
    tt_pc      = arg;
    tt_al      = '0;
    at_op      = AT_NOP;
    at_tid     = cur;
    at_pvi     = opnd[PVI_W-1:0];
    at_ws      = flag;
    at_pa      = arg;
    at_al      = alc_i[cur];
    at_val     = flag;
    q_tid      = scan_i;
    q_ws       = scan_weak;
    tick_start = 1'b0;
    tick_end   = 1'b0;
    preempt    = 1'b0;
    bad_cmd    = 1'b0;
    unique case (state)
      S_FETCH: begin
        in_read = in_exists;
        bad_cmd = in_exists && !in_info.known;
      end
      S_ARG: in_read = in_exists;
      S_EXEC: begin
        unique case (cmd)
          CMD_SPAWN:     tt_op = TT_SPAWN;
          CMD_EOT:       tt_op = TT_EOT;
          CMD_SUSPEND:   tt_op = TT_SUSPEND;
          CMD_TERMINATE: begin
            tt_op = TT_TERM;
            at_op = AT_CLR_FROM;
            at_al = '0;
          end
          CMD_ABORT_START: begin
            tt_op   = TT_ALC_INC;
            at_op   = AT_ALLOC;
            bad_cmd = at_full;
          end
          CMD_ABORT_END: begin
            tt_op = TT_ALC_DEC;
            at_op = AT_RELEASE;
            at_al = alc_i[cur] - 1'b1;
          end
          CMD_SET_PV: at_op = AT_SET_PV;
          default: ;
        endcase
      end
      S_SCHED: tick_end = !sel_valid && any_alive && (weak_done || !any_trig[1]);
      S_TICK_END: begin
        tt_op = TT_TICK;
        at_op = AT_LATCH;
      end
      S_WAIT: tick_start = release_ok;
      S_SCAN: begin
        if (scan_kill) begin
          tt_op  = TT_KILL;
          tt_idx = scan_i;
          at_op  = AT_CLR_FROM;
          at_tid = scan_i;
          at_al  = '0;
        end else if (scan_fire) begin
          tt_op   = TT_FIRE;
          tt_idx  = scan_i;
          tt_pc   = q_pa;
          tt_al   = q_al;
          at_op   = AT_CLR_FROM;
          at_tid  = scan_i;
          at_al   = q_al;
          preempt = 1'b1;
        end
      end
      S_SEND: out_write = !out_full;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_FETCH;
      cmd       <= '0;
      opnd      <= '0;
      flag      <= 1'b0;
      arg       <= '0;
      info      <= '0;
      cur       <= '0;
      scan_i    <= '0;
      scan_weak <= 1'b0;
      weak_done <= 1'b0;
      doomed    <= '0;
      send_pc   <= '0;
    end else begin
      unique case (state)
        S_FETCH: begin
          if (in_exists && in_info.known) begin
            cmd   <= in_data[7:0];
            opnd  <= in_data[15:8];
            flag  <= in_data[16];
            info  <= in_info;
            state <= (in_info.n_reads != '0) ? S_ARG : S_EXEC;
          end
        end
        S_ARG: begin
          if (in_exists) begin
            arg   <= in_data;
            state <= S_EXEC;
          end
        end
        S_EXEC: state <= (info.n_writes != '0) ? S_SCHED : S_FETCH;
        S_SCHED: begin
          if (sel_valid) begin
            cur     <= sel;
            send_pc <= pc_i[sel];
            state   <= S_SEND;
          end else if (!any_alive) begin
            state <= S_FETCH;               // program has terminated
          end else if (!weak_done && any_trig[1]) begin
            weak_done <= 1'b1;
            scan_weak <= 1'b1;
            scan_i    <= '0;
            doomed    <= '0;
            state     <= S_SCAN;
          end else begin
            state <= S_TICK_END;
          end
        end
        S_TICK_END: state <= S_WAIT;
        S_WAIT: begin
          if (release_ok) begin
            weak_done <= 1'b0;
            if (any_trig[0]) begin
              scan_weak <= 1'b0;
              scan_i    <= '0;
              doomed    <= '0;
              state     <= S_SCAN;
            end else begin
              state <= S_SCHED;
            end
          end
        end
        S_SCAN: begin
          if (scan_kill || scan_fire) doomed[scan_i] <= 1'b1;
          if (scan_i >= hi_alive) state <= S_SCHED;
          else                         scan_i <= scan_i + 1'b1;
        end
        S_SEND: if (!out_full) state <= S_FETCH;
        default: state <= S_FETCH;
      endcase
    end
  end

  // FSL rules, and the program rule that a SPAWN targets a free slot.
  a_read_only_when_exists: assert property (@(posedge clk) disable iff (!rst_n)
    in_read |-> in_exists);
  a_write_only_when_room: assert property (@(posedge clk) disable iff (!rst_n)
    out_write |-> !out_full);
  a_spawn_free_slot: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_EXEC && cmd == CMD_SPAWN) |-> !tda[opnd[TID_W-1:0]]);

endmodule
