// pretc_pkg: shared types and constants of the ARPRET Predictable Functional
// Unit (PFU).
//
// The PFU sits beside a soft-core processor and keeps the contexts of the
// light-weight PRET-C threads: a thread table (one entry per thread) and an
// abort table (preemption contexts shared by all threads). The processor talks
// to it over two 32-bit FSL links with a small command protocol.
//
// Command word (processor -> PFU), this design's encoding:
//   [7:0]   function ID. SPAWN=10, EOT=12 and SUSPEND=14 and their word counts
//           follow the document's lookup table. TERMINATE, ABORT_START,
//           ABORT_END and SET_PV are this design's additions, numbered in the
//           same even-numbered style, because the document names thread
//           termination, abort contexts and pre-values but gives no command
//           for them.
//   [15:8]  operand: thread ID for SPAWN, pre-value index for ABORT_START and
//           SET_PV.
//   [16]    flag: weak (1) / strong (0) for ABORT_START, value for SET_PV.
// "reads" are the extra words the PFU pops after the command word; "writes"
// are the words (always the next PC) the PFU pushes back.
package pretc_pkg;

  localparam int unsigned PC_W = 32;   // program counter width (Fig. 5: 32 bits)
  localparam int unsigned SC_W = 32;   // SC field width (Fig. 5: 32 bits)
  localparam int unsigned FSL_W = 32;  // FSL data width

  typedef enum logic [7:0] {
    CMD_SPAWN       = 8'd10,
    CMD_EOT         = 8'd12,
    CMD_SUSPEND     = 8'd14,
    CMD_TERMINATE   = 8'd16,
    CMD_ABORT_START = 8'd18,
    CMD_ABORT_END   = 8'd20,
    CMD_SET_PV      = 8'd22
  } cmd_id_e;

  typedef struct packed {
    logic       known;    // ID is in the table
    logic [1:0] n_reads;  // extra words to fetch from the FSL link
    logic [1:0] n_writes; // words to send back (next PC)
  } cmd_info_t;

  // Controller look-up table: function ID -> number of reads and writes.
  function automatic cmd_info_t cmd_lookup(logic [7:0] id);
    cmd_info_t r;
    r = '{known: 1'b0, n_reads: 2'd0, n_writes: 2'd0};
    case (id)
      CMD_SPAWN:       r = '{known: 1'b1, n_reads: 2'd1, n_writes: 2'd0};
      CMD_EOT:         r = '{known: 1'b1, n_reads: 2'd1, n_writes: 2'd1};
      CMD_SUSPEND:     r = '{known: 1'b1, n_reads: 2'd1, n_writes: 2'd1};
      CMD_TERMINATE:   r = '{known: 1'b1, n_reads: 2'd0, n_writes: 2'd1};
      CMD_ABORT_START: r = '{known: 1'b1, n_reads: 2'd1, n_writes: 2'd0};
      CMD_ABORT_END:   r = '{known: 1'b1, n_reads: 2'd0, n_writes: 2'd0};
      CMD_SET_PV:      r = '{known: 1'b1, n_reads: 2'd0, n_writes: 2'd0};
      default:         r = '{known: 1'b0, n_reads: 2'd0, n_writes: 2'd0};
    endcase
    return r;
  endfunction

  // Build a command word (used by software models and testbenches).
  function automatic logic [FSL_W-1:0] cmd_word(cmd_id_e id, logic [7:0] operand,
                                                 logic flag);
    return {15'd0, flag, operand, 8'(id)};
  endfunction

  // Operations the controller issues to the thread table.
  typedef enum logic [3:0] {
    TT_NOP,
    TT_SPAWN,    // idx := new thread at pc, child of cur
    TT_SUSPEND,  // cur waits for its children, resumes at pc
    TT_EOT,      // cur reached its local tick, continues at pc next tick
    TT_TERM,     // cur dies; parent resumes when its last child dies
    TT_KILL,     // idx dies (preempted by an ancestor's abort)
    TT_FIRE,     // idx is preempted by its own abort: restart at pc, ALC := al
    TT_ALC_INC,  // cur entered an abort scope
    TT_ALC_DEC,  // cur left an abort scope
    TT_TICK      // global tick: clear every local-tick bit
  } tt_op_e;

  // Operations the controller issues to the abort table.
  typedef enum logic [2:0] {
    AT_NOP,
    AT_ALLOC,    // new abort context {tid, pvi, ws, pa, al}
    AT_RELEASE,  // drop the context of tid at level al
    AT_CLR_FROM, // drop every context of tid at level >= al
    AT_SET_PV,   // stage pre-value pvi := val for the end of this tick
    AT_LATCH     // end of tick: staged values become the pre-values
  } at_op_e;

endpackage
