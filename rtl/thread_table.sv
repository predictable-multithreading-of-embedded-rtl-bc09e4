// thread_table: the PFU's per-thread context store.
//
// One entry per thread slot, with the fields the document lists for the
// thread table: PC (32 bits), TDA (alive), TSP (suspended), TLT (local tick
// reached), PID (parent thread, log2 N bits), ALC (abort level count, log2 M
// bits) and SC (32 bits). The thread's priority is its slot index: slot 0 is
// the highest priority. That is this design's choice: the document says each
// thread has a priority but the field list has no priority field, so the
// compiler numbers the threads of a PAR in their priority order (children
// after their parent).
//
// SC is read here as the count of the thread's live children: a thread that
// spawned a PAR stays suspended until SC falls back to zero. ALC is the
// nesting depth of the abort scopes the thread is inside. Both readings are
// this design's; the document only prints the field names and widths.
//
// Interface: one operation per clock (op, with idx/cur/pc/al as operands),
// applied at the rising edge. All fields are visible as arrays so that the
// scheduler and the controller can read any entry combinationally.
// After reset slot 0 is the alive main thread, its own parent; all other
// slots are dead.
module thread_table
  import pretc_pkg::*;
#(
  parameter int unsigned N = 128,  // thread slots
  parameter int unsigned M = 16    // abort table entries (sets ALC width)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  tt_op_e                op,
  input  logic [$clog2(N)-1:0]  idx,    // target slot (SPAWN, KILL, FIRE)
  input  logic [$clog2(N)-1:0]  cur,    // thread running on the processor
  input  logic [PC_W-1:0]       pc,     // PC operand
  input  logic [$clog2(M)-1:0]  al,     // abort level operand (FIRE)
  output logic [N-1:0]          tda,    // alive
  output logic [N-1:0]          tsp,    // suspended
  output logic [N-1:0]          tlt,    // local tick reached
  output logic [PC_W-1:0]       pc_o  [N],
  output logic [$clog2(N)-1:0]  pid_o [N],
  output logic [$clog2(M)-1:0]  alc_o [N],
  output logic [SC_W-1:0]       sc_o  [N]
);
  localparam int unsigned TID_W = $clog2(N);

  logic [TID_W-1:0] parent;
  assign parent = pid_o[cur];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        tda[i]   <= (i == 0);
        tsp[i]   <= 1'b0;
        tlt[i]   <= 1'b0;
        pc_o[i]  <= '0;
        pid_o[i] <= '0;
        alc_o[i] <= '0;
        sc_o[i]  <= '0;
      end
    end else begin
      unique case (op)
        TT_NOP: ;
        TT_SPAWN: begin
          if (idx != cur) begin
            tda[idx]   <= 1'b1;
            tsp[idx]   <= 1'b0;
            tlt[idx]   <= 1'b0;
            pc_o[idx]  <= pc;
            pid_o[idx] <= cur;
            alc_o[idx] <= '0;
            sc_o[idx]  <= '0;
            sc_o[cur]  <= sc_o[cur] + 1'b1;
          end
        end
        TT_SUSPEND: begin
          pc_o[cur] <= pc;
          tsp[cur]  <= (sc_o[cur] != '0);
        end
        TT_EOT: begin
          pc_o[cur] <= pc;
          tlt[cur]  <= 1'b1;
        end
        TT_TERM: begin
          tda[cur] <= 1'b0;
          if (parent != cur && sc_o[parent] != '0) begin
            sc_o[parent] <= sc_o[parent] - 1'b1;
            if (sc_o[parent] == SC_W'(1)) tsp[parent] <= 1'b0;
          end
        end
        TT_KILL: begin
          tda[idx] <= 1'b0;
          tsp[idx] <= 1'b0;
        end
        TT_FIRE: begin
          pc_o[idx]  <= pc;
          tsp[idx]   <= 1'b0;
          tlt[idx]   <= 1'b0;
          sc_o[idx]  <= '0;
          alc_o[idx] <= al;
        end
        TT_ALC_INC: alc_o[cur] <= alc_o[cur] + 1'b1;
        TT_ALC_DEC: if (alc_o[cur] != '0) alc_o[cur] <= alc_o[cur] - 1'b1;
        TT_TICK: tlt <= '0;
        default: ;
      endcase
    end
  end

endmodule
