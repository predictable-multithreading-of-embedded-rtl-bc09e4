// abort_table: the PFU's store of preemption (abort) contexts.
//
// All threads share the same M entries; an entry is taken from the lowest
// free slot when a thread enters an abort scope and freed when it leaves
// it, so a thread uses as many entries as it has nested aborts at that moment.
// Each entry holds the fields the document lists: Valid, TID (owning thread),
// PVI (index of the abort condition in PV), WS (weak=1 / strong=0), PA (the
// 32-bit preemption address where the owner resumes) and AL (abort level,
// the nesting depth within the owner). PV is an X-bit register of pre-values:
// the condition values as they stood at the end of the previous tick.
//
// PRET-C aborts test "pre C", so a condition value written during a tick must
// not be seen before the next one. The processor's writes go to a staging
// register; AT_LATCH (issued at each global tick) copies it into PV. The
// staging register and the query port below are this design's own choices.
//
// Query port (combinational): for thread q_tid and kind q_ws, q_hit says that
// one of its entries of that kind has a true pre-value; q_pa / q_al are those
// of the outermost such entry (lowest AL), which is the one that takes effect.
// any_trig[k] is set when any entry of kind k (0 strong, 1 weak) would fire.
// Operations are applied one per clock at the rising edge.
module abort_table
  import pretc_pkg::*;
#(
  parameter int unsigned N = 128,  // thread slots (TID width)
  parameter int unsigned M = 16,   // abort entries
  parameter int unsigned X = 16    // pre-value bits
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  at_op_e                op,
  input  logic [$clog2(N)-1:0]  tid,
  input  logic [$clog2(X)-1:0]  pvi,
  input  logic                  ws,
  input  logic [PC_W-1:0]       pa,
  input  logic [$clog2(M)-1:0]  al,
  input  logic                  val,     // SET_PV value
  input  logic [$clog2(N)-1:0]  q_tid,
  input  logic                  q_ws,
  output logic                  q_hit,
  output logic [PC_W-1:0]       q_pa,
  output logic [$clog2(M)-1:0]  q_al,
  output logic [1:0]            any_trig,
  output logic                  full,
  output logic [M-1:0]          valid,
  output logic [X-1:0]          pv
);
  localparam int unsigned TID_W = $clog2(N);
  localparam int unsigned AL_W  = $clog2(M);
  localparam int unsigned PVI_W = $clog2(X);

  logic [TID_W-1:0] e_tid [M];
  logic [PVI_W-1:0] e_pvi [M];
  logic [M-1:0]     e_ws;
  logic [PC_W-1:0]  e_pa  [M];
  logic [AL_W-1:0]  e_al  [M];
  logic [X-1:0]     pv_stage;

  // Lowest free slot.
  logic [AL_W-1:0] free_idx;
  always_comb begin
    full     = &valid;
    free_idx = '0;
    for (int i = M - 1; i >= 0; i--)
      if (!valid[i]) free_idx = AL_W'(i);
  end

  // Entries whose pre-value is true.
  logic [M-1:0] trig;
  always_comb begin
    any_trig = '0;
    for (int i = 0; i < M; i++) begin
      trig[i] = valid[i] && pv[e_pvi[i]];
      if (trig[i]) any_trig[e_ws[i]] = 1'b1;
    end
  end

  // Outermost triggered entry of the queried thread and kind.
  always_comb begin
    q_hit = 1'b0;
    q_pa  = '0;
    q_al  = '0;
    for (int i = 0; i < M; i++) begin
      if (trig[i] && e_tid[i] == q_tid && e_ws[i] == q_ws &&
          (!q_hit || e_al[i] < q_al)) begin
        q_hit = 1'b1;
        q_pa  = e_pa[i];
        q_al  = e_al[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid    <= '0;
      e_ws     <= '0;
      pv       <= '0;
      pv_stage <= '0;
      for (int i = 0; i < M; i++) begin
        e_tid[i] <= '0;
        e_pvi[i] <= '0;
        e_pa[i]  <= '0;
        e_al[i]  <= '0;
      end
    end else begin
      unique case (op)
        AT_NOP: ;
        AT_ALLOC: begin
          if (!full) begin
            valid[free_idx] <= 1'b1;
            e_tid[free_idx] <= tid;
            e_pvi[free_idx] <= pvi;
            e_ws[free_idx]  <= ws;
            e_pa[free_idx]  <= pa;
            e_al[free_idx]  <= al;
          end
        end
        AT_RELEASE: begin
          for (int i = 0; i < M; i++)
            if (valid[i] && e_tid[i] == tid && e_al[i] == al) valid[i] <= 1'b0;
        end
        AT_CLR_FROM: begin
          for (int i = 0; i < M; i++)
            if (valid[i] && e_tid[i] == tid && e_al[i] >= al) valid[i] <= 1'b0;
        end
        AT_SET_PV: pv_stage[pvi] <= val;
        AT_LATCH:  pv <= pv_stage;
        default: ;
      endcase
    end
  end

endmodule
