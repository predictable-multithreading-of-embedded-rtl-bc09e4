// pfu_scheduler: fixed-priority thread selection of the PFU.
//
// A thread can run when it is alive (TDA), not suspended waiting for its
// children (TSP) and has not yet reached its EOT in this tick (TLT). Among
// those the scheduler picks the one with the highest priority, which in this
// design is the lowest slot number (PRET-C runs the threads of PAR(T1..Tn) in
// the fixed order T1 first). Purely combinational: the choice is valid in the
// same cycle as the table contents it is computed from.
//   sel_valid = 0 means every alive thread has finished its local tick (or is
//   suspended): the global tick may end. any_alive = 0 means the program has
//   terminated.
module pfu_scheduler #(
  parameter int unsigned N = 128
) (
  input  logic [N-1:0]         tda,
  input  logic [N-1:0]         tsp,
  input  logic [N-1:0]         tlt,
  output logic                 sel_valid,
  output logic [$clog2(N)-1:0] sel,
  output logic                 any_alive
);
  logic [N-1:0] ready;

  always_comb begin
    ready     = tda & ~tsp & ~tlt;
    sel_valid = |ready;
    any_alive = |tda;
    sel       = '0;
    for (int i = N - 1; i >= 0; i--)
      if (ready[i]) sel = $clog2(N)'(i);
  end

endmodule
