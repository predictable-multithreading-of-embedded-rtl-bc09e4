// fsl_fifo: one Fast Simplex Link (FSL) bridge, a unidirectional FIFO.
//
// ARPRET couples the processor and the PFU with two of these, one per
// direction. The signal set follows the FSL convention: the master side
// writes (m_write) unless m_full; the slave side sees the head word on s_data
// while s_exists and pops it with s_read (first-word fall-through). A word
// written in cycle t is visible to the reader in cycle t+1. A write to a full
// FIFO or a read of an empty one is ignored (the assertions flag it).
// DEPTH 16 and width 32 are this design's defaults for the link.
module fsl_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // master (writer) side
  input  logic [WIDTH-1:0] m_data,
  input  logic             m_write,
  output logic             m_full,
  // slave (reader) side
  output logic [WIDTH-1:0] s_data,
  output logic             s_exists,
  input  logic             s_read
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      used;
  logic             do_wr, do_rd;

  assign m_full   = (used == (AW+1)'(DEPTH));
  assign s_exists = (used != '0);
  assign s_data   = mem[rd_ptr];
  assign do_wr    = m_write && !m_full;
  assign do_rd    = s_read && s_exists;

  function automatic logic [AW-1:0] bump(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      used   <= '0;
    end else begin
      if (do_wr) wr_ptr <= bump(wr_ptr);
      if (do_rd) rd_ptr <= bump(rd_ptr);
      if (do_wr && !do_rd)      used <= used + 1'b1;
      else if (do_rd && !do_wr) used <= used - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= m_data;
  end

  // FSL rule: the writer must not write while FULL, the reader must not
  // read while EMPTY.
  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    !(m_write && m_full));
  a_no_read_when_empty: assert property (@(posedge clk) disable iff (!rst_n)
    !(s_read && !s_exists));

endmodule
