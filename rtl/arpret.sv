// arpret: the ARPRET platform around a PRET-C program.
//
// A soft-core processor runs the compiled PRET-C code; the PFU does the
// thread scheduling and preemption in hardware. They are coupled by two FSL
// bridges: commands and PCs flow from the processor to the PFU through one,
// the PC of the next thread to run flows back through the other. The
// processor (a vendor soft core) is outside this RTL: its FSL master and
// slave ports are the ports of this module, named from the processor's side.
//
//   mb_m_*  : processor writes commands (mb_m_write unless mb_m_full)
//   mb_s_*  : processor reads the next PC (mb_s_read while mb_s_exists)
//   const_mode, wcrt : constant-tick mode and its tick length in cycles
//   status  : tick_start, tick_end, preempt, overrun, bad_cmd, any_alive
//
// Each bridge adds one clock of latency per word. Sizes: N = 128 threads,
// M = 16 abort entries, X = 16 abort conditions, FSL depth 16.
module arpret
  import pretc_pkg::*;
#(
  parameter int unsigned N         = 128,
  parameter int unsigned M         = 16,
  parameter int unsigned X         = 16,
  parameter int unsigned FSL_DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // processor -> PFU bridge, processor side
  input  logic [FSL_W-1:0] mb_m_data,
  input  logic             mb_m_write,
  output logic             mb_m_full,
  // PFU -> processor bridge, processor side
  output logic [FSL_W-1:0] mb_s_data,
  output logic             mb_s_exists,
  input  logic             mb_s_read,
  // configuration
  input  logic             const_mode,
  input  logic [31:0]      wcrt,
  // status
  output logic             tick_start,
  output logic             tick_end,
  output logic             preempt,
  output logic             overrun,
  output logic             bad_cmd,
  output logic             any_alive
);
  logic [FSL_W-1:0] cmd_data, pc_data;
  logic             cmd_exists, cmd_read, pc_write, pc_full;

  fsl_fifo #(.WIDTH(FSL_W), .DEPTH(FSL_DEPTH)) u_fsl_to_pfu (
    .clk, .rst_n,
    .m_data(mb_m_data), .m_write(mb_m_write), .m_full(mb_m_full),
    .s_data(cmd_data), .s_exists(cmd_exists), .s_read(cmd_read)
  );

  pfu #(.N(N), .M(M), .X(X)) u_pfu (
    .clk, .rst_n,
    .in_data(cmd_data), .in_exists(cmd_exists), .in_read(cmd_read),
    .out_data(pc_data), .out_write(pc_write), .out_full(pc_full),
    .const_mode, .wcrt, .tick_start, .tick_end, .preempt, .overrun,
    .bad_cmd, .any_alive
  );

  fsl_fifo #(.WIDTH(FSL_W), .DEPTH(FSL_DEPTH)) u_fsl_to_mb (
    .clk, .rst_n,
    .m_data(pc_data), .m_write(pc_write), .m_full(pc_full),
    .s_data(mb_s_data), .s_exists(mb_s_exists), .s_read(mb_s_read)
  );

endmodule
