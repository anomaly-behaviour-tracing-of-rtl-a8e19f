// console_io: console character buffers between the processor and the PS.
//
// Two byte FIFOs.  The output FIFO takes characters the processor prints
// (con_out_* handshake) and holds them until software reads them; the input
// FIFO holds characters software has typed until the processor reads them
// (con_in_* handshake).  Software reaches both through GPIO lines: it sees
// the character at the head of the output FIFO on ps_out_char with
// ps_out_avail, and raises ps_out_rd to consume it; it puts a character on
// ps_in_char and raises ps_in_wr to append it.  Each GPIO strobe line goes
// through a rising-edge detector, so holding it high for any number of
// cycles moves exactly one character; software lowers it again before the
// next access.  A strobe while the output FIFO is empty, or while the input
// FIFO is full (ps_in_full), is ignored.
//
// Timing: a strobe acts two clock edges after its rising edge is sampled
// (edge detector), then one FIFO cycle.  Reset is active-low and synchronous.
//
// From the document: the two FIFOs, their direction and the use of GPIO plus
// edge detectors for single-cycle reads and writes.  The FIFO depth and the
// signal set are this design's choice.
module console_io #(
  parameter int unsigned DEPTH = 64,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // processor side: output characters
  input  logic [7:0]    con_out_char,
  input  logic          con_out_valid,
  output logic          con_out_ready,
  // processor side: input characters
  output logic [7:0]    con_in_char,
  output logic          con_in_valid,
  input  logic          con_in_ready,
  // PS side (GPIO)
  output logic [7:0]    ps_out_char,
  output logic          ps_out_avail,
  output logic [CW-1:0] ps_out_count,
  input  logic          ps_out_rd,
  input  logic [7:0]    ps_in_char,
  input  logic          ps_in_wr,
  output logic          ps_in_full,
  output logic [CW-1:0] ps_in_count
);

  logic rd_pulse, wr_pulse, in_ready;

  edge_detect u_rd_edge (.clk, .rst_n, .level(ps_out_rd), .pulse(rd_pulse));
  edge_detect u_wr_edge (.clk, .rst_n, .level(ps_in_wr),  .pulse(wr_pulse));

  axis_fifo #(.WIDTH(8), .DEPTH(DEPTH)) u_out_fifo (
    .clk, .rst_n,
    .s_tdata (con_out_char), .s_tvalid(con_out_valid), .s_tready(con_out_ready),
    .m_tdata (ps_out_char),  .m_tvalid(ps_out_avail),  .m_tready(rd_pulse),
    .count   (ps_out_count)
  );

  axis_fifo #(.WIDTH(8), .DEPTH(DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .s_tdata (ps_in_char),   .s_tvalid(wr_pulse),      .s_tready(in_ready),
    .m_tdata (con_in_char),  .m_tvalid(con_in_valid),  .m_tready(con_in_ready),
    .count   (ps_in_count)
  );

  assign ps_in_full = !in_ready;

endmodule
