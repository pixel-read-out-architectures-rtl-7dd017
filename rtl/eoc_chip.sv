// End-of-column TDC read-out chip (digital part).
//
// NCOLS columns, each with its own end-of-column logic (eoc_column) and its
// own serial output: the document keeps the column segmentation up to the
// serializer. One 6-bit coarse counter of the 320 MHz clock and the 32 taps of
// the DLL are shared by all columns. The pixels' preamplifiers and
// time-over-threshold discriminators, the column transmission lines with
// their receivers, the PLL (40 -> 320 MHz) and the DLL are analog and outside
// this module: the receiver outputs (hit_lines, addr_lines), the 320 MHz clock
// and the DLL taps are inputs.
//
// From the document: 40 columns of 45 pixels, 9 hit lines and 5 address lines
// per column, a 32-tap DLL at 320 MHz, 6-bit coarse counters. This design's
// choices are listed in eoc_column and eoc_tdc.
module eoc_chip
  import gtk_pkg::*;
#(
  parameter int NCOLS      = 40,
  parameter int NTDC       = EOC_NTDC,
  parameter int FIFO_DEPTH = 8,
  parameter int LANES      = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NTDC-1:0]         hit_lines  [NCOLS],
  input  logic [EOC_NADDR-1:0]    addr_lines [NCOLS],
  input  logic [EOC_NTAPS-1:0]    taps,
  output logic [EOC_COARSE_W-1:0] coarse_o,
  output logic [LANES-1:0]        ser_data   [NCOLS],
  output logic [NCOLS-1:0]        ser_valid,
  output logic [NCOLS-1:0]        ser_first,
  output logic [15:0]             lost_cnt   [NCOLS]
);
  logic [EOC_COARSE_W-1:0] coarse;

  coarse_counter #(.WIDTH(EOC_COARSE_W)) u_coarse (.clk, .rst_n, .count(coarse));
  assign coarse_o = coarse;

  for (genvar c = 0; c < NCOLS; c++) begin : g_col
    eoc_column #(.NTDC(NTDC), .FIFO_DEPTH(FIFO_DEPTH), .LANES(LANES)) u_col (
      .clk, .rst_n,
      .hit_lines(hit_lines[c]), .addr_lines(addr_lines[c]), .taps, .coarse,
      .ser_data(ser_data[c]), .ser_valid(ser_valid[c]), .ser_first(ser_first[c]),
      .lost_cnt(lost_cnt[c])
    );
  end
endmodule
