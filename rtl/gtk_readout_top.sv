// GigaTracker pixel read-out: the two candidate read-out chips side by side.
//
// Both chips read the same kind of 45 x 40 pixel matrix and must time-stamp
// each hit to about 100 ps despite the discriminator's amplitude-dependent
// time walk. They differ in where the time is measured:
//   opx_*  on-pixel TDC: a constant-fraction discriminator removes the walk
//          and every pixel digitises its own time (10-bit coarse count of
//          160 MHz + 8-bit Wilkinson fine code), buffers it, and column and
//          matrix controllers merge 32-bit words onto serial outputs.
//   eoc_*  end-of-column TDC: pixels send only their time-over-threshold
//          pulse down shared column lines; TDCs at the column foot latch a
//          32-phase DLL and a 6-bit coarse count of 320 MHz at both pulse
//          edges, and each column has its own serial output.
// The two are independent: separate clocks, resets, inputs and outputs. The
// analog parts of both (front ends, ramp and capacitors, comparators,
// transmission lines, PLL, DLL) are outside and connect through the ports.
// Sizes are the document's (40 columns of 45 pixels, 9 x 5 column buses);
// OPX_M and the lane counts are this design's choice.
module gtk_readout_top
  import gtk_pkg::*;
#(
  parameter int OPX_COLS  = 40,
  parameter int OPX_PIX   = 45,
  parameter int OPX_M     = 8,
  parameter int OPX_LANES = 8,
  parameter int EOC_COLS  = 40,
  parameter int EOC_NTDC_P = EOC_NTDC,
  localparam int OPX_NGRP = (OPX_COLS + OPX_M - 1) / OPX_M
) (
  // ---- on-pixel TDC chip, 160 MHz ----
  input  logic                    opx_clk,
  input  logic                    opx_rst_n,
  input  logic [OPX_PIX-1:0]      opx_hit        [OPX_COLS],
  output logic [OPX_PIX-1:0]      opx_ramp_arm   [OPX_COLS],
  output logic [1:0]              opx_ramp_slot  [OPX_COLS][OPX_PIX],
  output logic [OPX_PIX-1:0]      opx_adc_run    [OPX_COLS],
  output logic [1:0]              opx_adc_slot   [OPX_COLS][OPX_PIX],
  input  logic [OPX_PIX-1:0]      opx_adc_cmp    [OPX_COLS],
  output logic [OPX_COARSE_W-1:0] opx_coarse,
  output logic [OPX_LANES-1:0]    opx_ser_data   [OPX_NGRP],
  output logic [OPX_NGRP-1:0]     opx_ser_valid,
  output logic [OPX_NGRP-1:0]     opx_ser_first,
  // ---- end-of-column TDC chip, 320 MHz ----
  input  logic                    eoc_clk,
  input  logic                    eoc_rst_n,
  input  logic [EOC_NTDC_P-1:0]   eoc_hit_lines  [EOC_COLS],
  input  logic [EOC_NADDR-1:0]    eoc_addr_lines [EOC_COLS],
  input  logic [EOC_NTAPS-1:0]    eoc_taps,
  output logic [EOC_COARSE_W-1:0] eoc_coarse,
  output logic                    eoc_ser_data   [EOC_COLS],
  output logic [EOC_COLS-1:0]     eoc_ser_valid,
  output logic [EOC_COLS-1:0]     eoc_ser_first,
  output logic [15:0]             eoc_lost_cnt   [EOC_COLS]
);
  opx_chip #(.NCOLS(OPX_COLS), .NPIX(OPX_PIX), .M(OPX_M), .LANES(OPX_LANES)) u_opx (
    .clk(opx_clk), .rst_n(opx_rst_n),
    .hit_i(opx_hit),
    .ramp_arm_o(opx_ramp_arm), .ramp_slot_o(opx_ramp_slot),
    .adc_run_o(opx_adc_run), .adc_slot_o(opx_adc_slot), .adc_cmp_i(opx_adc_cmp),
    .coarse_o(opx_coarse),
    .ser_data_o(opx_ser_data), .ser_valid_o(opx_ser_valid), .ser_first_o(opx_ser_first)
  );

  logic [0:0] eoc_sd [EOC_COLS];
  for (genvar c = 0; c < EOC_COLS; c++) begin : g_sd
    assign eoc_ser_data[c] = eoc_sd[c][0];
  end

  eoc_chip #(.NCOLS(EOC_COLS), .NTDC(EOC_NTDC_P), .LANES(1)) u_eoc (
    .clk(eoc_clk), .rst_n(eoc_rst_n),
    .hit_lines(eoc_hit_lines), .addr_lines(eoc_addr_lines), .taps(eoc_taps),
    .coarse_o(eoc_coarse),
    .ser_data(eoc_sd), .ser_valid(eoc_ser_valid), .ser_first(eoc_ser_first),
    .lost_cnt(eoc_lost_cnt)
  );
endmodule
