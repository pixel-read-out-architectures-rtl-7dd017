// On-pixel TDC read-out chip (digital part).
//
// NCOLS columns of NPIX pixel cells. Every pixel measures its own hits: a
// shared 10-bit coarse counter of the system clock is latched by the hit and
// an 8-bit fine time comes from the pixel's Wilkinson-converted ramp (the
// ramp, capacitors and comparator are analog and sit outside this module; each
// pixel's interface to them is brought out as ports). Each column controller
// collects and formats the words of its pixels; groups of M columns are merged
// by a matrix controller into one 32-bit stream, which an output buffer and
// serializer send as LANES bits per clock (ser_* ports, one set per group).
//
// Word on the serial outputs: gtk_pkg::opx_hit_word_t, most significant
// chunk first, ser_first marking a word's first chunk.
//
// Sizes from the document: 45-pixel columns, 40 columns per chip, 10-bit
// coarse time, 8-bit fine time, 32 bits per hit, buffer depths 4 and 2.
// The document leaves m open ("m it depends on the output speed"); M = 8 and
// LANES = 8 (1.28 Gb/s per group at 160 MHz, 6.4 Gb/s per chip against the
// document's ~6 Gb/s peak) are this design's choice, as are the column and
// output buffer depths. If NCOLS is not a multiple of M the last group is
// partly filled.
module opx_chip
  import gtk_pkg::*;
#(
  parameter int NCOLS     = 40,
  parameter int NPIX      = 45,
  parameter int M         = 8,
  parameter int LANES     = 8,
  parameter int COL_DEPTH = 8,
  parameter int SER_DEPTH = 4,
  localparam int NGRP     = (NCOLS + M - 1) / M
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // discriminator outputs of all pixels
  input  logic [NPIX-1:0]         hit_i       [NCOLS],
  // per-pixel interface to the analog ramp / capacitor / comparator
  output logic [NPIX-1:0]         ramp_arm_o  [NCOLS],
  output logic [1:0]              ramp_slot_o [NCOLS][NPIX],
  output logic [NPIX-1:0]         adc_run_o   [NCOLS],
  output logic [1:0]              adc_slot_o  [NCOLS][NPIX],
  input  logic [NPIX-1:0]         adc_cmp_i   [NCOLS],
  // coarse time bus, for monitoring
  output logic [OPX_COARSE_W-1:0] coarse_o,
  // serial outputs, one per matrix controller
  output logic [LANES-1:0]        ser_data_o  [NGRP],
  output logic [NGRP-1:0]         ser_valid_o,
  output logic [NGRP-1:0]         ser_first_o
);
  logic [OPX_COARSE_W-1:0] coarse;
  logic [NCOLS-1:0]        col_valid, col_rd;
  logic [OPX_WORD_W-1:0]   col_data [NCOLS];

  coarse_counter #(.WIDTH(OPX_COARSE_W)) u_coarse (.clk, .rst_n, .count(coarse));
  assign coarse_o = coarse;

  for (genvar c = 0; c < NCOLS; c++) begin : g_col
    logic [NPIX-1:0] pv, pr;
    opx_pix_word_t   pd [NPIX];

    for (genvar p = 0; p < NPIX; p++) begin : g_pix
      opx_pixel_logic #(.ADDR(OPX_ADDR_W'(p))) u_pix (
        .clk, .rst_n,
        .hit_i(hit_i[c][p]), .coarse_i(coarse),
        .ramp_arm_o(ramp_arm_o[c][p]), .ramp_slot_o(ramp_slot_o[c][p]),
        .adc_run_o(adc_run_o[c][p]), .adc_slot_o(adc_slot_o[c][p]), .adc_cmp_i(adc_cmp_i[c][p]),
        .out_valid(pv[p]), .out_data(pd[p]), .out_rd(pr[p])
      );
    end

    opx_column_ctrl #(.NPIX(NPIX), .COL_ID(OPX_COL_W'(c)), .BUF_DEPTH(COL_DEPTH)) u_colctl (
      .clk, .rst_n,
      .pix_valid(pv), .pix_data(pd), .pix_rd(pr),
      .col_valid(col_valid[c]), .col_data(col_data[c]), .col_rd(col_rd[c])
    );
  end

  for (genvar g = 0; g < NGRP; g++) begin : g_grp
    logic [M-1:0]          gv, gr;
    logic [OPX_WORD_W-1:0] gd [M];
    logic                  mv, sr;
    logic [OPX_WORD_W-1:0] md;

    for (genvar j = 0; j < M; j++) begin : g_map
      if (g * M + j < NCOLS) begin : g_used
        assign gv[j] = col_valid[g*M+j];
        assign gd[j] = col_data[g*M+j];
        assign col_rd[g*M+j] = gr[j];
      end else begin : g_empty
        assign gv[j] = 1'b0;
        assign gd[j] = '0;
      end
    end

    opx_matrix_ctrl #(.M(M)) u_matrix (
      .clk, .rst_n,
      .col_valid(gv), .col_data(gd), .col_rd(gr),
      .out_valid(mv), .out_data(md), .out_ready(sr)
    );

    word_serializer #(.WORD_W(OPX_WORD_W), .LANES(LANES), .DEPTH(SER_DEPTH)) u_ser (
      .clk, .rst_n,
      .in_valid(mv), .in_data(md), .in_ready(sr),
      .ser_data(ser_data_o[g]), .ser_valid(ser_valid_o[g]), .ser_first(ser_first_o[g])
    );
  end
endmodule
