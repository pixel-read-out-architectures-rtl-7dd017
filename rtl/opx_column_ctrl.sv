// Column controller of the on-pixel TDC chip.
//
// Reads the output buffers of the NPIX pixels of one column and formats each
// pixel word into the 32-bit hit word {lost, 0, column, pixel, coarse, fine}
// (gtk_pkg::opx_hit_word_t), which it queues in the column data buffer. A
// round-robin arbiter picks one pixel with a valid word per clock; the pixel
// is popped in the same cycle the word is written, so a column moves at most
// one hit per clock. When the data buffer is full no pixel is read and the
// pixels' own buffers absorb the backlog. The data buffer is read by the
// matrix controller through col_valid/col_data/col_rd (first-word fall-through).
//
// From the document: the column of 45 pixels, "data reading and formatting",
// a data buffer, 32-bit output. This design's choices: the arbitration, the
// one-word-per-clock column bus, the word layout and the buffer depth.
module opx_column_ctrl
  import gtk_pkg::*;
#(
  parameter int NPIX = 45,
  parameter logic [OPX_COL_W-1:0] COL_ID = '0,
  parameter int BUF_DEPTH = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NPIX-1:0]       pix_valid,
  input  opx_pix_word_t         pix_data [NPIX],
  output logic [NPIX-1:0]       pix_rd,
  output logic                  col_valid,
  output logic [OPX_WORD_W-1:0] col_data,
  input  logic                  col_rd
);
  localparam int IW = (NPIX > 1) ? $clog2(NPIX) : 1;
  logic          gnt_valid, buf_full, buf_empty, take;
  logic [IW-1:0] gnt_idx;
  opx_pix_word_t sel;
  opx_hit_word_t word;

  rr_arbiter #(.N(NPIX)) u_arb (
    .clk, .rst_n, .req(pix_valid), .take, .gnt_valid, .gnt_idx
  );

  assign take = gnt_valid && !buf_full;
  assign sel  = pix_data[gnt_idx];

  always_comb begin
    pix_rd = '0;
    if (take) pix_rd[gnt_idx] = 1'b1;
    word.lost   = sel.lost;
    word.rsvd   = 1'b0;
    word.col    = COL_ID;
    word.pix    = sel.addr;
    word.coarse = sel.coarse;
    word.fine   = sel.fine;
  end

  sync_fifo #(.WIDTH(OPX_WORD_W), .DEPTH(BUF_DEPTH)) u_data_buffer (
    .clk, .rst_n,
    .wr_en(take), .wr_data(word), .full(buf_full),
    .rd_en(col_rd), .rd_data(col_data), .empty(buf_empty), .count()
  );
  assign col_valid = !buf_empty;
endmodule
