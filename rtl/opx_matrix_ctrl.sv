// Matrix controller of the on-pixel TDC chip.
//
// Merges the 32-bit word streams of M column controllers into one stream
// towards the output buffer and serializer. Each clock a round-robin arbiter
// picks one column whose data buffer holds a word; when out_ready is high the
// word is passed on (combinationally) and that column's buffer is popped.
// Words keep their column number, so the merged stream stays decodable.
//
// From the document: "a group of m columns ... connected through the Matrix
// Controller and merged", with 32-bit buses in and out. This design's
// choices: the value of M (8 by default, so that 5 groups serve a 40-column
// chip) and the fair rotation among columns.
module opx_matrix_ctrl
  import gtk_pkg::*;
#(
  parameter int M = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [M-1:0]          col_valid,
  input  logic [OPX_WORD_W-1:0] col_data [M],
  output logic [M-1:0]          col_rd,
  output logic                  out_valid,
  output logic [OPX_WORD_W-1:0] out_data,
  input  logic                  out_ready
);
  localparam int IW = (M > 1) ? $clog2(M) : 1;
  logic          gnt_valid, take;
  logic [IW-1:0] gnt_idx;

  rr_arbiter #(.N(M)) u_arb (
    .clk, .rst_n, .req(col_valid), .take, .gnt_valid, .gnt_idx
  );

  assign take      = gnt_valid && out_ready;
  assign out_valid = gnt_valid;
  assign out_data  = col_data[gnt_idx];

  always_comb begin
    col_rd = '0;
    if (take) col_rd[gnt_idx] = 1'b1;
  end
endmodule
