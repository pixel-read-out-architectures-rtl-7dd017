// Output buffer and parallel-in serial-out serializer.
//
// Words enter through a FIFO (in_valid/in_ready handshake, in_ready = FIFO not
// full) and leave as frames of NCHUNK = ceil(WORD_W/LANES) chunks of LANES
// bits, most significant chunk first, one chunk per clock. ser_valid is high
// for every chunk of a frame and ser_first marks the first chunk; between
// frames ser_valid is low and ser_data is zero. A new word is loaded in the
// cycle after the last chunk of the previous one has been sent, so a full
// buffer streams back to back (NCHUNK clocks per word).
//
// The document names "out buffer + serializer" (on-pixel chip) and per-column
// "registers / serial." (end-of-column chip) without their insides; the lane
// count, the framing strobes and the buffer depth are this design's choice.
// The line driver itself (LVDS or Gigabit link) is analog and not modelled.
module word_serializer #(
  parameter int WORD_W = 32,
  parameter int LANES  = 8,
  parameter int DEPTH  = 4,
  localparam int NCHUNK = (WORD_W + LANES - 1) / LANES,
  localparam int SW     = NCHUNK * LANES,
  localparam int KW     = $clog2(NCHUNK + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [WORD_W-1:0] in_data,
  output logic              in_ready,
  output logic [LANES-1:0]  ser_data,
  output logic              ser_valid,
  output logic              ser_first
);
  logic              f_full, f_empty, pop;
  logic [WORD_W-1:0] f_data;
  logic [SW-1:0]     shreg;
  logic [KW-1:0]     left;    // chunks still to send, including the current one

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(DEPTH)) u_buf (
    .clk, .rst_n,
    .wr_en(in_valid), .wr_data(in_data), .full(f_full),
    .rd_en(pop), .rd_data(f_data), .empty(f_empty), .count()
  );
  assign in_ready = !f_full;

  // Load when idle or when the last chunk leaves this cycle.
  assign pop = !f_empty && (left <= KW'(1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      left      <= '0;
      shreg     <= '0;
      ser_first <= 1'b0;
    end else if (pop) begin
      left      <= KW'(NCHUNK);
      shreg     <= SW'(f_data) << (SW - WORD_W);
      ser_first <= 1'b1;
    end else if (left != '0) begin
      left      <= left - 1'b1;
      shreg     <= shreg << LANES;
      ser_first <= 1'b0;
    end
  end

  assign ser_valid = (left != '0);
  assign ser_data  = ser_valid ? shreg[SW-1 -: LANES] : '0;
endmodule
