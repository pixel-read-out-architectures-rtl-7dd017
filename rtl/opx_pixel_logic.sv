// Digital part of one on-pixel TDC cell.
//
// Data path of a hit: the constant-fraction discriminator output (hit_i)
// starts a ramp in the analog front end and, once seen by the logic, latches
// the coarse time bus into the 4-entry digital buffer. The ramp is stopped by
// the clock trailing edge and its voltage stays on one of four capacitors of
// the analog buffer. Entries of the two buffers are paired: entry k of the
// digital buffer and capacitor k belong to the same hit, and both are
// allocated and freed in the same order. The oldest pending hit is converted
// by the Wilkinson counter (8-bit fine time) and {lost, address, coarse, fine}
// is written to the 2-entry output buffer, read by the column controller
// through out_valid/out_data/out_rd (first-word fall-through).
//
// Interface to the analog front end (behavioural model in simulation):
//   ramp_arm_o / ramp_slot_o  a hit may charge capacitor ramp_slot_o; low when
//                             all four capacitors hold unconverted hits
//   adc_run_o / adc_slot_o    discharge capacitor adc_slot_o; adc_cmp_i is the
//                             rundown comparator
//
// Timing: hit_i passes a two-flop synchroniser; the coarse value is latched in
// the cycle the rising edge is seen, two to three clocks after the hit (a
// fixed offset removed in calibration). A hit that arrives while ramp_arm_o is
// low is lost: the front end does not charge a capacitor and the logic does
// not store a coarse time; the word of the next stored hit carries lost=1.
// Acceptance is decided with the value ramp_arm_o had when the hit arrived,
// so the analog and digital buffers always agree. The stored coarse value is
// the coarse count of the clock period of the hit plus 2. hit_i must stay high for at
// least one clock period and hits at one pixel must be at least three periods
// apart (the ramp and synchroniser dead time).
//
// From the document: buffer depths 4 and 2, 10-bit coarse, 8-bit fine,
// 6-bit address, the sequence latch coarse / ramp / convert / output buffer.
// This design's choices: the synchroniser, the pairing of the two buffers by
// order, the lost flag and the output-buffer handshake.
module opx_pixel_logic
  import gtk_pkg::*;
#(
  parameter logic [OPX_ADDR_W-1:0] ADDR = '0,
  parameter int DIG_DEPTH = 4,
  parameter int OUT_DEPTH = 2,
  localparam int SW = (DIG_DEPTH > 1) ? $clog2(DIG_DEPTH) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    hit_i,
  input  logic [OPX_COARSE_W-1:0] coarse_i,
  // analog front end
  output logic                    ramp_arm_o,
  output logic [SW-1:0]           ramp_slot_o,
  output logic                    adc_run_o,
  output logic [SW-1:0]           adc_slot_o,
  input  logic                    adc_cmp_i,
  // output buffer
  output logic                    out_valid,
  output opx_pix_word_t           out_data,
  input  logic                    out_rd
);
  logic h0, h1, h2, rise;
  logic dig_full, dig_empty, dig_pop;
  logic [OPX_COARSE_W:0] dig_head;
  logic out_full, out_empty, out_wr;
  logic conv_start, conv_busy, conv_done;
  logic [OPX_FINE_W-1:0] fine;
  logic lost_pending;
  logic [SW-1:0] wslot, rslot;
  opx_pix_word_t out_word;

  function automatic logic [SW-1:0] nxt(input logic [SW-1:0] p);
    return (p == SW'(DIG_DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  // Synchroniser and edge detector. a0/a1 carry ramp_arm_o through the same
  // two stages as the hit, so a1 at the detected edge is the arm value during
  // the clock period in which the hit arrived.
  logic a0, a1;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      h0 <= 1'b0; h1 <= 1'b0; h2 <= 1'b0; a0 <= 1'b0; a1 <= 1'b0;
    end else begin
      h0 <= hit_i; h1 <= h0; h2 <= h1; a0 <= ramp_arm_o; a1 <= a0;
    end
  end
  assign rise = h1 && !h2;

  // A capacitor is free exactly when the digital buffer has a free entry.
  assign ramp_arm_o = !dig_full;

  logic accept;
  assign accept = rise && a1;

  // Digital buffer entry: the coarse time and whether a hit was lost just before it.
  sync_fifo #(.WIDTH(OPX_COARSE_W + 1), .DEPTH(DIG_DEPTH)) u_digital_buffer (
    .clk, .rst_n,
    .wr_en(accept), .wr_data({lost_pending, coarse_i}), .full(dig_full),
    .rd_en(dig_pop), .rd_data(dig_head), .empty(dig_empty), .count()
  );

  // Capacitor pointers of the analog buffer, in step with the digital buffer.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wslot <= '0;
      rslot <= '0;
    end else begin
      if (accept)  wslot <= nxt(wslot);
      if (dig_pop) rslot <= nxt(rslot);
    end
  end
  assign ramp_slot_o = wslot;
  assign adc_slot_o  = rslot;

  // Conversion of the oldest pending hit; starts only with room in the output buffer.
  logic conv_wait;  // start issued, counter not yet running
  assign conv_start = !dig_empty && !conv_busy && !out_full;
  assign conv_busy  = adc_run_o || conv_done || conv_wait;
  always_ff @(posedge clk) begin
    if (!rst_n) conv_wait <= 1'b0;
    else        conv_wait <= conv_start;
  end

  opx_wilkinson_counter #(.WIDTH(OPX_FINE_W)) u_adc (
    .clk, .rst_n, .start(conv_start), .cmp(adc_cmp_i),
    .run(adc_run_o), .done(conv_done), .code(fine)
  );

  assign out_wr  = conv_done;
  assign dig_pop = conv_done;

  always_ff @(posedge clk) begin
    if (!rst_n)         lost_pending <= 1'b0;
    else if (rise && !a1)    lost_pending <= 1'b1;
    else if (accept)         lost_pending <= 1'b0;
  end

  always_comb begin
    out_word.lost   = dig_head[OPX_COARSE_W];
    out_word.addr   = ADDR;
    out_word.coarse = dig_head[OPX_COARSE_W-1:0];
    out_word.fine   = fine;
  end

  sync_fifo #(.WIDTH($bits(opx_pix_word_t)), .DEPTH(OUT_DEPTH)) u_output_buffer (
    .clk, .rst_n,
    .wr_en(out_wr), .wr_data(out_word), .full(out_full),
    .rd_en(out_rd), .rd_data(out_data), .empty(out_empty), .count()
  );
  assign out_valid = !out_empty;

  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n) out_wr |-> !out_full);
endmodule
