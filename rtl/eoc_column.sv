// End-of-column logic of one column of the end-of-column TDC chip.
//
// The column's 45 pixels share two buses: NTDC = 9 hit lines, each wired to 5
// pixels, and NADDR = 5 address lines, each wired to 9 pixels, so that pixel
// 5*i + j drives hit line i and address line j (the pixel numbering is this
// design's choice). Each hit line has its own TDC (eoc_tdc); the TDC latches
// the address lines at the leading edge, and the pair (hit line, address
// line) names the pixel. If two pixels of the column fire together the
// address lines are not one-hot and the word is flagged ambiguous.
//
// A round-robin arbiter reads one finished TDC record per clock, packs it
// into the 32-bit word gtk_pkg::eoc_hit_word_t (TDC number, address lines,
// coarse and encoded fine time of both edges, ambiguity flag) and pushes it
// into the pipeline FIFO that absorbs rate fluctuations; a serializer sends
// the FIFO's words on LANES bits (one LVDS line by default). lost_cnt counts
// leading edges dropped because their TDC still held an unread hit
// (saturating). The column number is not in the word: each column has its own
// serial output, as in the document's column-segmented read-out.
//
// From the document: 9 hit lines of 5 pixels, 5 address lines, a TDC per hit
// line, FIFO pipelining, a serializer per column. This design's choices: the
// word layout, the arbiter, FIFO depth, lane count and the lost counter.
module eoc_column
  import gtk_pkg::*;
#(
  parameter int NTDC       = EOC_NTDC,
  parameter int FIFO_DEPTH = 8,
  parameter int LANES      = 1,
  parameter int SER_DEPTH  = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NTDC-1:0]         hit_lines,
  input  logic [EOC_NADDR-1:0]    addr_lines,
  input  logic [EOC_NTAPS-1:0]    taps,
  input  logic [EOC_COARSE_W-1:0] coarse,
  output logic [LANES-1:0]        ser_data,
  output logic                    ser_valid,
  output logic                    ser_first,
  output logic [15:0]             lost_cnt
);
  localparam int IW = (NTDC > 1) ? $clog2(NTDC) : 1;

  logic [NTDC-1:0]         rdy, rd, lostp, ok;
  logic [EOC_NADDR-1:0]    t_addr [NTDC];
  logic [EOC_COARSE_W-1:0] t_cle [NTDC], t_cte [NTDC];
  logic [EOC_FINE_W-1:0]   t_fle [NTDC], t_fte [NTDC];

  for (genvar i = 0; i < NTDC; i++) begin : g_tdc
    eoc_tdc u_tdc (
      .clk, .rst_n,
      .hit_line(hit_lines[i]), .taps, .coarse, .addr_lines,
      .ready(rdy[i]), .rd(rd[i]),
      .addr(t_addr[i]), .c_le(t_cle[i]), .hr_le(), .c_te(t_cte[i]), .hr_te(),
      .f_le(t_fle[i]), .f_te(t_fte[i]), .dec_ok(ok[i]), .lost_pulse(lostp[i])
    );
  end

  logic          gnt_valid, take, f_full, f_empty, f_pop, s_ready;
  logic [IW-1:0] gnt_idx;
  eoc_hit_word_t word;
  logic [EOC_WORD_W-1:0] f_data;

  rr_arbiter #(.N(NTDC)) u_arb (.clk, .rst_n, .req(rdy), .take, .gnt_valid, .gnt_idx);
  assign take = gnt_valid && !f_full;

  always_comb begin
    rd = '0;
    if (take) rd[gnt_idx] = 1'b1;
    word.amb  = !is_onehot5(t_addr[gnt_idx]) || !ok[gnt_idx];
    word.tdc  = EOC_TDC_W'(gnt_idx);
    word.addr = t_addr[gnt_idx];
    word.c_le = t_cle[gnt_idx];
    word.f_le = t_fle[gnt_idx];
    word.c_te = t_cte[gnt_idx];
    word.f_te = t_fte[gnt_idx];
  end

  sync_fifo #(.WIDTH(EOC_WORD_W), .DEPTH(FIFO_DEPTH)) u_pipe (
    .clk, .rst_n,
    .wr_en(take), .wr_data(word), .full(f_full),
    .rd_en(f_pop), .rd_data(f_data), .empty(f_empty), .count()
  );
  assign f_pop = !f_empty && s_ready;

  word_serializer #(.WORD_W(EOC_WORD_W), .LANES(LANES), .DEPTH(SER_DEPTH)) u_ser (
    .clk, .rst_n,
    .in_valid(!f_empty), .in_data(f_data), .in_ready(s_ready),
    .ser_data, .ser_valid, .ser_first
  );

  // Lost-hit counter: sum of this cycle's lost pulses, saturating.
  always_ff @(posedge clk) begin
    int n;
    if (!rst_n) begin
      lost_cnt <= '0;
    end else begin
      n = 0;
      for (int i = 0; i < NTDC; i++) n += int'(lostp[i]);
      if (int'(lost_cnt) + n > 16'hFFFF) lost_cnt <= 16'hFFFF;
      else                               lost_cnt <= lost_cnt + 16'(n);
    end
  end
endmodule
