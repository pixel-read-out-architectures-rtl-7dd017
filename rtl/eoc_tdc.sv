// One DLL-based TDC of the end-of-column TDC bank.
//
// The TDC serves one hit line of the column (5 pixels). Its two hit registers
// are clocked by the hit line itself, as drawn in the document: on the rising
// (leading) edge hit register 1 stores the 32 DLL taps, together with the
// 6-bit coarse counter and the 5 address lines of the column; on the falling
// (trailing) edge hit register 2 stores the taps and the coarse counter
// again. The two edges give arrival time and time over threshold. Two 5-bit
// encoders reduce each register to a DLL phase number.
//
// Handshake between the hit-line domain and the clk (320 MHz) domain uses
// toggles: le_tog flips on a stored leading edge, te_tog follows it on the
// trailing edge, ack_tog flips when the record is read. A leading edge is
// stored only while le_tog == ack_tog (register free); otherwise the hit is
// lost and lost_pulse pulses once in the clk domain. te_tog passes a two-flop
// synchroniser; 'ready' rises two to three clocks after the trailing edge and
// the record stays frozen until 'rd'. Unencoded, a record is 5 + 2 x (6 + 32)
// = 81 bits, as in the document.
//
// From the document: 9 TDCs per column, two 32-bit hit registers per TDC
// triggered on the two edges, 5-bit encoding, 6-bit coarse values. This
// design's choices: sampling the coarse counter and address lines in the
// hit registers themselves, the toggle handshake, the one-hit-deep storage,
// and an asynchronous reset for the hit-line-clocked flops (they have no
// free-running clock). The coarse counter is sampled asynchronously; a
// silicon version would need a Gray-coded or dual-edge counter to avoid
// sampling it while it changes.
module eoc_tdc
  import gtk_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    hit_line,
  input  logic [EOC_NTAPS-1:0]    taps,
  input  logic [EOC_COARSE_W-1:0] coarse,
  input  logic [EOC_NADDR-1:0]    addr_lines,
  // record, valid while ready
  output logic                    ready,
  input  logic                    rd,
  output logic [EOC_NADDR-1:0]    addr,
  output logic [EOC_COARSE_W-1:0] c_le,
  output logic [EOC_NTAPS-1:0]    hr_le,
  output logic [EOC_COARSE_W-1:0] c_te,
  output logic [EOC_NTAPS-1:0]    hr_te,
  output logic [EOC_FINE_W-1:0]   f_le,
  output logic [EOC_FINE_W-1:0]   f_te,
  output logic                    dec_ok,
  output logic                    lost_pulse
);
  logic le_tog, te_tog, lost_tog, ack_tog;
  logic te_s1, te_s2, lo_s1, lo_s2, lo_s3;
  logic free;
  logic ok_le, ok_te;

  assign free = (le_tog == ack_tog);

  // ---- hit-line domain: leading edge (hit register 1) ----
  always_ff @(posedge hit_line or negedge rst_n) begin
    if (!rst_n) begin
      le_tog   <= 1'b0;
      lost_tog <= 1'b0;
    end else if (free) begin
      le_tog   <= !le_tog;
    end else begin
      lost_tog <= !lost_tog;
    end
  end

  always_ff @(posedge hit_line) begin
    if (free) begin
      hr_le <= taps;
      c_le  <= coarse;
      addr  <= addr_lines;
    end
  end

  // ---- hit-line domain: trailing edge (hit register 2) ----
  always_ff @(negedge hit_line or negedge rst_n) begin
    if (!rst_n)                 te_tog <= 1'b0;
    else if (te_tog != le_tog)  te_tog <= le_tog;
  end

  always_ff @(negedge hit_line) begin
    if (te_tog != le_tog) begin
      hr_te <= taps;
      c_te  <= coarse;
    end
  end

  // ---- clk domain ----
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      te_s1 <= 1'b0; te_s2 <= 1'b0;
      lo_s1 <= 1'b0; lo_s2 <= 1'b0; lo_s3 <= 1'b0;
      ack_tog <= 1'b0;
    end else begin
      te_s1 <= te_tog;   te_s2 <= te_s1;
      lo_s1 <= lost_tog; lo_s2 <= lo_s1; lo_s3 <= lo_s2;
      if (rd && ready) ack_tog <= !ack_tog;
    end
  end

  assign ready      = (te_s2 != ack_tog);
  assign lost_pulse = lo_s2 ^ lo_s3;

  eoc_fine_encoder u_enc_le (.taps(hr_le), .phase(f_le), .valid(ok_le));
  eoc_fine_encoder u_enc_te (.taps(hr_te), .phase(f_te), .valid(ok_te));
  assign dec_ok = ok_le && ok_te;
endmodule
