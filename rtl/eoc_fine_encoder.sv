// 5-bit encoder of the DLL phases latched by an end-of-column TDC hit register.
//
// The DLL delays the 320 MHz clock (50 % duty) by k x T/32, k = 0..31; tap k
// seen at time t is clk(t - k T/32). Latched at a hit, the 32 taps hold one
// circular run of 16 ones; the run ends at tap phi, where phi is the number of
// whole DLL steps since the last rising clock edge. The encoder returns phi as
// the index k with tap[k] = 1 and tap[k+1 mod 32] = 0; with several such
// boundaries (a bubble) the lowest index wins, and with none (all taps equal)
// 'valid' is low and phase is 0. Purely combinational.
//
// The document gives the reduction of 32 fine-time bits to a 5-bit word; the
// rule that maps taps to a number is this design's own.
module eoc_fine_encoder
  import gtk_pkg::*;
(
  input  logic [EOC_NTAPS-1:0]  taps,
  output logic [EOC_FINE_W-1:0] phase,
  output logic                  valid
);
  always_comb begin
    phase = '0;
    valid = 1'b0;
    for (int k = EOC_NTAPS - 1; k >= 0; k--) begin
      if (taps[k] && !taps[(k + 1) % EOC_NTAPS]) begin
        phase = EOC_FINE_W'(k);
        valid = 1'b1;
      end
    end
  end
endmodule
