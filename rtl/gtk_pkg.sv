// Shared constants and word formats of the GigaTracker pixel read-out.
//
// Two read-out architectures are described here. The on-pixel TDC chip (OPX)
// time-stamps each hit inside the pixel with a 10-bit coarse count of the
// 160 MHz clock and an 8-bit fine code from a Wilkinson-converted TAC, and
// ships 32-bit words. The end-of-column chip (EOC) sends the time-over-
// threshold pulse down the column to a bank of DLL-based TDCs, which latch
// 32 DLL phases and a 6-bit coarse count of the 320 MHz clock at both the
// leading and the trailing edge.
//
// Field widths 10/8/6 (OPX) and 32/6/5 (EOC) follow the document. The order of
// the fields inside a word, the column-number field and the flag bits are
// this design's own choice: the document only gives the totals (32 bits per
// hit for OPX, 81 unencoded bits per hit for EOC).
package gtk_pkg;

  // ---------------- on-pixel TDC architecture ----------------
  localparam int OPX_COARSE_W = 10;  // coarse time, clock counter bits
  localparam int OPX_FINE_W   = 8;   // fine time, Wilkinson ADC bits
  localparam int OPX_ADDR_W   = 6;   // pixel address inside a column (45 pixels)
  localparam int OPX_COL_W    = 6;   // column number inside the chip (40 columns)
  localparam int OPX_WORD_W   = 32;  // bits per hit on the column / matrix buses

  // Word held in a pixel output buffer.
  typedef struct packed {
    logic                    lost;    // a hit of this pixel was dropped before this one
    logic [OPX_ADDR_W-1:0]   addr;
    logic [OPX_COARSE_W-1:0] coarse;
    logic [OPX_FINE_W-1:0]   fine;
  } opx_pix_word_t;                   // 25 bits

  // 32-bit hit word built by the column controller.
  typedef struct packed {
    logic                    lost;    // bit 31
    logic                    rsvd;    // bit 30, always 0
    logic [OPX_COL_W-1:0]    col;     // bits 29:24
    logic [OPX_ADDR_W-1:0]   pix;     // bits 23:18
    logic [OPX_COARSE_W-1:0] coarse;  // bits 17:8
    logic [OPX_FINE_W-1:0]   fine;    // bits 7:0
  } opx_hit_word_t;

  // ---------------- end-of-column TDC architecture ----------------
  localparam int EOC_NTAPS    = 32;  // DLL delay elements
  localparam int EOC_FINE_W   = 5;   // encoded DLL phase
  localparam int EOC_COARSE_W = 6;   // coarse counters of the 320 MHz clock
  localparam int EOC_NADDR    = 5;   // address lines per column
  localparam int EOC_NTDC     = 9;   // hit lines (and TDCs) per column
  localparam int EOC_TDC_W    = 4;   // TDC number field
  localparam int EOC_WORD_W   = 32;  // encoded hit word
  // Unencoded record of one hit: address + 2 x (coarse + 32 taps) = 81 bits.
  localparam int EOC_RAW_W    = EOC_NADDR + 2 * (EOC_COARSE_W + EOC_NTAPS);

  // Encoded 32-bit hit word of one column.
  typedef struct packed {
    logic                    amb;     // bit 31: address lines not one-hot or taps not decodable
    logic [EOC_TDC_W-1:0]    tdc;     // bits 30:27, hit line / TDC number
    logic [EOC_NADDR-1:0]    addr;    // bits 26:22, address lines as latched
    logic [EOC_COARSE_W-1:0] c_le;    // bits 21:16
    logic [EOC_FINE_W-1:0]   f_le;    // bits 15:11
    logic [EOC_COARSE_W-1:0] c_te;    // bits 10:5
    logic [EOC_FINE_W-1:0]   f_te;    // bits 4:0
  } eoc_hit_word_t;

  // True when exactly one bit of v is set (written out for tools without $onehot).
  function automatic logic is_onehot5(input logic [EOC_NADDR-1:0] v);
    int n;
    n = 0;
    for (int i = 0; i < EOC_NADDR; i++) n += int'(v[i]);
    return n == 1;
  endfunction

endpackage
