// Synchronous FIFO with first-word fall-through.
//
// One clock. The head entry is always visible on rd_data while empty is low;
// rd_en pops it at the clock edge. A write while full and a read while empty
// are ignored, so callers may hold the strobes without checking. A write and a
// read in the same cycle are both honoured when the FIFO is neither empty
// nor full. The storage is a plain register array (DEPTH entries, any DEPTH
// >= 1) with wrapping read and write indices.
//
// Used for every buffer of the read-out: the pixel digital buffer (depth 4)
// and output buffer (depth 2) whose depths the document gives, and the column,
// matrix and end-of-column buffers whose depths are this design's choice.
module sync_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 4,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [CW-1:0]    count
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_wr, do_rd;

  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rp];

  function automatic logic [AW-1:0] nxt(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= nxt(wp);
      if (do_rd) rp <= nxt(rp);
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  // Index bound: a non-power-of-two depth must never let a pointer leave the array.
  a_ptr_range: assert property (@(posedge clk) disable iff (!rst_n) (int'(wp) < DEPTH) && (int'(rp) < DEPTH));
endmodule
