// Free-running coarse-time counter.
//
// A WIDTH-bit binary counter that advances by one on every clock edge and
// wraps around; its value is the coarse time bus that hits latch. The on-pixel
// TDC chip uses one 10-bit counter of its 160 MHz system clock, shared by all
// columns; the end-of-column chip uses a 6-bit counter of its 320 MHz clock.
// Both widths come from the document. A synchronous active-low reset sets it to
// zero, which fixes the time origin (the document does not describe reset).
module coarse_counter #(
  parameter int WIDTH = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [WIDTH-1:0] count
);
  always_ff @(posedge clk) begin
    if (!rst_n) count <= '0;
    else        count <= count + 1'b1;
  end
endmodule
