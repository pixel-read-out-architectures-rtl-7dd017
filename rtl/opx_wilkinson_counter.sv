// Digital half of the Wilkinson ADC of the on-pixel TDC.
//
// A Wilkinson ADC runs the held ramp voltage down with a constant current and
// measures how long that takes: here a counter counts clock cycles while the
// rundown comparator (cmp) stays high. 'start' (one cycle) clears the counter
// and begins a conversion; 'run' is high during the rundown and enables the
// discharge current of the selected capacitor. In each cycle with run high the
// comparator is sampled: high adds one to the count, low ends the conversion.
// 'done' then pulses for one cycle with the result on 'code'. A voltage beyond
// full scale saturates at 2^WIDTH-1 and also ends the conversion.
//
// Timing: a code of N takes N+1 cycles from the cycle after 'start' to 'done'.
// The 8-bit code width is the document's; counting with the system clock and
// the saturation rule are this design's choice.
module opx_wilkinson_counter #(
  parameter int WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             cmp,
  output logic             run,
  output logic             done,
  output logic [WIDTH-1:0] code
);
  logic [WIDTH-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run  <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
      code <= '0;
    end else begin
      done <= 1'b0;
      if (start && !run) begin
        run <= 1'b1;
        cnt <= '0;
      end else if (run) begin
        if (cmp && cnt != '1) begin
          cnt <= cnt + 1'b1;
        end else begin
          run  <= 1'b0;
          done <= 1'b1;
          code <= cnt;
        end
      end
    end
  end
endmodule
