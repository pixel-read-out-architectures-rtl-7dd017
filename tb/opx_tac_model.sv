// Behavioural model of the analog part of one on-pixel TDC cell: ramp
// generator, four-capacitor analog buffer and Wilkinson rundown comparator.
// Not synthesizable; used only by testbenches.
//
// A rising edge of 'hit' while ramp_arm is high and no ramp is running starts
// a ramp into capacitor ramp_slot; the next falling clock edge stops it. The
// held voltage is kept as a count of BIN_PS-wide bins, floor(ramp time /
// BIN_PS). While adc_run is high the capacitor adc_slot loses one bin per
// rising clock edge, and adc_cmp is high while it still holds charge.
module opx_tac_model #(
  parameter real BIN_PS = 98.0
) (
  input  logic       clk,
  input  logic       hit,
  input  logic       ramp_arm,
  input  logic [1:0] ramp_slot,
  input  logic       adc_run,
  input  logic [1:0] adc_slot,
  output logic       adc_cmp
);
  int  charge [4] = '{default: 0};
  bit  ramping = 0;
  int  ramps = 0;

  always @(posedge hit) begin
    if (ramp_arm && !ramping) begin
      automatic realtime t0 = $realtime;
      automatic logic [1:0] s = ramp_slot;
      ramping = 1;
      @(negedge clk);
      charge[s] <= int'($floor(($realtime - t0) / BIN_PS));
      ramps++;
      ramping = 0;
    end
  end

  always @(posedge clk) if (adc_run && charge[adc_slot] > 0) charge[adc_slot] <= charge[adc_slot] - 1;

  assign adc_cmp = (charge[adc_slot] > 0);
endmodule
