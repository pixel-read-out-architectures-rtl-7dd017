// Behavioural model of the locked 32-tap DLL of the end-of-column TDC chip.
// Not synthesizable; used only by testbenches.
//
// Tap k is the 320 MHz clock (50 % duty, rising edges at T0_PS + n*PERIOD_PS)
// delayed by k * PERIOD_PS/32. The taps are recomputed from the simulation
// time every PERIOD_PS/32, which is exactly when one of them changes, so the
// model needs no clock input and is free of races with hits placed between
// two tap changes.
module eoc_dll_model #(
  parameter longint PERIOD_PS = 3200,
  parameter longint T0_PS     = 1600
) (
  output logic [31:0] taps
);
  localparam longint STEP = PERIOD_PS / 32;

  initial begin
    taps = '0;
    forever begin
      for (int k = 0; k < 32; k++) begin
        longint ph;
        ph = ($time - T0_PS - longint'(k) * STEP) % PERIOD_PS;
        if (ph < 0) ph += PERIOD_PS;
        taps[k] = (ph < PERIOD_PS / 2);
      end
      #(STEP);
    end
  end
endmodule
