// Self-checking test of eoc_fine_encoder: for every phase 0..31 the tap
// pattern of a 50 %-duty clock (16 ones ending at tap phi, circularly) must
// encode to phi; patterns with a one-tap bubble must still give the lowest
// boundary; all-zero and all-one patterns must be flagged invalid.
module eoc_fine_encoder_tb;
  logic [31:0] taps;
  logic [4:0]  phase;
  logic        valid;
  int checks = 0, failures = 0;

  eoc_fine_encoder dut (.taps, .phase, .valid);

  function automatic logic [31:0] pattern(int phi);
    logic [31:0] t = '0;
    for (int k = 0; k < 16; k++) t[(phi - k + 32) % 32] = 1'b1;
    return t;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s phase=%0d valid=%0d taps=%h", what, phase, valid, taps); end
  endtask

  initial begin
    for (int phi = 0; phi < 32; phi++) begin
      taps = pattern(phi); #1;
      chk(valid && int'(phase) == phi, "clean pattern");
    end
    taps = '0; #1; chk(!valid && phase == 0, "all zero");
    taps = '1; #1; chk(!valid, "all one");
    // bubble: a zero inside the run adds a second boundary below phi
    taps = pattern(20); taps[10] = 1'b0; #1;
    chk(valid && phase == 5'd9, "bubble lowest boundary");
    taps = pattern(3); #1; chk(valid && phase == 5'd3, "wrap-around run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
