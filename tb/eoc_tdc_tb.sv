// Self-checking test of eoc_tdc with the behavioural DLL model.
//
// Clock 312.5 MHz stand-in for 320 MHz (period 3200 ps, so one DLL step is
// exactly 100 ps), rising edges at 1600 + n*3200 ps. The testbench drives the
// 6-bit coarse bus from its own counter and places both edges of each hit
// pulse in the middle of a DLL step. For an edge at time t it expects
// coarse = counter value at t and phase = floor(((t - 1600) mod 3200) / 100).
// Checked: both hit registers (encoded and raw), address lines, 'ready'
// within 3 clocks of the trailing edge, one lost pulse for a leading edge
// that arrives while the previous hit is unread, and no change of the stored
// record by that lost hit.
module eoc_tdc_tb;
  import gtk_pkg::*;
  localparam longint P = 3200, T0 = 1600;
  logic clk = 0, rst_n = 1, hit_line = 0, rd = 0;
  logic [31:0] taps;
  logic [5:0] coarse = '0;
  logic [4:0] addr_lines = '0;
  logic ready, dec_ok, lost_pulse;
  logic [4:0] addr, f_le, f_te;
  logic [5:0] c_le, c_te;
  logic [31:0] hr_le, hr_te;
  int checks = 0, failures = 0, lost = 0;

  always #(P/2) clk = ~clk;
  always @(posedge clk) coarse <= coarse + 1'b1;
  always @(posedge clk) if (rst_n && lost_pulse) lost++;

  eoc_dll_model #(.PERIOD_PS(P), .T0_PS(T0)) dll (.taps);
  eoc_tdc dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int ph(longint t);
    return int'(((t - T0) % P) / 100);
  endfunction

  // One pixel pulse: leading edge 'wait_le' ps from now rounded to mid-step,
  // width 'tot' whole steps. Returns the expected values.
  task automatic pulse(input int wait_le, input int tot, input logic [4:0] a,
                       output logic [5:0] ec1, output int ef1, output logic [5:0] ec2, output int ef2,
                       output longint t_te);
    #(wait_le);
    #(150 - ($time % 100));      // now at ...50, middle of a DLL step
    addr_lines = a;
    #10;
    ec1 = coarse; ef1 = ph($time);
    hit_line = 1;
    #(tot * 100);
    ec2 = coarse; ef2 = ph($time);
    hit_line = 0;
    t_te = $time;
    #20 addr_lines = '0;
  endtask

  initial begin
    logic [5:0] c1, c2, d1, d2;
    int f1, f2, g1, g2;
    longint tte, tte2, tready;
    #1 rst_n = 0;  // falling edge for the asynchronously reset flops
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      logic [4:0] a;
      a = 5'b1 << $urandom_range(0, 4);
      pulse($urandom_range(0, 5000), $urandom_range(30, 400), a, c1, f1, c2, f2, tte);
      wait (ready);
      tready = $time;
      chk(tready - tte <= 3 * P + 100, "ready within 3 clocks of trailing edge");
      chk(c_le == c1 && int'(f_le) == f1, "leading edge time");
      chk(c_te == c2 && int'(f_te) == f2, "trailing edge time");
      chk(addr == a && dec_ok, "address lines and decode");
      chk(hr_le[f1] && !hr_le[(f1 + 1) % 32] && $countones(hr_le) == 16, "raw hit register 1");
      if (!(hr_le[f1] && !hr_le[(f1 + 1) % 32])) $display("i=%0d f1=%0d hr_le=%h t=%0d c=%0d/%0d", i, f1, hr_le, tte, c_le, c1);
      chk(hr_te[f2] && !hr_te[(f2 + 1) % 32] && $countones(hr_te) == 16, "raw hit register 2");
      if (i % 20 == 5) begin
        // second hit while unread: must be lost and leave the record alone
        pulse(2000, 50, 5'b00001, d1, g1, d2, g2, tte2);
        repeat (4) @(posedge clk);
        chk(c_le == c1 && int'(f_le) == f1 && c_te == c2 && int'(f_te) == f2 && addr == a, "record kept");
      end
      @(negedge clk) rd = 1;
      @(negedge clk) rd = 0;
      chk(!ready, "ready cleared by read");
    end
    repeat (5) @(posedge clk);
    chk(lost == 10, "lost pulses");

    $display("lost=%0d", lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
