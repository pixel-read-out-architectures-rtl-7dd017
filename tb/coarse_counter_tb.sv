// Self-checking test of coarse_counter: after reset the count equals the
// number of clock edges since reset, modulo 2^10, and wraps from 1023 to 0.
module coarse_counter_tb;
  logic clk = 0, rst_n = 0;
  logic [9:0] count;
  int checks = 0, failures = 0, wraps = 0;

  coarse_counter #(.WIDTH(10)) dut (.clk, .rst_n, .count);
  always #3125 clk = ~clk;  // 160 MHz

  initial begin
    repeat (2) @(posedge clk);
    #1000 checks++; if (count != 0) failures++;
    rst_n = 1;
    for (int n = 1; n <= 2500; n++) begin
      @(posedge clk); #1000;
      checks++;
      if (int'(count) != n % 1024) begin
        failures++;
        $display("FAIL edge %0d count %0d", n, count);
      end
      if (count == 0) wraps++;
    end
    checks++; if (wraps != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
