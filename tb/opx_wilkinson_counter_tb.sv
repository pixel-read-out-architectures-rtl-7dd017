// Self-checking test of opx_wilkinson_counter: a rundown model holds a charge
// of N steps and lowers it by one per clock while 'run' is high; the
// comparator is high while charge remains. The returned code must be N, done
// must come N+1 clocks after the cycle following 'start', and charges beyond
// 255 must saturate at 255.
module opx_wilkinson_counter_tb;
  logic clk = 0, rst_n = 0, start = 0, run, done;
  logic [7:0] code;
  int charge = 0;
  logic cmp;
  int checks = 0, failures = 0;

  opx_wilkinson_counter #(.WIDTH(8)) dut (.*);
  always #3125 clk = ~clk;
  assign cmp = (charge > 0);
  always @(posedge clk) if (run && charge > 0) charge <= charge - 1;

  task automatic convert(input int n);
    int cycles;
    @(negedge clk);
    charge = n;
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; end
    checks += 2;
    if (int'(code) != ((n > 255) ? 255 : n)) begin failures++; $display("FAIL code n=%0d got %0d", n, code); end
    if (n <= 255 && cycles != n + 1) begin failures++; $display("FAIL latency n=%0d got %0d", n, cycles); end
    @(negedge clk);
    checks++; if (done) failures++;  // single-cycle pulse
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    convert(0); convert(1); convert(7); convert(64); convert(255); convert(300);
    for (int i = 0; i < 30; i++) convert($urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
