// Self-checking test of sync_fifo: random pushes and pops (also on full and
// empty) against a queue reference, with a non-power-of-two depth so that
// pointer wrap-around is exercised. Checks data order, empty/full/count.
module sync_fifo_tb;
  localparam int W = 12, D = 5;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0, fulls = 0, empties = 0;
  logic [W-1:0] q[$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5000 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == D), "full");
      chk(int'(count) == q.size(), "count");
      if (q.size() > 0) chk(rd_data == q[0], "head data");
      if (full) fulls++;
      if (empty) empties++;
      wr_en   = ($urandom_range(0, 99) < (((i / 500) % 2) != 0 ? 70 : 35));
      rd_en   = ($urandom_range(0, 99) < (((i / 500) % 2) != 0 ? 35 : 70));
      wr_data = W'($urandom);
      @(posedge clk);
      #1000;
      begin
        int sz;
        sz = q.size();
        if (rd_en && sz > 0) void'(q.pop_front());
        if (wr_en && sz < D) q.push_back(wr_data);
      end
    end
    chk(fulls > 0 && empties > 0, "full and empty both reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
