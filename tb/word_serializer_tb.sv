// Self-checking test of word_serializer: random 32-bit words offered with a
// random valid pattern are rebuilt from the chunk stream (LANES = 8, then a
// second instance with LANES = 1) and compared in order. With the buffer kept
// full the stream must be back to back: one word every 32/LANES clocks.
module word_serializer_tb;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, stalls = 0;
  always #5000 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- LANES = 8 ----
  logic in_valid8 = 0, in_ready8, sv8, sf8;
  logic [31:0] in_data8 = '0;
  logic [7:0] sd8;
  word_serializer #(.WORD_W(32), .LANES(8), .DEPTH(4)) dut8 (
    .clk, .rst_n, .in_valid(in_valid8), .in_data(in_data8), .in_ready(in_ready8),
    .ser_data(sd8), .ser_valid(sv8), .ser_first(sf8));

  // ---- LANES = 1 ----
  logic in_valid1 = 0, in_ready1, sv1, sf1;
  logic [31:0] in_data1 = '0;
  logic [0:0] sd1;
  word_serializer #(.WORD_W(32), .LANES(1), .DEPTH(2)) dut1 (
    .clk, .rst_n, .in_valid(in_valid1), .in_data(in_data1), .in_ready(in_ready1),
    .ser_data(sd1), .ser_valid(sv1), .ser_first(sf1));

  logic [31:0] exp8[$], exp1[$];
  int got8 = 0, got1 = 0;
  logic [31:0] acc8, acc1;
  int n8 = 0, n1 = 0;
  int first_cyc8[$];
  longint cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // receivers
  always @(posedge clk) if (rst_n) begin
    if (sv8) begin
      if (sf8) begin
        chk(n8 == 0, "lane8 frame start aligned");
        n8 = 0;
        first_cyc8.push_back(int'(cyc));
      end
      acc8 = {acc8[23:0], sd8};
      n8++;
      if (n8 == 4) begin
        chk(exp8.size() > 0 && acc8 == exp8[0], "lane8 word");
        if (exp8.size() > 0) void'(exp8.pop_front());
        got8++; n8 = 0;
      end
    end else chk(sd8 == 0, "lane8 idle zero");
    if (sv1) begin
      if (sf1) begin chk(n1 == 0, "lane1 frame start aligned"); n1 = 0; end
      acc1 = {acc1[30:0], sd1};
      n1++;
      if (n1 == 32) begin
        chk(exp1.size() > 0 && acc1 == exp1[0], "lane1 word");
        if (exp1.size() > 0) void'(exp1.pop_front());
        got1++; n1 = 0;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // burst: keep the LANES=8 buffer full to check back-to-back rate
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      in_valid8 = (i < 200) ? 1'b1 : ($urandom_range(0, 3) == 0);
      in_data8  = $urandom;
      in_valid1 = ($urandom_range(0, 9) == 0);
      in_data1  = $urandom;
      if (!in_ready8 && in_valid8) stalls++;
      @(posedge clk);
      if (in_valid8 && in_ready8) exp8.push_back(in_data8);
      if (in_valid1 && in_ready1) exp1.push_back(in_data1);
    end
    @(negedge clk); in_valid8 = 0; in_valid1 = 0;
    repeat (600) @(posedge clk);
    chk(exp8.size() == 0 && exp1.size() == 0, "all words delivered");
    chk(got8 > 60 && got1 > 10, "enough words");
    chk(stalls > 0, "back-pressure seen");
    // frames during the full-buffer burst are exactly 4 clocks apart
    for (int i = 1; i < 40; i++) chk(first_cyc8[i] - first_cyc8[i-1] == 4, "back-to-back frames");
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
