// Self-checking test of opx_matrix_ctrl (M = 8 columns).
//
// Each column's data buffer is modelled as a queue of random 32-bit words
// tagged with the column number. The merged stream must deliver every word
// exactly once, in order per column, only when out_ready is high, one per
// clock at most; with all columns busy and out_ready high, 8 consecutive
// grants must come from 8 different columns.
module opx_matrix_ctrl_tb;
  localparam int M = 8;
  logic clk = 0, rst_n = 0;
  logic [M-1:0] col_valid = '0, col_rd;
  logic [31:0] col_data [M];
  logic out_valid, out_ready = 0;
  logic [31:0] out_data;
  int checks = 0, failures = 0, nwords = 0;
  logic [31:0] cq [M][$];
  int grants[$];
  bit saturate = 0, feed = 1;
  int rdy_pct = 50;

  always #5000 clk = ~clk;
  opx_matrix_ctrl #(.M(M)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    chk($countones(col_rd) <= 1, "one column per clock");
    chk(!(col_rd != 0 && !out_ready), "no read without out_ready");
    if (out_valid && out_ready) begin
      int c;
      c = int'(out_data[29:24]);
      chk(c < M && cq[c].size() > 0 && col_rd[c], "word source");
      if (c < M && cq[c].size() > 0) begin
        chk(out_data == cq[c][0], "word order per column");
        void'(cq[c].pop_front());
        grants.push_back(c);
      end
      nwords++;
    end
  end

  always @(negedge clk) begin
    for (int c = 0; c < M; c++) begin
      if (feed && (saturate ? cq[c].size() < 2 : $urandom_range(0, 99) < 6))
        cq[c].push_back({2'b00, 6'(c), 24'($urandom)});
      col_valid[c] = cq[c].size() > 0;
      col_data[c]  = (cq[c].size() > 0) ? cq[c][0] : '0;
    end
    out_ready = ($urandom_range(0, 99) < rdy_pct);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2000) @(posedge clk);
    saturate = 1; rdy_pct = 100;
    repeat (10) @(posedge clk);
    grants.delete();
    repeat (100) @(posedge clk);
    for (int s = 0; s + M <= grants.size(); s++) begin
      bit [M-1:0] seen = '0;
      for (int k = 0; k < M; k++) seen[grants[s+k]] = 1'b1;
      chk(seen == '1, "round robin over columns");
    end
    chk(grants.size() >= 98, "one word per clock at saturation");
    saturate = 0; feed = 0;
    repeat (500) @(posedge clk);
    for (int c = 0; c < M; c++) chk(cq[c].size() == 0, "all delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
