// Self-checking test of opx_column_ctrl (45 pixels, column number 5).
//
// The testbench models each pixel's output buffer as a queue that it fills
// with random words. Every 32-bit word leaving the column must carry the
// column number, the pixel's address, coarse, fine and lost flag unchanged,
// and each pixel's words must leave in order. A saturation phase with all 45
// pixels holding words and the output always read checks one word per clock
// and that 45 consecutive grants serve 45 different pixels (round robin).
// A stall phase (output not read) checks that the data buffer fills and the
// column stops reading pixels without losing words.
module opx_column_ctrl_tb;
  import gtk_pkg::*;
  localparam int NP = 45;
  logic clk = 0, rst_n = 0;
  logic [NP-1:0] pix_valid = '0, pix_rd;
  opx_pix_word_t pix_data [NP];
  logic col_valid, col_rd = 0;
  logic [31:0] col_data;
  int checks = 0, failures = 0;
  opx_pix_word_t pq [NP][$];
  opx_pix_word_t sent [NP][$];
  int grants[$];
  int nwords = 0, stall_cycles = 0;
  bit saturate = 0, feed = 1;
  int rd_pct = 60;

  always #5000 clk = ~clk;

  opx_column_ctrl #(.NPIX(NP), .COL_ID(6'd5), .BUF_DEPTH(8)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic opx_pix_word_t rnd_word(int p);
    opx_pix_word_t w;
    w.lost = 1'($urandom); w.addr = 6'(p); w.coarse = 10'($urandom); w.fine = 8'($urandom);
    return w;
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NP; p++) if (pix_rd[p]) begin
      chk(pq[p].size() > 0, "read of empty pixel");
      if (pq[p].size() > 0) begin sent[p].push_back(pq[p].pop_front()); grants.push_back(p); end
    end
    chk($countones(pix_rd) <= 1, "one pixel per clock");
    if (col_valid && col_rd) begin
      opx_hit_word_t w;
      int p;
      w = col_data;
      p = int'(w.pix);
      nwords++;
      chk(w.col == 6'd5 && w.rsvd == 1'b0, "column field");
      chk(p < NP && sent[p].size() > 0, "word from a read pixel");
      if (p < NP && sent[p].size() > 0) begin
        chk(w.coarse == sent[p][0].coarse && w.fine == sent[p][0].fine && w.lost == sent[p][0].lost, "word fields and order");
        void'(sent[p].pop_front());
      end
    end
    if (pix_valid != 0 && pix_rd == 0) stall_cycles++;
  end

  always @(negedge clk) begin
    for (int p = 0; p < NP; p++) begin
      if (feed && (saturate ? (pq[p].size() < 3) : ($urandom_range(0, 999) < 8))) pq[p].push_back(rnd_word(p));
      pix_valid[p] = (pq[p].size() > 0);
      pix_data[p]  = (pq[p].size() > 0) ? pq[p][0] : '0;
    end
    col_rd = ($urandom_range(0, 99) < rd_pct);
  end

  initial begin
    int n0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2000) @(posedge clk);
    // saturation: all pixels valid, output always read
    rd_pct = 100; saturate = 1;
    repeat (20) @(posedge clk);
    grants.delete();
    n0 = nwords;
    repeat (200) @(posedge clk);
    chk(nwords - n0 >= 195, "one word per clock at saturation");
    for (int s = 0; s + NP <= grants.size() && s < 100; s++) begin
      bit [NP-1:0] seen = '0;
      for (int k = 0; k < NP; k++) seen[grants[s+k]] = 1'b1;
      chk(seen == '1, "round robin covers all pixels");
    end
    // stall: output not read
    rd_pct = 0; stall_cycles = 0;
    repeat (100) @(posedge clk);
    chk(stall_cycles > 80, "column stops reading when its buffer is full");
    // drain
    saturate = 0; feed = 0; rd_pct = 100;
    repeat (3000) @(posedge clk);
    for (int p = 0; p < NP; p++) chk(sent[p].size() == 0 && pq[p].size() == 0, "all words delivered");
    chk(nwords > 500, "enough words");
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
