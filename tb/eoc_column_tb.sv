// Self-checking test of eoc_column (9 hit lines, 5 address lines, one serial
// lane) with the behavioural DLL model.
//
// Pixel 5*i + j fires hit line i and address line j together; the address
// line rises 10 ps before the hit line. The testbench predicts each word
// independently: TDC i, address lines = those high at the leading edge,
// coarse = its own counter at each edge, phase = DLL step of each edge, and
// amb = address not one-hot. Words are rebuilt from the serial stream and
// matched per TDC in order.
// Phase 1: random pixels at the document's peak column rate (4 M hits/s, one
//   hit every 250 ns on average), no overlap: no loss, all words exact.
// Phase 2: overlapping pixels on different hit lines: the later ones see two
//   address lines and must be flagged ambiguous.
// Phase 3: a second hit on the same hit line right after the first: lost,
//   counted by lost_cnt, and no word.
// Phase 4: all 9 lines at once, five times (FIFO backlog), drained completely.
module eoc_column_tb;
  import gtk_pkg::*;
  localparam longint P = 3200, T0 = 1600;
  logic clk = 0, rst_n = 1;
  logic [8:0] hit_lines = '0;
  logic [4:0] addr_lines = '0;
  logic [31:0] taps;
  logic [5:0] coarse = '0;
  logic [0:0] ser_data;
  logic ser_valid, ser_first;
  logic [15:0] lost_cnt;
  int checks = 0, failures = 0, nwords = 0, namb = 0, exp_lost = 0;
  int acnt [5] = '{default: 0};
  eoc_hit_word_t expq [9][$];
  logic [31:0] acc;
  int nbits = 0;

  always #(P/2) clk = ~clk;
  always @(posedge clk) coarse <= coarse + 1'b1;

  eoc_dll_model #(.PERIOD_PS(P), .T0_PS(T0)) dll (.taps);
  eoc_column dut (.clk, .rst_n, .hit_lines, .addr_lines, .taps, .coarse,
                  .ser_data, .ser_valid, .ser_first, .lost_cnt);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [4:0] ph(longint t);
    return 5'(((t - T0) % P) / 100);
  endfunction

  // Pixel pulse starting at the next ...40 ps point, 'tot' DLL steps long.
  task automatic pixel(input int i, input int j, input int tot, input bit expect_word);
    eoc_hit_word_t w;
    #(140 - ($time % 100));
    acnt[j]++; addr_lines[j] = 1'b1;
    #10;
    w.tdc = 4'(i);
    w.addr = addr_lines;
    w.amb = ($countones(addr_lines) != 1);
    w.c_le = coarse; w.f_le = ph($time);
    hit_lines[i] = 1'b1;
    #(tot * 100);
    w.c_te = coarse; w.f_te = ph($time);
    hit_lines[i] = 1'b0;
    if (expect_word) expq[i].push_back(w); else exp_lost++;
    #10;
    acnt[j]--; if (acnt[j] == 0) addr_lines[j] = 1'b0;
  endtask

  // Serial receiver.
  always @(posedge clk) if (rst_n && ser_valid) begin
    if (ser_first) begin chk(nbits == 0, "frame alignment"); nbits = 0; end
    acc = {acc[30:0], ser_data[0]};
    nbits++;
    if (nbits == 32) begin
      eoc_hit_word_t w;
      w = acc;
      nbits = 0;
      nwords++;
      if (w.amb) namb++;
      chk(int'(w.tdc) < 9 && expq[w.tdc].size() > 0, "word expected");
      if (int'(w.tdc) < 9 && expq[w.tdc].size() > 0) begin
        chk(w == expq[w.tdc][0], "word content");
        if (w != expq[w.tdc][0]) $display("  got %h exp %h", w, expq[w.tdc][0]);
        void'(expq[w.tdc].pop_front());
      end
    end
  end

  function automatic int pending();
    int n = 0;
    for (int i = 0; i < 9; i++) n += expq[i].size();
    return n;
  endfunction

  initial begin
    #1 rst_n = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    // phase 1: peak rate, 4 M hits/s on average
    for (int k = 0; k < 300; k++) begin
      int tot;
      tot = $urandom_range(20, 150);
      pixel($urandom_range(0, 8), $urandom_range(0, 4), tot, 1'b1);
      #($urandom_range(100000, 400000) - tot * 100);
    end
    repeat (200) @(posedge clk);
    chk(pending() == 0 && lost_cnt == 0, "peak rate without loss");
    // phase 2: overlapping hits on different lines
    for (int k = 0; k < 20; k++) begin
      int i1, i2;
      i1 = $urandom_range(0, 8);
      i2 = (i1 + $urandom_range(1, 8)) % 9;
      fork
        pixel(i1, $urandom_range(0, 4), 100, 1'b1);
        begin #3000; pixel(i2, $urandom_range(0, 4), 100, 1'b1); end
      join
      #200000;
    end
    chk(namb > 0, "ambiguous words seen");
    // phase 3: second hit on a busy TDC
    for (int k = 0; k < 10; k++) begin
      int i;
      i = $urandom_range(0, 8);
      pixel(i, 2, 60, 1'b1);
      #1000;
      pixel(i, 3, 60, 1'b0);
      #300000;
    end
    // phase 4: all lines at once
    for (int r = 0; r < 5; r++) begin
      for (int i = 0; i < 9; i++) fork automatic int ii = i; pixel(ii, ii % 5, 80 + ii, 1'b1); join_none
      #1500000;
    end
    repeat (3000) @(posedge clk);
    chk(pending() == 0, "all words delivered");
    chk(int'(lost_cnt) == exp_lost, "lost counter");
    $display("words=%0d ambiguous=%0d lost=%0d", nwords, namb, lost_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
