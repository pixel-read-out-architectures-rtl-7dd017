// Self-checking test of eoc_chip at reduced size (3 columns).
//
// Same prediction rules as the column test (address lines at the leading
// edge, coarse from the testbench's own copy of the chip counter, DLL step of
// each edge), here with the chip's internal 6-bit counter and shared DLL taps,
// and hits in several columns at the same time. Each column's serial output
// is decoded separately. Checked: every word, per-column lost counters, and
// that ambiguous words, lost hits and simultaneous hits in all columns occur.
module eoc_chip_tb;
  import gtk_pkg::*;
  localparam longint P = 3200, T0 = 1600;
  localparam int NC = 3;
  logic clk = 0, rst_n = 1;
  logic [8:0] hl [NC];
  logic [4:0] al [NC];
  logic [31:0] taps;
  logic [5:0] coarse_mon, tc = '0;
  logic [0:0] sd [NC];
  logic [NC-1:0] sv, sf;
  logic [15:0] lost_cnt [NC];
  int checks = 0, failures = 0, nwords = 0, namb = 0;
  int exp_lost [NC] = '{default: 0};
  int acnt [NC][5];
  eoc_hit_word_t expq [NC][9][$];

  always #(P/2) clk = ~clk;
  always @(posedge clk) if (!rst_n) tc <= '0; else tc <= tc + 1'b1;

  eoc_dll_model #(.PERIOD_PS(P), .T0_PS(T0)) dll (.taps);
  eoc_chip #(.NCOLS(NC)) dut (.clk, .rst_n, .hit_lines(hl), .addr_lines(al), .taps, .coarse_o(coarse_mon),
                              .ser_data(sd), .ser_valid(sv), .ser_first(sf), .lost_cnt);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [4:0] ph(longint t);
    return 5'(((t - T0) % P) / 100);
  endfunction

  task automatic pixel(input int c, input int i, input int j, input int tot, input bit expect_word);
    eoc_hit_word_t w;
    #(140 - ($time % 100));
    acnt[c][j]++; al[c][j] = 1'b1;
    #10;
    w.tdc = 4'(i); w.addr = al[c]; w.amb = ($countones(al[c]) != 1);
    w.c_le = tc; w.f_le = ph($time);
    hl[c][i] = 1'b1;
    #(tot * 100);
    w.c_te = tc; w.f_te = ph($time);
    hl[c][i] = 1'b0;
    if (expect_word) expq[c][i].push_back(w); else exp_lost[c]++;
    #10;
    acnt[c][j]--; if (acnt[c][j] == 0) al[c][j] = 1'b0;
  endtask

  logic [31:0] acc [NC];
  int nb [NC] = '{default: 0};
  int cols_seen [NC] = '{default: 0};
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NC; c++) if (sv[c]) begin
      if (sf[c]) begin chk(nb[c] == 0, "frame alignment"); nb[c] = 0; end
      acc[c] = {acc[c][30:0], sd[c][0]};
      nb[c]++;
      if (nb[c] == 32) begin
        eoc_hit_word_t w;
        w = acc[c]; nb[c] = 0; nwords++; cols_seen[c]++;
        if (w.amb) namb++;
        chk(int'(w.tdc) < 9 && expq[c][w.tdc].size() > 0, "word expected");
        if (int'(w.tdc) < 9 && expq[c][w.tdc].size() > 0) begin
          chk(w == expq[c][w.tdc][0], "word content");
          void'(expq[c][w.tdc].pop_front());
        end
      end
    end
  end

  function automatic int pending();
    int n = 0;
    for (int c = 0; c < NC; c++) for (int i = 0; i < 9; i++) n += expq[c][i].size();
    return n;
  endfunction

  initial begin
    for (int c = 0; c < NC; c++) begin hl[c] = '0; al[c] = '0; for (int j = 0; j < 5; j++) acnt[c][j] = 0; end
    #1 rst_n = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    for (int k = 0; k < 60; k++) begin
      // one hit in every column at once, random pixel
      for (int c = 0; c < NC; c++)
        fork automatic int cc = c; pixel(cc, $urandom_range(0, 8), $urandom_range(0, 4), $urandom_range(20, 150), 1'b1); join_none
      #300000;
      if (k % 10 == 3) begin
        // ambiguous pair in column 0, lost hit in column 2
        fork
          pixel(0, 1, 0, 100, 1'b1);
          begin #2000; pixel(0, 6, 4, 100, 1'b1); end
          begin pixel(2, 4, 2, 50, 1'b1); #1000; pixel(2, 4, 3, 50, 1'b0); end
        join
        #300000;
      end
    end
    repeat (2000) @(posedge clk);
    chk(pending() == 0, "all words delivered");
    for (int c = 0; c < NC; c++) chk(int'(lost_cnt[c]) == exp_lost[c], "lost counter");
    for (int c = 0; c < NC; c++) chk(cols_seen[c] >= 60, "every column produced words");
    chk(namb > 0 && exp_lost[2] > 0, "ambiguous and lost hits occurred");
    $display("words=%0d ambiguous=%0d lost=%0d", nwords, namb, lost_cnt[2]);
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
