// End-to-end test of gtk_readout_top at reduced size: the on-pixel TDC chip
// with 16 columns of 9 pixels (M = 8, so 2 serial links) and the
// end-of-column TDC chip with 4 columns of 9 TDCs, side by side. The default
// size (40 x 45 pixels, 40 EOC columns) builds too slowly in Verilator to
// simulate routinely, so it is checked only by lint and elaboration.
//
// On-pixel chip: every pixel has a behavioural analog front end. Hits are
// fired at random pixels, then all pixels of one matrix group at once, then a burst on one
// pixel. Each word is predicted from the testbench's own coarse counter
// (value during the hit's clock period + 2) and the time to the next falling
// clock edge in 98 ps bins; a hit that finds the pixel's buffers full
// (ramp_arm low) is lost and the next stored hit of that pixel has lost = 1.
// End-of-column chip: the behavioural DLL supplies the taps; pixels fire hit
// and address lines in every column, including overlapping pixels
// (ambiguous address) and double hits on one TDC (lost).
// Words from all serial outputs are decoded and matched per pixel or TDC.
// Mechanisms counted, each must occur: matrix merging of columns, pixel
// overflow, full column data buffer, serializer back-pressure; ambiguous
// EOC words, lost EOC hits, words from every EOC column.
module gtk_readout_top_tb;
  import gtk_pkg::*;
  // ---------------- on-pixel chip ----------------
  localparam int NC = 16, NP = 9, M = 8, NG = 2, T = 6250;
  logic oclk = 0, orst_n = 0;
  logic [NP-1:0] hit [NC];
  logic [NP-1:0] arm [NC], run [NC], cmp [NC];
  logic [1:0] rslot [NC][NP], aslot [NC][NP];
  logic [9:0] ocoarse;
  logic [7:0] osd [NG];
  logic [NG-1:0] osv, osf;
  logic [9:0] tc = '0;
  // ---------------- end-of-column chip ----------------
  localparam longint P = 3200, T0 = 1600;
  localparam int EC = 4;
  logic eclk = 0, erst_n = 1;
  logic [8:0] hl [EC];
  logic [4:0] al [EC];
  logic [31:0] taps;
  logic [5:0] ecoarse, ec = '0;
  logic esd [EC];
  logic [EC-1:0] esv, esf;
  logic [15:0] elost [EC];

  int checks = 0, failures = 0;

  always #(T/2) oclk = ~oclk;
  always #(P/2) eclk = ~eclk;
  always @(posedge oclk) if (!orst_n) tc <= '0; else tc <= tc + 1'b1;
  always @(posedge eclk) if (!erst_n) ec <= '0; else ec <= ec + 1'b1;

  gtk_readout_top #(.OPX_COLS(NC), .OPX_PIX(NP), .OPX_M(M), .EOC_COLS(EC)) dut (
    .opx_clk(oclk), .opx_rst_n(orst_n), .opx_hit(hit),
    .opx_ramp_arm(arm), .opx_ramp_slot(rslot), .opx_adc_run(run), .opx_adc_slot(aslot), .opx_adc_cmp(cmp),
    .opx_coarse(ocoarse), .opx_ser_data(osd), .opx_ser_valid(osv), .opx_ser_first(osf),
    .eoc_clk(eclk), .eoc_rst_n(erst_n), .eoc_hit_lines(hl), .eoc_addr_lines(al), .eoc_taps(taps),
    .eoc_coarse(ecoarse), .eoc_ser_data(esd), .eoc_ser_valid(esv), .eoc_ser_first(esf), .eoc_lost_cnt(elost)
  );

  for (genvar c = 0; c < NC; c++) begin : g_c
    for (genvar p = 0; p < NP; p++) begin : g_p
      opx_tac_model afe (.clk(oclk), .hit(hit[c][p]), .ramp_arm(arm[c][p]), .ramp_slot(rslot[c][p]),
                         .adc_run(run[c][p]), .adc_slot(aslot[c][p]), .adc_cmp(cmp[c][p]));
    end
  end
  eoc_dll_model #(.PERIOD_PS(P), .T0_PS(T0)) dll (.taps);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ================= on-pixel chip stimulus and checking =================
  opx_hit_word_t oq [NC][NP][$];
  bit pend [NC][NP];
  longint busy_until [NC][NP];
  int ev_merge = 0, ev_lost = 0, ev_colfull = 0, ev_serfull = 0, owords = 0;
  int last_col [NG] = '{default: -1};

  task automatic fire(input int c, input int p, input int off);
    opx_hit_word_t w;
    longint tf;
    @(posedge oclk);
    #(off);
    busy_until[c][p] = $time + 4 * T;
    tf = ($time / T + 1) * T;
    w.lost = pend[c][p]; w.rsvd = 1'b0; w.col = 6'(c); w.pix = 6'(p);
    w.coarse = tc + 10'd2;
    w.fine = 8'((tf - $time) / 98);
    if (arm[c][p]) begin oq[c][p].push_back(w); pend[c][p] = 0; end
    else pend[c][p] = 1;
    hit[c][p] = 1'b1;
    #7000 hit[c][p] = 1'b0;
  endtask

  logic [31:0] oacc [NG];
  int onch [NG] = '{default: 0};
  always @(posedge oclk) if (orst_n) begin
    for (int g = 0; g < NG; g++) if (osv[g]) begin
      if (osf[g]) begin chk(onch[g] == 0, "opx frame alignment"); onch[g] = 0; end
      oacc[g] = {oacc[g][23:0], osd[g]};
      onch[g]++;
      if (onch[g] == 4) begin
        opx_hit_word_t w;
        int c, p;
        w = oacc[g]; onch[g] = 0; owords++;
        c = int'(w.col); p = int'(w.pix);
        chk(c / M == g && c < NC && p < NP, "opx word on the right link");
        if (c < NC && p < NP) begin
          chk(oq[c][p].size() > 0, "opx word expected");
          if (oq[c][p].size() > 0) begin
            chk(w == oq[c][p][0], "opx word content");
            if (w != oq[c][p][0]) $display("  got %h exp %h", w, oq[c][p][0]);
            void'(oq[c][p].pop_front());
          end
        end
        if (w.lost) ev_lost++;
        if (last_col[g] >= 0 && last_col[g] != c) ev_merge++;
        last_col[g] = c;
      end
    end
  end

  for (genvar c = 0; c < NC; c++) begin : g_evc
    always @(posedge oclk) if (orst_n && dut.u_opx.g_col[c].u_colctl.buf_full) ev_colfull++;
  end
  for (genvar g = 0; g < NG; g++) begin : g_evg
    always @(posedge oclk) if (orst_n && !dut.u_opx.g_grp[g].sr) ev_serfull++;
  end

  function automatic int opending();
    int n = 0;
    for (int c = 0; c < NC; c++) for (int p = 0; p < NP; p++) n += oq[c][p].size();
    return n;
  endfunction

  task automatic run_opx();
    for (int c = 0; c < NC; c++) hit[c] = '0;
    repeat (4) @(posedge oclk);
    orst_n = 1;
    repeat (4) @(posedge oclk);
    for (int k = 0; k < 600; k++) begin
      fork automatic int c = $urandom_range(0, NC - 1), p = $urandom_range(0, NP - 1), o = $urandom_range(200, T - 200);
        if ($time > busy_until[c][p] + T) begin busy_until[c][p] = $time + 6 * T; fire(c, p, o); end
      join_none
      repeat ($urandom_range(1, 6)) @(posedge oclk);
    end
    repeat (1500) @(posedge oclk);
    chk(opending() == 0, "opx random hits delivered");
    // all pixels of matrix group 0 at once
    for (int c = 0; c < M; c++) for (int p = 0; p < NP; p++)
      fork automatic int cc = c, pp = p; fire(cc, pp, 300 + 100 * pp); join_none
    repeat (1500) @(posedge oclk);
    // overflow of one pixel
    for (int k = 0; k < 6; k++) begin fire(13, 8, T / 2 + 100); @(posedge oclk); end
    repeat (600) @(posedge oclk);
    fire(13, 8, 500);
    repeat (800) @(posedge oclk);
    chk(opending() == 0, "opx all words delivered");
    chk(ev_merge > 0, "opx columns merged by a matrix controller");
    chk(ev_lost > 0, "opx pixel overflow reported");
    chk(ev_colfull > 0, "opx column data buffer full");
    chk(ev_serfull > 0, "opx serializer back-pressure");
    $display("opx: words=%0d merges=%0d lost=%0d colfull=%0d serfull=%0d", owords, ev_merge, ev_lost, ev_colfull, ev_serfull);
  endtask

  // ================= end-of-column chip stimulus and checking =================
  int exp_elost [EC];
  int acnt [EC][5];
  eoc_hit_word_t eq [EC][9][$];
  int ewords = 0, namb = 0;
  int ecol_seen [EC];

  function automatic logic [4:0] ph(longint t);
    return 5'(((t - T0) % P) / 100);
  endfunction

  task automatic pixel(input int c, input int i, input int j, input int tot, input bit expect_word);
    eoc_hit_word_t w;
    #(140 - ($time % 100));
    acnt[c][j]++; al[c][j] = 1'b1;
    #10;
    w.tdc = 4'(i); w.addr = al[c]; w.amb = ($countones(al[c]) != 1);
    w.c_le = ec; w.f_le = ph($time);
    hl[c][i] = 1'b1;
    #(tot * 100);
    w.c_te = ec; w.f_te = ph($time);
    hl[c][i] = 1'b0;
    if (expect_word) eq[c][i].push_back(w); else exp_elost[c]++;
    #10;
    acnt[c][j]--; if (acnt[c][j] == 0) al[c][j] = 1'b0;
  endtask

  logic [31:0] eacc [EC];
  int enb [EC];
  always @(posedge eclk) if (erst_n) begin
    for (int c = 0; c < EC; c++) if (esv[c]) begin
      if (esf[c]) begin chk(enb[c] == 0, "eoc frame alignment"); enb[c] = 0; end
      eacc[c] = {eacc[c][30:0], esd[c]};
      enb[c]++;
      if (enb[c] == 32) begin
        eoc_hit_word_t w;
        w = eacc[c]; enb[c] = 0; ewords++; ecol_seen[c]++;
        if (w.amb) namb++;
        chk(int'(w.tdc) < 9 && eq[c][w.tdc].size() > 0, "eoc word expected");
        if (int'(w.tdc) < 9 && eq[c][w.tdc].size() > 0) begin
          chk(w == eq[c][w.tdc][0], "eoc word content");
          void'(eq[c][w.tdc].pop_front());
        end
      end
    end
  end

  function automatic int epending();
    int n = 0;
    for (int c = 0; c < EC; c++) for (int i = 0; i < 9; i++) n += eq[c][i].size();
    return n;
  endfunction

  task automatic run_eoc();
    for (int c = 0; c < EC; c++) begin
      hl[c] = '0; al[c] = '0; exp_elost[c] = 0; enb[c] = 0; ecol_seen[c] = 0;
      for (int j = 0; j < 5; j++) acnt[c][j] = 0;
    end
    #1 erst_n = 0;
    repeat (4) @(posedge eclk);
    erst_n = 1;
    repeat (4) @(posedge eclk);
    for (int k = 0; k < 20; k++) begin
      for (int c = 0; c < EC; c++)
        fork automatic int cc = c; pixel(cc, $urandom_range(0, 8), $urandom_range(0, 4), $urandom_range(20, 150), 1'b1); join_none
      #300000;
      if (k % 5 == 2) begin
        fork
          pixel(k % EC, 1, 0, 100, 1'b1);
          begin #2000; pixel(k % EC, 6, 4, 100, 1'b1); end
          begin pixel(EC - 1 - k % EC, 4, 2, 50, 1'b1); #1000; pixel(EC - 1 - k % EC, 4, 3, 50, 1'b0); end
        join
        #300000;
      end
    end
    repeat (2000) @(posedge eclk);
    chk(epending() == 0, "eoc all words delivered");
    for (int c = 0; c < EC; c++) chk(int'(elost[c]) == exp_elost[c], "eoc lost counter");
    for (int c = 0; c < EC; c++) chk(ecol_seen[c] >= 20, "eoc every column produced words");
    chk(namb > 0, "eoc ambiguous address seen");
    begin
      int nl = 0;
      for (int c = 0; c < EC; c++) nl += exp_elost[c];
      chk(nl > 0, "eoc lost hits seen");
      $display("eoc: words=%0d ambiguous=%0d lost=%0d", ewords, namb, nl);
    end
  endtask

  initial begin
    fork
      run_opx();
      run_eoc();
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge oclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
