// Self-checking test of opx_chip at reduced size (4 columns of 6 pixels,
// M = 2 columns per matrix controller, so 2 serial outputs; column buffers
// 2 deep so that they fill).
//
// Every pixel has a behavioural analog front end (opx_tac_model). Hits are
// fired at random pixels and times; for each the testbench predicts the
// 32-bit word from its own copy of the coarse counter (value during the hit's
// clock period + 2) and the time to the next falling clock edge (98 ps bins).
// Words are rebuilt from the serial outputs and matched per pixel in order.
// Mechanisms that must occur and are counted: words merged from both columns
// of a group, a pixel buffer overflow (lost hits, then lost = 1), a full
// column data buffer, and serializer back-pressure.
module opx_chip_tb;
  import gtk_pkg::*;
  localparam int NC = 4, NP = 6, M = 2, NG = 2, T = 6250;
  logic clk = 0, rst_n = 0;
  logic [NP-1:0] hit [NC];
  logic [NP-1:0] arm [NC], run [NC], cmp [NC];
  logic [1:0] rslot [NC][NP], aslot [NC][NP];
  logic [9:0] coarse_mon;
  logic [7:0] sd [NG];
  logic [NG-1:0] sv, sf;
  int checks = 0, failures = 0, nwords = 0;
  logic [9:0] tc = '0;
  opx_hit_word_t expq [NC][NP][$];
  int ev_merge = 0, ev_lost = 0, ev_colfull = 0, ev_serfull = 0;
  int last_col [NG] = '{default: -1};

  always #(T/2) clk = ~clk;
  always @(posedge clk) if (!rst_n) tc <= '0; else tc <= tc + 1'b1;

  opx_chip #(.NCOLS(NC), .NPIX(NP), .M(M), .LANES(8), .COL_DEPTH(2)) dut (
    .clk, .rst_n, .hit_i(hit), .ramp_arm_o(arm), .ramp_slot_o(rslot),
    .adc_run_o(run), .adc_slot_o(aslot), .adc_cmp_i(cmp), .coarse_o(coarse_mon),
    .ser_data_o(sd), .ser_valid_o(sv), .ser_first_o(sf)
  );

  for (genvar c = 0; c < NC; c++) begin : g_c
    for (genvar p = 0; p < NP; p++) begin : g_p
      opx_tac_model afe (.clk, .hit(hit[c][p]), .ramp_arm(arm[c][p]), .ramp_slot(rslot[c][p]),
                         .adc_run(run[c][p]), .adc_slot(aslot[c][p]), .adc_cmp(cmp[c][p]));
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Fire a hit on pixel (c,p) 'off' ps after the next rising edge. A hit is
  // stored when the pixel's buffers have room at that moment (ramp_arm);
  // otherwise it is lost and the next stored hit of the pixel has lost = 1.
  bit pend [NC][NP];
  longint busy_until [NC][NP];
  task automatic fire(input int c, input int p, input int off);
    opx_hit_word_t w;
    longint tf;
    @(posedge clk);
    #(off);
    busy_until[c][p] = $time + 4 * T;
    tf = ($time / T + 1) * T;
    w.lost = pend[c][p]; w.rsvd = 1'b0; w.col = 6'(c); w.pix = 6'(p);
    w.coarse = tc + 10'd2;
    w.fine = 8'((tf - $time) / 98);
    if (arm[c][p]) begin expq[c][p].push_back(w); pend[c][p] = 0; end
    else pend[c][p] = 1;
    hit[c][p] = 1'b1;
    #7000 hit[c][p] = 1'b0;
  endtask

  // Serial receivers.
  logic [31:0] acc [NG];
  int nch [NG] = '{default: 0};
  always @(posedge clk) if (rst_n) begin
    for (int g = 0; g < NG; g++) if (sv[g]) begin
      if (sf[g]) begin chk(nch[g] == 0, "frame alignment"); nch[g] = 0; end
      acc[g] = {acc[g][23:0], sd[g]};
      nch[g]++;
      if (nch[g] == 4) begin
        opx_hit_word_t w;
        int c, p;
        w = acc[g]; nch[g] = 0; nwords++;
        c = int'(w.col); p = int'(w.pix);
        chk(c / M == g && c < NC && p < NP, "word on the right link");
        if (c < NC && p < NP) begin
          chk(expq[c][p].size() > 0, "word expected");
          if (expq[c][p].size() > 0) begin
            chk(w == expq[c][p][0], "word content");
            if (w != expq[c][p][0]) $display("  got %h exp %h", w, expq[c][p][0]);
            void'(expq[c][p].pop_front());
          end
        end
        if (w.lost) ev_lost++;
        if (last_col[g] >= 0 && last_col[g] != c) ev_merge++;
        last_col[g] = c;
      end
    end
  end

  // Internal events, observed for coverage only.
  for (genvar c = 0; c < NC; c++) begin : g_evc
    always @(posedge clk) if (rst_n && dut.g_col[c].u_colctl.buf_full) ev_colfull++;
  end
  for (genvar g = 0; g < NG; g++) begin : g_evg
    always @(posedge clk) if (rst_n && !dut.g_grp[g].sr) ev_serfull++;
  end

  function automatic int pending();
    int n = 0;
    for (int c = 0; c < NC; c++) for (int p = 0; p < NP; p++) n += expq[c][p].size();
    return n;
  endfunction

  initial begin
    for (int c = 0; c < NC; c++) hit[c] = '0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    // random hits, one pixel at a time but many in flight
    for (int k = 0; k < 200; k++) begin
      fork automatic int c = $urandom_range(0, NC - 1), p = $urandom_range(0, NP - 1), o = $urandom_range(200, T - 200);
        if ($time > busy_until[c][p] + T) begin busy_until[c][p] = $time + 6 * T; fire(c, p, o); end
      join_none
      repeat ($urandom_range(3, 20)) @(posedge clk);
    end
    repeat (2000) @(posedge clk);
    chk(pending() == 0, "random hits delivered");
    // overflow at pixel (1,3): 6 hits 3 clocks apart with long ramps
    for (int k = 0; k < 6; k++) begin
      fire(1, 3, T / 2 + 100);
      @(posedge clk);
    end
    repeat (600) @(posedge clk);
    fire(1, 3, 500);
    repeat (300) @(posedge clk);
    // whole matrix at once: fills column buffers and the serializers
    for (int c = 0; c < NC; c++) for (int p = 0; p < NP; p++)
      fork automatic int cc = c, pp = p; fire(cc, pp, 300 + 100 * pp); join_none
    repeat (3000) @(posedge clk);
    chk(pending() == 0, "all words delivered");
    chk(ev_merge > 0, "columns merged by a matrix controller");
    chk(ev_lost > 0, "pixel overflow reported");
    chk(ev_colfull > 0, "column data buffer full");
    chk(ev_serfull > 0, "serializer back-pressure");
    $display("words=%0d merges=%0d lost=%0d colfull=%0d serfull=%0d", nwords, ev_merge, ev_lost, ev_colfull, ev_serfull);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
