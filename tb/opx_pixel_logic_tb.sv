// Self-checking test of opx_pixel_logic with the behavioural analog model.
//
// The testbench owns the coarse counter (160 MHz clock, period 6250 ps) and
// fires CFD hits at chosen times. For each hit at time t it predicts the word
// independently: coarse = counter value during the clock period of t, plus 2
// (synchroniser latency); fine = floor((next falling clock edge - t) / 98 ps).
// Phase 1: random, widely spaced hits with a random reader; every word must
// match, in order, with lost = 0, and appear within fine + 8 clocks of the hit.
// Phase 2: reader stopped, a burst of 8 hits 3 clocks apart, each with a long
// ramp; exactly 4 are stored (digital and analog buffers full), ramp_arm
// drops, the others are lost, and the first word after the burst's backlog
// carries lost = 1.
module opx_pixel_logic_tb;
  import gtk_pkg::*;
  localparam int T = 6250;
  logic clk = 0, rst_n = 0, hit = 0;
  logic [9:0] coarse = '0;
  logic ramp_arm, adc_run, adc_cmp, out_valid, out_rd = 0;
  logic [1:0] ramp_slot, adc_slot;
  opx_pix_word_t out_data;
  int checks = 0, failures = 0;
  bit reading = 1;
  opx_pix_word_t expq[$];
  longint cyc = 0;
  longint hit_cyc[$];
  int lat_fine[$];
  int arm_low = 0, late = 0;

  always #(T/2) clk = ~clk;
  always @(posedge clk) begin coarse <= coarse + 1'b1; cyc <= cyc + 1; end

  opx_pixel_logic #(.ADDR(6'd37)) dut (
    .clk, .rst_n, .hit_i(hit), .coarse_i(coarse),
    .ramp_arm_o(ramp_arm), .ramp_slot_o(ramp_slot),
    .adc_run_o(adc_run), .adc_slot_o(adc_slot), .adc_cmp_i(adc_cmp),
    .out_valid, .out_data, .out_rd
  );
  opx_tac_model #(.BIN_PS(98.0)) afe (
    .clk, .hit, .ramp_arm, .ramp_slot, .adc_run, .adc_slot, .adc_cmp
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Fire a hit 'off' ps after the next rising edge; optionally expect a word.
  task automatic fire(input int off, input bit expect_word, input bit lost_flag);
    opx_pix_word_t w;
    longint tf;
    @(posedge clk);
    #(off);
    tf = ($time / T + 1) * T;  // next falling edge (falling edges at multiples of T)
    w.lost = lost_flag;
    w.addr = 6'd37;
    w.coarse = coarse + 10'd2;
    w.fine = 8'(($time < tf ? tf - $time : tf + T - $time) / 98);
    if (expect_word) begin
      expq.push_back(w);
      hit_cyc.push_back(cyc);
      lat_fine.push_back(int'(w.fine));
    end
    hit = 1;
    #7000 hit = 0;
  endtask

  // Reader.
  always @(negedge clk) out_rd <= reading && ($urandom_range(0, 1) == 1);
  always @(posedge clk) if (rst_n && out_valid && out_rd) begin
    chk(expq.size() > 0, "unexpected word");
    if (expq.size() > 0) begin
      chk(out_data == expq[0], "word content");
      if (out_data != expq[0])
        $display("  got lost=%0d addr=%0d c=%0d f=%0d exp lost=%0d c=%0d f=%0d", out_data.lost,
                 out_data.addr, out_data.coarse, out_data.fine, expq[0].lost, expq[0].coarse, expq[0].fine);
      void'(expq.pop_front());
    end
  end
  // Conversion latency, phase 1 only (output buffer drained).
  always @(posedge clk) if (rst_n && dut.out_wr && hit_cyc.size() > 0) begin
    if (cyc - hit_cyc[0] > longint'(lat_fine[0] + 8)) late++;
    void'(hit_cyc.pop_front()); void'(lat_fine.pop_front());
  end
  always @(posedge clk) if (rst_n && !ramp_arm) arm_low++;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    // ---- phase 1 ----
    for (int i = 0; i < 60; i++) begin
      repeat ($urandom_range(80, 150)) @(posedge clk);
      fire($urandom_range(200, T - 200), 1'b1, 1'b0);
    end
    repeat (300) @(posedge clk);
    chk(expq.size() == 0, "phase 1 all words read");
    chk(late == 0, "phase 1 conversion latency");
    chk(arm_low == 0, "phase 1 no buffer full");
    // ---- phase 2: overflow ----
    hit_cyc.delete(); lat_fine.delete();
    reading = 0;
    for (int i = 0; i < 8; i++) begin
      fire(T / 2 + 100, i < 4, 1'b0);
      repeat (1) @(posedge clk);
    end
    repeat (400) @(posedge clk);
    chk(arm_low > 0, "buffers became full");
    chk(afe.ramps == 60 + 4, "analog model charged 4 capacitors in the burst");
    reading = 1;
    repeat (300) @(posedge clk);
    chk(expq.size() == 0, "burst backlog read");
    fire(1000, 1'b1, 1'b1);
    repeat (200) @(posedge clk);
    chk(expq.size() == 0, "word after overflow carries lost flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
