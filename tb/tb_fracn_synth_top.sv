// tb_fracn_synth_top: end-to-end test of the synthesizer core at its default
// sizes.
//
// The divider input is a differential clock with a half-period of 1 ns, so a
// div_out period in ns is the VCO division ratio (64 + code with the external
// divide-by-2). The 20 MHz reference clocks the serial port. The test:
//   1. loads a carrier word and gain code through the serial port;
//   2. runs unmodulated: every divider period must equal 64 + the code shown at
//      its start, the codes must match an independent model of adder plus
//      second-order MASH converter (10 div_out cycles of latency), and the mean
//      ratio over 2048 periods must equal 64 + carrier/1024;
//   3. runs with a modulation waveform (NRZ data at one symbol per 8 divider
//      periods, i.e. 2.5 Mb/s at 20 MHz, smoothed by a moving average), with the
//      same per-period checks;
//   4. reloads another carrier and gain (a channel change) and checks again.
// The model runs from reset alongside the design and follows the carrier word
// from the reference edge at which it is loaded, so channel changes are
// checked cycle by cycle too.
// The divider here runs at about 11 MHz against the 20 MHz reference, so the
// phase/frequency detector must show frequency detection: phi high more than
// 80% of the time, held high through divider edges, with phi_b its complement.
// It counts each mechanism: serial loads, gain updates, fractional dithering,
// the four fast-stage moduli (2, 2.5, 3, 3.5), stretching by each
// divide-by-2/3 cell, and positive and negative modulation. A mechanism that
// never happens counts as a failure.
`timescale 1ns/1ps
module tb_fracn_synth_top;

  localparam int LAT = 10;   // adder register + converter pipeline

  // Reference edges fall on half nanoseconds, divider input edges on whole
  // ones, so a configuration load never coincides with a div_out edge.
  logic ref_clk = 1'b0;
  initial begin
    #0.5;
    forever #25 ref_clk = ~ref_clk;
  end
  logic vco2_p = 1'b0;
  logic vco2_n;
  assign vco2_n = ~vco2_p;
  always #1 vco2_p = ~vco2_p;

  // Reset is pulsed (1 -> 0 -> 1) so the asynchronous resets see an edge.
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  logic ser_data = 1'b0, ser_en = 1'b0, ser_load = 1'b0;
  logic signed [15:0] modulation = '0;
  logic       div_out;
  logic       phi, phi_b;
  logic [4:0] gain_adjust;
  logic [5:0] div_code;

  fracn_synth_top dut (
    .ref_clk, .rst_n, .ser_data, .ser_en, .ser_load, .modulation,
    .vco2_p, .vco2_n, .div_out, .phi, .phi_b, .gain_adjust, .div_code
  );

  int checks = 0;
  int failures = 0;

  // Mechanism counters.
  int n_loads = 0, n_gain_ok = 0, n_dither = 0, n_mod_pos = 0, n_mod_neg = 0;
  int n_fast [4] = '{0, 0, 0, 0};
  int n_cell [4] = '{0, 0, 0, 0};

  // Detector output statistics, sampled every 1 ns.
  longint phi_high = 0, phi_total = 0;
  int     n_phi_sat = 0;
  always #1 if (rst_n) begin
    phi_total++;
    if (phi) phi_high++;
    if (phi_b === phi) begin
      failures++;
      checks++;
    end
  end
  always @(posedge div_out) if (phi) n_phi_sat++;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // ---- independent model of adder + MASH, one step per div_out edge ----
  logic [15:0] carrier_word = '0;
  logic [9:0]  f1 = '0, f2 = '0;
  logic        c2_prev = 1'b0;
  logic [5:0]  yhist [LAT+1];   // yhist[0]: newest model output
  logic [15:0] xq = '0;         // adder register
  bit          model_on = 1'b0;

  function automatic logic [5:0] mash_step(input logic [15:0] x);
    logic [10:0] t1, t2;
    logic [5:0]  y;
    t1 = {1'b0, f1} + {1'b0, x[9:0]};
    f1 = t1[9:0];
    t2 = {1'b0, f2} + {1'b0, f1};
    f2 = t2[9:0];
    y = x[15:10] + 6'(t1[10]) + 6'(t2[10]) - 6'(c2_prev);
    c2_prev = t2[10];
    return y;
  endfunction

  // ---- per-period measurement ----
  int unsigned last_rise = 0;
  int          nper = 0;
  logic [5:0]  code_at_start = '0;
  longint      sum_ratio = 0;
  int          sum_count = 0;
  bit          per_check = 1'b0;

  always @(posedge div_out) begin
    int unsigned now;
    int unsigned period;
    now = int'($realtime);
    period = now - last_rise;
    if (per_check) begin
      checks++;
      if (period != 64 + int'(code_at_start))
        fail($sformatf("period %0d: %0d, expected 64+%0d", nper, period, code_at_start));
      sum_ratio += period;
      sum_count++;
      if (code_at_start[1:0] != 0) n_fast[code_at_start[1:0]]++;
      else n_fast[0]++;
      for (int i = 0; i < 4; i++) if (code_at_start[i+2]) n_cell[i]++;
    end
    last_rise = now;
    nper++;
    // Model: the adder register takes carrier+modulation at this edge; the
    // converter takes the previous adder value.
    if (model_on) begin
      for (int i = LAT; i > 0; i--) yhist[i] = yhist[i-1];
      yhist[0] = mash_step(xq);
    end
    xq = carrier_word + 16'(modulation);
    #0.2;
    code_at_start = div_code;
    if (model_on && per_check) begin
      checks++;
      if (div_code !== yhist[LAT-1])
        fail($sformatf("code after edge %0d: %0d, model %0d", nper, div_code, yhist[LAT-1]));
      if (div_code != carrier_word[15:10] + 6'(modulation >>> 10)) n_dither++;
    end
  end

  // ---- serial port ----
  task automatic serial_load(input logic [4:0] g, input logic [15:0] c);
    logic [20:0] w;
    w = {g, c};
    @(negedge ref_clk);
    for (int b = 20; b >= 0; b--) begin
      ser_en = 1'b1;
      ser_data = w[b];
      @(negedge ref_clk);
    end
    ser_en = 1'b0;
    ser_load = 1'b1;
    @(posedge ref_clk);
    carrier_word = c;   // the word the adder sees from now on
    @(negedge ref_clk);
    ser_load = 1'b0;
    n_loads++;
    checks++;
    if (gain_adjust !== g) fail($sformatf("gain %0d expected %0d", gain_adjust, g));
    else n_gain_ok++;
  endtask

  task automatic mean_check(input logic [15:0] c, input int n);
    longint lo, hi;
    sum_ratio = 0;
    sum_count = 0;
    repeat (n) @(posedge div_out);
    #0.5;
    // sum of (ratio - 64) over n periods against n * c / 1024, within 3 codes
    lo = longint'(sum_count) * 64 * 1024 + longint'(sum_count) * c - 3 * 1024;
    hi = lo + 6 * 1024;
    checks++;
    if (sum_ratio * 1024 < lo || sum_ratio * 1024 > hi)
      fail($sformatf("mean ratio: %0d periods sum %0d, carrier %h", sum_count, sum_ratio, c));
    else
      $display("mean division ratio %0.4f over %0d periods (expected %0.4f)",
               real'(sum_ratio) / sum_count, sum_count, 64.0 + real'(c) / 1024.0);
  endtask

  // Modulation: NRZ symbols of 8 divider periods, smoothed by a moving
  // average of 4 values taken every 2 periods.
  logic signed [15:0] taps [4];
  int sym_cnt = 0;
  logic signed [15:0] bit_val = '0;
  bit mod_on = 1'b0;
  always @(posedge div_out) begin
    #0.3;
    if (mod_on) begin
      if (sym_cnt % 2 == 0) begin   // filter steps every 2 periods
        for (int i = 3; i > 0; i--) taps[i] = taps[i-1];
        if (sym_cnt % 8 == 0) bit_val = ($urandom % 2) ? 16'sd2400 : -16'sd2400;  // +-2.34 codes
        taps[0] = bit_val;
        modulation = (taps[0] + taps[1] + taps[2] + taps[3]) >>> 2;
        if (modulation > 0) n_mod_pos++;
        if (modulation < 0) n_mod_neg++;
      end
      sym_cnt++;
    end else begin
      modulation = '0;
    end
  end

  localparam logic [15:0] CARRIER_A = 16'd26 * 1024 + 16'd333;  // 1.8063 GHz
  localparam logic [15:0] CARRIER_B = 16'd30 * 1024 + 16'd700;  // 1.8937 GHz

  initial begin : run
    for (int i = 0; i < 4; i++) taps[i] = '0;
    for (int i = 0; i <= LAT; i++) yhist[i] = '0;
    model_on = 1'b1;
    #20 rst_n = 1'b1;
    repeat (LAT + 3) @(posedge div_out);
    #0.5 per_check = 1'b1;
    serial_load(5'd19, CARRIER_A);
    repeat (LAT + 3) @(posedge div_out);
    mean_check(CARRIER_A, 2048);
    mod_on = 1'b1;
    repeat (2000) @(posedge div_out);
    mod_on = 1'b0;
    serial_load(5'd7, CARRIER_B);
    repeat (LAT + 3) @(posedge div_out);
    mean_check(CARRIER_B, 2048);
    // mechanism report
    $display("loads=%0d gain_ok=%0d dither=%0d mod+=%0d mod-=%0d", n_loads, n_gain_ok,
             n_dither, n_mod_pos, n_mod_neg);
    $display("fast stage /2 /2.5 /3 /3.5: %0d %0d %0d %0d", n_fast[0], n_fast[1], n_fast[2], n_fast[3]);
    $display("cell stretches D2..D5: %0d %0d %0d %0d", n_cell[0], n_cell[1], n_cell[2], n_cell[3]);
    $display("detector: phi high %0.3f of the time, held through %0d divider edges",
             real'(phi_high) / real'(phi_total), n_phi_sat);
    checks++; if (real'(phi_high) / real'(phi_total) < 0.8) fail("detector did not detect the frequency error");
    checks++; if (n_phi_sat == 0) fail("detector never saturated");
    checks++; if (n_loads < 2 || n_gain_ok < 2) fail("serial load not exercised");
    checks++; if (n_dither == 0) fail("no fractional dithering");
    checks++; if (n_mod_pos == 0 || n_mod_neg == 0) fail("modulation not exercised");
    for (int i = 0; i < 4; i++) begin
      checks++; if (n_fast[i] == 0) fail($sformatf("fast-stage modulus %0d never used", i));
      checks++; if (n_cell[i] == 0) fail($sformatf("cell D%0d never stretched", i + 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
