// tb_gfsk_loop: 2.5 Mb/s GFSK through the closed loop, with and without the
// compensation filter.
//
// The synthesizer core runs inside the behavioural loop model
// (pll_loop_model, natural frequency about 84 kHz), locked at 1850 MHz. Random
// bits at 2.5 Mb/s (8 reference periods per bit) are Gaussian filtered
// (BT = 0.5) to a peak deviation of 668 kHz. They are then either used as they
// are or passed through a compensation filter: the inverse of a second-order
// low-pass with damping 0.707. Its f0 is matched to the loop model, not set to
// the 84 kHz natural frequency. Above its 127 kHz filter pole the model's closed
// loop falls as 2*zeta*wn*wp/s^2, the same as a second-order roll-off with
// f0 = sqrt(2*0.7*84*127) kHz, about 122 kHz. This is what 2.5 Mb/s data sees. The VCO frequency is read once per
// reference period. For every delay from 0 to 79 periods, the frequency at bit
// centres is compared with the transmitted bits, and the best delay is kept.
// Required: with compensation at least 97% of the bits come out with the right
// sign, and the mean deviation at bit centres is 300..1200 kHz. Without
// compensation the loop is far too slow for 2.5 Mb/s, and the eye must be
// clearly worse (fewer correct bits, or a mean deviation below half the
// compensated one).
`timescale 1ns/1ps
module tb_gfsk_loop;

  localparam int    SPB      = 8;
  localparam int    NTAP     = 3 * SPB + 1;
  localparam real   BT       = 0.5;
  localparam real   DEV_LSB  = 668.0e3 / (20.0e6 / 1024.0);
  localparam real   FS       = 20.0e6;
  localparam real   F0       = 122.0e3;
  localparam real   ZETA     = 0.707;
  localparam real   PI       = 3.14159265358979;
  localparam logic [15:0] CARRIER = 16'd28 * 1024 + 16'd512;   // 1850 MHz
  localparam real   F_C      = 1850.0;
  localparam int    NBITS    = 240;
  localparam int    NS       = NBITS * SPB;
  localparam int    MAXD     = 80;

  logic ref_clk = 1'b0;
  initial begin
    #0.5;
    forever #25 ref_clk = ~ref_clk;
  end

  logic rst_n = 1'b1;
  logic ser_data = 1'b0, ser_en = 1'b0, ser_load = 1'b0;
  logic signed [15:0] modulation = '0;
  logic       vco2_p, vco2_n;
  logic       div_out, phi, phi_b;
  logic [4:0] gain_adjust;
  logic [5:0] div_code;
  real        f_vco_mhz;

  fracn_synth_top dut (
    .ref_clk, .rst_n, .ser_data, .ser_en, .ser_load, .modulation,
    .vco2_p, .vco2_n, .div_out, .phi, .phi_b, .gain_adjust, .div_code
  );

  pll_loop_model #(.F_FREE_MHZ(1845.0)) u_loop (
    .ref_clk, .phi, .gain(gain_adjust), .vco2_p, .vco2_n, .f_vco_mhz
  );

  int checks = 0;
  int failures = 0;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // Gaussian taps, unit sum.
  real taps [NTAP];
  initial begin
    real sigma, tot;
    sigma = $sqrt($ln(2.0)) / (2.0 * PI * BT) * SPB;
    tot = 0.0;
    for (int k = 0; k < NTAP; k++) begin
      taps[k] = $exp(-((k - NTAP / 2) ** 2) / (2.0 * sigma * sigma));
      tot += taps[k];
    end
    for (int k = 0; k < NTAP; k++) taps[k] /= tot;
  end

  real nrz [NTAP];
  real g1, g2;
  int  bits [NBITS];
  real fv [NS];

  function automatic logic signed [15:0] sample(input int n, input bit comp);
    real g, c;
    for (int k = NTAP - 1; k > 0; k--) nrz[k] = nrz[k-1];
    nrz[0] = (bits[n / SPB] != 0) ? 1.0 : -1.0;
    g = 0.0;
    for (int k = 0; k < NTAP; k++) g += taps[k] * nrz[k];
    g *= DEV_LSB;
    if (comp)
      c = g + 2.0 * ZETA * FS / (2.0 * PI * F0) * (g - g1)
            + (FS / (2.0 * PI * F0)) ** 2 * (g - 2.0 * g1 + g2);
    else
      c = g;
    g2 = g1;
    g1 = g;
    return 16'($rtoi(c + (c >= 0.0 ? 0.5 : -0.5)));
  endfunction

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
    @(negedge ref_clk);
    ser_load = 1'b0;
  endtask

  // Runs one stream; returns fraction of correct bits and mean |deviation|.
  task automatic run(input bit comp, output real correct, output real dev_khz, output int delay);
    real best, best_dev, d_sum;
    int  ok;
    for (int k = 0; k < NTAP; k++) nrz[k] = -1.0;
    g1 = -DEV_LSB; g2 = -DEV_LSB;
    for (int b = 0; b < NBITS; b++) bits[b] = int'($urandom % 2);
    for (int n = 0; n < NS; n++) begin
      @(posedge div_out);
      #0.3 modulation = sample(n, comp);
      @(posedge ref_clk);
      fv[n] = f_vco_mhz - F_C;
    end
    @(posedge div_out);
    #0.3 modulation = '0;
    best = -1.0; best_dev = 0.0; delay = 0;
    for (int d = 0; d < MAXD; d++) begin
      ok = 0; d_sum = 0.0;
      for (int b = 4; b < NBITS - MAXD / SPB - 1; b++) begin
        real f;
        f = fv[b * SPB + SPB / 2 + d];
        if ((f > 0.0) == (bits[b] != 0)) ok++;
        d_sum += (f > 0.0) ? f : -f;
      end
      if (real'(ok) / real'(NBITS - MAXD / SPB - 5) > best) begin
        best = real'(ok) / real'(NBITS - MAXD / SPB - 5);
        best_dev = d_sum / real'(NBITS - MAXD / SPB - 5) * 1.0e3;
        delay = d;
      end
    end
    correct = best;
    dev_khz = best_dev;
  endtask

  real c_ok, c_dev, p_ok, p_dev;
  int  c_del, p_del;

  initial begin : main
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    serial_load(5'd16, CARRIER);
    #60000;
    run(1'b1, c_ok, c_dev, c_del);
    $display("compensated: %0.1f%% bits correct, mean deviation %0.0f kHz, delay %0d periods",
             100.0 * c_ok, c_dev, c_del);
    #20000;
    run(1'b0, p_ok, p_dev, p_del);
    $display("plain:       %0.1f%% bits correct, mean deviation %0.0f kHz, delay %0d periods",
             100.0 * p_ok, p_dev, p_del);
    checks++;
    if (c_ok < 0.97) fail("compensated stream: bit errors");
    checks++;
    if (c_dev < 300.0 || c_dev > 1200.0) fail("compensated stream: deviation");
    checks++;
    if (!(p_ok < c_ok - 0.02 || p_dev < 0.5 * c_dev)) fail("compensation made no difference");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
