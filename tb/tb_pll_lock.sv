// tb_pll_lock: closes the loop around the synthesizer core with a behavioural
// model of charge pump, loop filter, VCO and prescaler (pll_loop_model), and
// checks that the PLL locks where the frequency word says.
//
// Steps: load channel A (word 28.5 codes, expecting 20 MHz * 92.5 = 1850 MHz)
// with the VCO free-running at 1840 MHz; let it settle for 60 us; then
// measure for 20 us. Then change to channel B (31.25 codes,
// 20 MHz * 95.25 = 1905 MHz), and then apply constant modulation of +256 and -256 LSB (+-5 MHz). Each
// measurement checks:
//   - mean VCO frequency (from counted prescaler edges) within 0.3 MHz;
//   - mean duty cycle of the detector output within 0.5 +- 0.05, the zero-
//     current operating point;
//   - the divider output averages the 20 MHz reference (counted edges).
// The lock, the channel change and both modulation steps are counted; one
// that never happens is a failure.
`timescale 1ns/1ps
module tb_pll_lock;

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

  pll_loop_model #(.F_FREE_MHZ(1840.0)) u_loop (
    .ref_clk, .phi, .gain(gain_adjust), .vco2_p, .vco2_n, .f_vco_mhz
  );

  int checks = 0;
  int failures = 0;
  int n_locked = 0;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // Edge counters.
  longint n_vco2 = 0, n_div = 0, n_phi_hi = 0, n_samp = 0;
  always @(posedge vco2_p) n_vco2++;
  always @(posedge div_out) n_div++;
  always #0.5 begin
    n_samp++;
    if (phi) n_phi_hi++;
  end

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

  task automatic measure(input real expect_mhz, input string name);
    longint v0, d0, p0, s0;
    real f_meas, duty, f_div;
    localparam real WIN_NS = 20000.0;
    v0 = n_vco2; d0 = n_div; p0 = n_phi_hi; s0 = n_samp;
    #(WIN_NS);
    f_meas = real'(n_vco2 - v0) * 2.0 / WIN_NS * 1.0e3;
    f_div  = real'(n_div - d0) / WIN_NS * 1.0e3;
    duty   = real'(n_phi_hi - p0) / real'(n_samp - s0);
    $display("%s: VCO %0.3f MHz (expected %0.3f), divider %0.3f MHz, detector duty %0.3f",
             name, f_meas, expect_mhz, f_div, duty);
    checks++;
    if (f_meas - expect_mhz > 0.3 || expect_mhz - f_meas > 0.3) fail($sformatf("%s: frequency", name));
    checks++;
    if (duty < 0.45 || duty > 0.55) fail($sformatf("%s: duty cycle", name));
    checks++;
    if (f_div < 19.9 || f_div > 20.1) fail($sformatf("%s: divider rate", name));
    if (f_meas - expect_mhz <= 0.3 && expect_mhz - f_meas <= 0.3 && duty >= 0.45 && duty <= 0.55)
      n_locked++;
  endtask

  localparam logic [15:0] CH_A = 16'd28 * 1024 + 16'd512;   // 92.5  -> 1850.0 MHz
  localparam logic [15:0] CH_B = 16'd31 * 1024 + 16'd256;   // 95.25 -> 1905.0 MHz

  initial begin : run
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    serial_load(5'd16, CH_A);
    #60000;
    measure(1850.0, "channel A");
    serial_load(5'd16, CH_B);
    #60000;
    measure(1905.0, "channel B");
    @(posedge div_out);
    #0.3 modulation = 16'sd256;
    #60000;
    measure(1910.0, "channel B +256");
    @(posedge div_out);
    #0.3 modulation = -16'sd256;
    #60000;
    measure(1900.0, "channel B -256");
    checks++;
    if (n_locked != 4) fail($sformatf("locked in %0d of 4 settings", n_locked));
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
