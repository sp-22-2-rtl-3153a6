// tb_gain_adjust: the loop gain code compensates a VCO gain error.
//
// Three copies of the synthesizer core, each closed with the behavioural loop
// model and locked at 1850 MHz:
//   A: nominal VCO gain, gain code 16 (nominal);
//   B: VCO gain 20% low, gain code 16;
//   C: VCO gain 20% low, gain code 20 (16 / 0.8), loaded through the serial
//      port like the others.
// All three get the same modulation step of +256 LSB (+5 MHz). The VCO
// frequencies are recorded once per reference period for 30 us. C's step
// response must match A's within 2% of the step at every sample. B's must
// differ from A's by more than 3% somewhere, which shows that the gain error
// matters and the code removes it. All three must end within 0.3 MHz of
// 1855 MHz.
`timescale 1ns/1ps
module tb_gain_adjust;

  localparam logic [15:0] CARRIER = 16'd28 * 1024 + 16'd512;   // 1850 MHz
  localparam int          NS      = 600;                       // 30 us

  logic ref_clk = 1'b0;
  initial begin
    #0.5;
    forever #25 ref_clk = ~ref_clk;
  end

  logic rst_n = 1'b1;
  logic ser_data = 1'b0, ser_en = 1'b0, ser_load = 1'b0;
  logic signed [15:0] modulation = '0;

  logic [2:0] vp, vn, dv, ph, phb;
  logic [4:0] ga [3];
  logic [5:0] dc [3];
  real        fa, fb, fc;
  logic [2:0] sdat;

  // Copy A and B get gain code 16, copy C gets 20: the serial words differ only
  // in the gain field, so each copy has its own data line.
  fracn_synth_top dut_a (
    .ref_clk, .rst_n, .ser_data(sdat[0]), .ser_en, .ser_load, .modulation,
    .vco2_p(vp[0]), .vco2_n(vn[0]), .div_out(dv[0]), .phi(ph[0]), .phi_b(phb[0]),
    .gain_adjust(ga[0]), .div_code(dc[0])
  );
  fracn_synth_top dut_b (
    .ref_clk, .rst_n, .ser_data(sdat[1]), .ser_en, .ser_load, .modulation,
    .vco2_p(vp[1]), .vco2_n(vn[1]), .div_out(dv[1]), .phi(ph[1]), .phi_b(phb[1]),
    .gain_adjust(ga[1]), .div_code(dc[1])
  );
  fracn_synth_top dut_c (
    .ref_clk, .rst_n, .ser_data(sdat[2]), .ser_en, .ser_load, .modulation,
    .vco2_p(vp[2]), .vco2_n(vn[2]), .div_out(dv[2]), .phi(ph[2]), .phi_b(phb[2]),
    .gain_adjust(ga[2]), .div_code(dc[2])
  );

  pll_loop_model #(.F_FREE_MHZ(1845.0)) u_loop_a (
    .ref_clk, .phi(ph[0]), .gain(ga[0]), .vco2_p(vp[0]), .vco2_n(vn[0]), .f_vco_mhz(fa)
  );
  pll_loop_model #(.F_FREE_MHZ(1845.0), .KV_REL(0.8)) u_loop_b (
    .ref_clk, .phi(ph[1]), .gain(ga[1]), .vco2_p(vp[1]), .vco2_n(vn[1]), .f_vco_mhz(fb)
  );
  pll_loop_model #(.F_FREE_MHZ(1845.0), .KV_REL(0.8)) u_loop_c (
    .ref_clk, .phi(ph[2]), .gain(ga[2]), .vco2_p(vp[2]), .vco2_n(vn[2]), .f_vco_mhz(fc)
  );

  int checks = 0;
  int failures = 0;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic serial_load();
    logic [20:0] w16, w20;
    w16 = {5'd16, CARRIER};
    w20 = {5'd20, CARRIER};
    @(negedge ref_clk);
    for (int b = 20; b >= 0; b--) begin
      ser_en = 1'b1;
      sdat = {w20[b], w16[b], w16[b]};
      @(negedge ref_clk);
    end
    ser_en = 1'b0;
    ser_load = 1'b1;
    @(negedge ref_clk);
    ser_load = 1'b0;
  endtask

  real ra [NS], rb [NS], rc [NS];

  initial begin : main
    real e_ac, e_ab, d;
    sdat = '0;
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    serial_load();
    checks++;
    if (ga[0] != 5'd16 || ga[1] != 5'd16 || ga[2] != 5'd20) fail("gain codes not loaded");
    #80000;
    // Apply the step just after a reference rising edge; at lock the divider
    // edges are half a period away.
    @(posedge ref_clk);
    #2 modulation = 16'sd256;
    for (int n = 0; n < NS; n++) begin
      @(posedge ref_clk);
      #1;
      ra[n] = fa; rb[n] = fb; rc[n] = fc;
    end
    e_ac = 0.0; e_ab = 0.0;
    for (int n = 0; n < NS; n++) begin
      d = (ra[n] > rc[n]) ? ra[n] - rc[n] : rc[n] - ra[n];
      if (d > e_ac) e_ac = d;
      d = (ra[n] > rb[n]) ? ra[n] - rb[n] : rb[n] - ra[n];
      if (d > e_ab) e_ab = d;
    end
    $display("step 5 MHz: largest difference to nominal, VCO gain -20%%: %0.3f MHz with code 16, %0.3f MHz with code 20",
             e_ab, e_ac);
    $display("final: A %0.3f  B %0.3f  C %0.3f MHz", ra[NS-1], rb[NS-1], rc[NS-1]);
    checks++;
    if (e_ac > 0.02 * 5.0) fail("code 20 does not restore the nominal response");
    checks++;
    if (e_ab < 0.03 * 5.0) fail("gain error has no visible effect");
    checks++;
    if (ra[NS-1] < 1854.7 || ra[NS-1] > 1855.3 || rb[NS-1] < 1854.7 || rb[NS-1] > 1855.3 ||
        rc[NS-1] < 1854.7 || rc[NS-1] > 1855.3)
      fail("final frequency");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
