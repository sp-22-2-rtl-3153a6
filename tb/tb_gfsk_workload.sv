// tb_gfsk_workload: runs the synthesizer core with a 2.5 Mb/s GFSK modulation
// stream, as the transmitter uses it.
//
// Bits at 2.5 Mb/s are shaped by a Gaussian filter with BT = 0.5, sampled at
// the 20 MHz divider rate (8 samples per bit, filter span 3 bits). The peak
// deviation is 668 kHz, or 34.2 LSB of the 16-bit word (1 LSB = 20 MHz/1024 at
// the VCO). The samples are offered in two forms:
//   plain        - the Gaussian-filtered frequency samples;
//   compensated  - the same samples passed through the inverse of a
//                  second-order loop response with f0 = 84 kHz. The damping
//                  factor 0.707 is this testbench's own choice. This is the
//                  boosted, wide-range signal the converter must carry.
// Carrier: 1.85 GHz (ratio 92.5, code 28.5). For every divider period, the
// check compares the accumulated VCO cycles, sum(period - 64), with the
// accumulated input, sum(x/1024), using the 10-period latency. The two must
// agree within 2 VCO cycles: the divider phase follows the modulation's
// integral with only the bounded, noise-shaped error of the converter. The
// compensated run must swing the code by at least 4 steps and stay inside
// 1..61.
`timescale 1ns/1ps
module tb_gfsk_workload;

  localparam int    LAT      = 10;
  localparam int    SPB      = 8;        // samples per bit: 20 MHz / 2.5 Mb/s
  localparam int    NTAP     = 3 * SPB + 1;
  localparam real   BT       = 0.5;
  localparam real   DEV_LSB  = 668.0e3 / (20.0e6 / 1024.0);
  localparam real   FS       = 20.0e6;
  localparam real   F0       = 84.0e3;
  localparam real   ZETA     = 0.707;
  localparam real   PI       = 3.14159265358979;
  localparam logic [15:0] CARRIER = 16'd28 * 1024 + 16'd512;
  localparam int    NBITS    = 300;

  logic ref_clk = 1'b0;
  initial begin
    #0.5;
    forever #25 ref_clk = ~ref_clk;
  end
  logic vco2_p = 1'b0;
  logic vco2_n;
  assign vco2_n = ~vco2_p;
  always #1 vco2_p = ~vco2_p;

  logic rst_n = 1'b1;
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

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // Gaussian taps, normalised to unit sum.
  real taps [NTAP];
  initial begin
    real sigma, tot;
    sigma = $sqrt($ln(2.0)) / (2.0 * PI * BT) * SPB;   // in samples
    tot = 0.0;
    for (int k = 0; k < NTAP; k++) begin
      taps[k] = $exp(-((k - NTAP / 2) ** 2) / (2.0 * sigma * sigma));
      tot += taps[k];
    end
    for (int k = 0; k < NTAP; k++) taps[k] /= tot;
  end

  // Sample generator state.
  real nrz [NTAP];
  real g1 = 0.0, g2 = 0.0;       // previous Gaussian samples
  int  sample_no = 0;
  bit  compensate = 1'b0;
  bit  running = 1'b0;

  function automatic logic signed [15:0] next_sample();
    real g, c;
    for (int k = NTAP - 1; k > 0; k--) nrz[k] = nrz[k-1];
    if (sample_no % SPB == 0) nrz[0] = ($urandom % 2) ? 1.0 : -1.0;
    else nrz[0] = nrz[1];
    g = 0.0;
    for (int k = 0; k < NTAP; k++) g += taps[k] * nrz[k];
    g *= DEV_LSB;
    if (compensate) begin
      // inverse of w0^2 / (s^2 + 2 zeta w0 s + w0^2), with s ~ FS*(1 - z^-1)
      c = g + 2.0 * ZETA * FS / (2.0 * PI * F0) * (g - g1)
            + (FS / (2.0 * PI * F0)) ** 2 * (g - 2.0 * g1 + g2);
    end else begin
      c = g;
    end
    g2 = g1;
    g1 = g;
    sample_no++;
    return 16'($rtoi(c + (c >= 0.0 ? 0.5 : -0.5)));
  endfunction

  // Phase tracking.
  logic [15:0] xhist [LAT+1];
  longint acc_div = 0;     // sum(period - 64) * 1024
  longint acc_in  = 0;     // sum(x)
  longint max_err = 0;
  int unsigned last_rise = 0;
  bit  tracking = 1'b0;
  int  code_min = 99, code_max = -1;

  always @(posedge div_out) begin
    int unsigned now;
    now = int'($realtime);
    if (tracking) begin
      acc_div += longint'(now - last_rise - 64) * 1024;
      acc_in  += longint'(xhist[LAT]);   // x behind the code of the period just ended
      if (acc_div - acc_in > max_err) max_err = acc_div - acc_in;
      if (acc_in - acc_div > max_err) max_err = acc_in - acc_div;
      checks++;
      if (acc_div - acc_in > 2 * 1024 || acc_in - acc_div > 2 * 1024)
        fail($sformatf("phase error %0.2f VCO cycles", real'(acc_div - acc_in) / 1024.0));
    end
    last_rise = now;
    for (int i = LAT; i > 0; i--) xhist[i] = xhist[i-1];
    xhist[0] = CARRIER + 16'(modulation);
    #0.3;
    if (running) begin
      modulation = next_sample();
      if (tracking) begin
        if (int'(div_code) < code_min) code_min = int'(div_code);
        if (int'(div_code) > code_max) code_max = int'(div_code);
      end
    end
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

  task automatic run_stream(input bit comp, input string name);
    compensate = comp;
    g1 = 0.0; g2 = 0.0;
    for (int k = 0; k < NTAP; k++) nrz[k] = 0.0;
    code_min = 99; code_max = -1;
    running = 1'b1;
    repeat (LAT + 2) @(posedge div_out);
    #0.5;
    acc_div = 0; acc_in = 0; max_err = 0;
    tracking = 1'b1;
    repeat (NBITS * SPB) @(posedge div_out);
    #0.5;
    tracking = 1'b0;
    running = 1'b0;
    modulation = '0;
    $display("%s: codes %0d..%0d, largest phase error %0.3f VCO cycles", name, code_min, code_max,
             real'(max_err) / 1024.0);
    checks++;
    if (code_min < 1 || code_max > 61) fail($sformatf("%s: code out of range", name));
    repeat (LAT + 2) @(posedge div_out);
  endtask

  initial begin : run
    for (int i = 0; i <= LAT; i++) xhist[i] = '0;
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    serial_load(5'd16, CARRIER);
    repeat (LAT + 5) @(posedge div_out);
    run_stream(1'b0, "plain GFSK");
    run_stream(1'b1, "compensated GFSK");
    checks++;
    if (code_max - code_min < 4) fail("compensated stream did not need the wide code range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
