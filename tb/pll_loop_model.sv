// pll_loop_model: behavioural model of the analog half of the PLL, for
// testbenches only. It stands for the charge pump with its gain DAC, the loop
// filter, the VCO and the external divide-by-2 prescaler. It is not
// synthesizable.
//
// Once per reference period (at each rising ref_clk edge) it takes the duty
// cycle of phi over the period just ended. The pump current is proportional to
// (duty - 0.5) and to the gain code (gain/16, 16 = nominal). The loop filter
// has the form K1/s + K2/(s + wp): an integrating path plus a proportional path
// smoothed by a first-order pole at wp = 2*pi*127 kHz. It is evaluated in
// discrete time at the reference rate and sets the VCO frequency
//     f_vco = F_FREE + integ + prop.
// The gains give a natural frequency of about 84 kHz and a damping of about
// 0.7 at gain code 16 and a ratio near 92. The prescaled output
// vco2_p/vco2_n toggles every 1/f_vco, its edges placed on an exact time grid.
// f_vco_mhz is exported for monitoring. KV_REL scales the VCO tuning gain
// (1.0 = nominal), to model a VCO whose gain is off its design value. The
// gain code is meant to correct exactly this.
`timescale 1ns/1ps
module pll_loop_model #(
  parameter real F_FREE_MHZ = 1840.0,   // VCO frequency with zero control
  parameter real T_REF_NS   = 50.0,     // reference period
  parameter real KV_REL     = 1.0       // VCO gain relative to nominal
) (
  input  logic       ref_clk,
  input  logic       phi,
  input  logic [4:0] gain,
  output logic       vco2_p,
  output logic       vco2_n,
  output real        f_vco_mhz
);

  localparam real PI    = 3.14159265358979;
  localparam real WP_T  = 2.0 * PI * 127.0e3 * T_REF_NS * 1.0e-9;  // pole, per ref period
  // Discrete type-2 loop at a ratio of about 92.5: phase (in divider cycles)
  // moves by -(df/N)*T per period. With g = T/N: Ki*g = (wn*T)^2 and
  // Kp*g = 2*zeta*wn*T, wn = 2*pi*84 kHz, zeta = 0.7.
  localparam real G     = T_REF_NS * 1.0e-9 / 92.5;
  localparam real WNT   = 2.0 * PI * 84.0e3 * T_REF_NS * 1.0e-9;
  localparam real KI_MHZ = WNT * WNT / G * 1.0e-6;
  localparam real KP_MHZ = 2.0 * 0.7 * WNT / G * 1.0e-6;

  real integ = 0.0, prop = 0.0;
  real high_ns = 0.0;
  real last_change = 0.0;
  real last_ref = 0.0;
  logic phi_q = 1'b0;

  assign f_vco_mhz = F_FREE_MHZ + integ + prop;

  // Time phi spends high.
  always @(phi) begin
    if (phi_q) high_ns += $realtime - last_change;
    last_change = $realtime;
    phi_q = phi;
  end

  // Loop filter update once per reference period.
  always @(posedge ref_clk) begin
    real duty, e, k;
    if (phi_q) high_ns += $realtime - last_change;
    last_change = $realtime;
    duty = ($realtime > last_ref) ? high_ns / ($realtime - last_ref) : 0.5;
    if (duty > 1.0) duty = 1.0;
    high_ns = 0.0;
    last_ref = $realtime;
    k = KV_REL * real'(gain) / 16.0;
    e = k * (duty - 0.5);
    integ += KI_MHZ * e;
    prop  += WP_T * (KP_MHZ * e - prop);
  end

  // VCO divided by 2: toggles every VCO period.
  initial begin
    real t_next;
    vco2_p = 1'b0;
    t_next = 1.0;
    forever begin
      #(t_next - $realtime);
      vco2_p = ~vco2_p;
      t_next += 1.0e3 / f_vco_mhz;
    end
  end
  assign vco2_n = ~vco2_p;

endmodule
