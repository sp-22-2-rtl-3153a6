// fracn_synth_top: digital core of a fractional-N synthesizer used as a direct
// GFSK modulator.
//
// The carrier word from the serial configuration register is added to the
// modulation sample. The 16-bit sum drives a pipelined second-order MASH
// sigma-delta converter, whose 6-bit output picks the divide value
// (32 + code/2) of the 64-modulus divider in the PLL feedback path. The divider
// is clocked by the VCO after an external divide-by-2. The phase/frequency
// detector compares its output with the reference and drives the charge pump
// through phi/phi_b, whose duty cycle measures the phase error (50% means zero
// pump current). The 5-bit gain code goes to the charge pump's current DAC.
//
// Clocking: the serial register runs on the 20 MHz reference (ref_clk). The
// adder and the converter run on the divider output, so each new code is
// presented just after a divider output edge and holds for a whole divider
// period. At lock the two clocks have the same frequency. The carrier and gain
// words are static settings that cross into the divider domain unsynchronized.
// Load them while the loop is not in use. The modulation input must be stable
// around the rising edge of div_out. The charge pump, loop filter, VCO and
// prescaler are analog or off-chip parts and connect through the ports. The partition follows the published system diagram; the
// choice of the divider output as converter clock is this design's own.
module fracn_synth_top
  import fracn_pkg::*;
(
  input  logic                       ref_clk,     // 20 MHz reference
  input  logic                       rst_n,       // asynchronous, active low
  input  logic                       ser_data,    // serial configuration data
  input  logic                       ser_en,      // shift enable
  input  logic                       ser_load,    // copy shifted word to outputs
  input  logic signed [SD_IN_W-1:0]  modulation,  // modulation sample (two's complement)
  input  logic                       vco2_p,      // VCO / 2, +in
  input  logic                       vco2_n,      // VCO / 2, -in
  output logic                       div_out,     // divider output (also fed to the detector)
  output logic                       phi,         // detector output to the charge pump
  output logic                       phi_b,       // its complement
  output gain_code_t                 gain_adjust, // to the charge-pump gain DAC
  output div_code_t                  div_code     // current divider code
);

  freq_word_t carrier;
  freq_word_t sd_in;

  serial_cfg_reg u_cfg (
    .clk     (ref_clk),
    .rst_n,
    .ser_data,
    .ser_en,
    .ser_load,
    .carrier,
    .gain    (gain_adjust)
  );

  carrier_mod_adder u_adder (
    .clk       (div_out),
    .rst_n,
    .carrier,
    .modulation,
    .sum       (sd_in)
  );

  mash_sigma_delta u_sd (
    .clk  (div_out),
    .rst_n,
    .x    (sd_in),
    .y    (div_code)
  );

  mod64_divider u_div (
    .in_p     (vco2_p),
    .in_n     (vco2_n),
    .rst_n,
    .div_code,
    .div_out
  );

  pfd u_pfd (
    .ref_in (ref_clk),
    .div_in (div_out),
    .rst_n,
    .phi,
    .phi_b
  );

endmodule
