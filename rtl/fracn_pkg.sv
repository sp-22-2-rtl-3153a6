// fracn_pkg: widths and types shared by the fractional-N synthesizer core.
//
// The converter input is a 16-bit frequency word read as 6 integer bits (the
// divider code) above 10 fractional bits; the converter output and the divider
// control are 6 bits, one code step being half a divider input cycle. The 16
// and 6 bit widths and the 5-bit gain code are the design's published numbers;
// the 6/10 split follows from the 6 most significant bits that form the first
// converter stage's output. The 2-bit pipeline chunk is the published
// "pipelined every two bits".
package fracn_pkg;

  localparam int unsigned SD_IN_W    = 16;  // converter input word
  localparam int unsigned SD_OUT_W   = 6;   // converter output / divider code
  localparam int unsigned SD_CHUNK_W = 2;   // adder bits per pipeline stage
  localparam int unsigned GAIN_W     = 5;   // loop gain code to the charge-pump DAC
  localparam int unsigned DIV_CELLS  = 4;   // divide-by-2/3 cells after the fast stage

  typedef logic [SD_IN_W-1:0]  freq_word_t;
  typedef logic [SD_OUT_W-1:0] div_code_t;
  typedef logic [GAIN_W-1:0]   gain_code_t;

  // Contents of the serial configuration register.
  typedef struct packed {
    gain_code_t gain;     // loop gain adjust
    freq_word_t carrier;  // carrier frequency word
  } synth_cfg_t;

  localparam int unsigned CFG_W = $bits(synth_cfg_t);  // 21

endpackage
