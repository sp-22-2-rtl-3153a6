// serial_cfg_reg: serially loaded configuration register holding the carrier
// frequency word and the loop gain code.
//
// While ser_en is high, ser_data is shifted in on each rising clk edge, most
// significant bit first, into a CFG_W-bit shift register. A one-cycle ser_load
// pulse then copies the shift register into the output register in one step,
// so the carrier and gain outputs never show a half-shifted word. The word is
// {gain[4:0], carrier[15:0]}. The published design only names the serial
// register and its two outputs (carrier frequency, 5-bit gain adjust). The
// shift/load protocol, bit order and reset values (all zero) are this design's
// own. Reset is asynchronous, active low.
module serial_cfg_reg
  import fracn_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ser_data,
  input  logic       ser_en,
  input  logic       ser_load,
  output freq_word_t carrier,
  output gain_code_t gain
);

  logic [CFG_W-1:0] shift_q;
  synth_cfg_t       cfg_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      shift_q <= '0;
    else if (ser_en) shift_q <= {shift_q[CFG_W-2:0], ser_data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cfg_q <= '0;
    else if (ser_load) cfg_q <= synth_cfg_t'(shift_q);
  end

  assign carrier = cfg_q.carrier;
  assign gain    = cfg_q.gain;

endmodule
