// carrier_mod_adder: forms the sigma-delta converter input from the carrier
// frequency word and the modulation sample.
//
// sum = carrier + modulation, registered, modulo 2^W. The carrier word is
// unsigned; the modulation sample is two's complement, so the sum can move
// either side of the carrier. One sample per clock, result after the next
// rising edge. The published design shows this adder between the serial
// register, the modulation FIFO and the converter and gives its 16-bit output.
// The signed modulation format and the output register are this design's own.
// Reset is asynchronous, active low.
module carrier_mod_adder
  import fracn_pkg::*;
#(
  parameter int unsigned W = SD_IN_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [W-1:0]        carrier,
  input  logic signed [W-1:0] modulation,
  output logic [W-1:0]        sum
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sum <= '0;
    else        sum <= carrier + W'(modulation);
  end

endmodule
