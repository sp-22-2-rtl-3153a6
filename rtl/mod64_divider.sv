// mod64_divider: 64-modulus divider, dividing by 32 to 63.5 in half-cycle
// steps.
//
// A divide-by-2/2.5/3/3.5 stage (div2_3p5_stage) drives a chain of four
// divide-by-2/3 cells (div23_cell) with control bits D2..D5. The fast stage
// takes D0 and D1. With the 6-bit code D = {D5..D0} the output period is
//     N = 32 + D/2 input cycles = 64 + D half input cycles,
// and with the external divide-by-2 prescaler in front, 64 + D VCO cycles.
// The modulus control runs from the last cell back to the fast stage. Each cell
// adds its weight once per output period: D5 16, D4 8, D3 4, D2 2 input cycles,
// and the fast stage D1 one cycle and D0 half a cycle.
// Timing: the code is read at several points during each output period, so it
// should change only just after a rising edge of div_out, as it does when the
// sigma-delta converter is clocked by div_out. div_out is the last cell's
// output: high for one, low for one or two periods of the cell's input clock.
// The stage order and bit assignment follow the published block diagram.
// Reset is asynchronous, active low.
module mod64_divider
  import fracn_pkg::*;
#(
  parameter int unsigned N_CELLS = DIV_CELLS
) (
  input  logic               in_p,     // prescaled VCO, +in
  input  logic               in_n,     // prescaled VCO, -in
  input  logic               rst_n,
  input  logic [N_CELLS+1:0] div_code, // D: {D5..D0} at the default size
  output logic               div_out   // to the phase/frequency detector
);

  logic [N_CELLS:0] clk_chain;  // clk_chain[0] = fast stage output
  logic [N_CELLS:0] mod_chain;  // mod_chain[i] = modulus control into stage i
  logic [3:0]       phi_unused;

  div2_3p5_stage u_fast (
    .in_p, .in_n, .rst_n,
    .mod_in (mod_chain[0]),
    .d0     (div_code[0]),
    .d1     (div_code[1]),
    .clk_out(clk_chain[0]),
    .phi    (phi_unused)
  );

  for (genvar i = 0; i < N_CELLS; i++) begin : g_cell
    div23_cell u_cell (
      .clk_in (clk_chain[i]),
      .rst_n,
      .p      (div_code[i+2]),
      .mod_in (mod_chain[i+1]),
      .clk_out(clk_chain[i+1]),
      .mod_out(mod_chain[i])
    );
  end

  assign mod_chain[N_CELLS] = 1'b1;
  assign div_out            = clk_chain[N_CELLS];

endmodule
