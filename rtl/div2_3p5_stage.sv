// div2_3p5_stage: the high-speed divide-by-2/2.5/3/3.5 stage at the front of
// the 64-modulus divider.
//
// A divide-by-2 driven by the differential input (+in on in_p, -in on in_n)
// makes four phases PHI1..PHI4 at half the input rate, each lagging the one
// before by half an input cycle. A 4-to-1 multiplexer passes one phase to
// clk_out. Moving the selection to the next lagging phase delays the next
// rising edge of clk_out by half an input cycle. Each output cycle is 2 input
// cycles long, and a cycle in which k steps are taken is 2 + k/2 cycles long.
//
// CONTROL: once per divider period, during the output cycle in which mod_in
// (from the first divide-by-2/3 cell) is high, the phase selection is moved
// k = {d1,d0} (0..3) phases ahead of its resting value. It moves one phase
// per half input cycle, starting on the input edge after the rising edge of
// clk_out, so that cycle lasts 2, 2.5, 3 or 3.5 input cycles. The resting value
// (target) takes the new phase at the rising edge that ends the cycle.
// The selection is kept as a two-bit Johnson code (sel_a, sel_b): sel_b is
// clocked by -in and moves from an even phase (PHI1, PHI3) to the next, and
// sel_a is clocked by +in and moves from an odd phase. Each step therefore
// happens on the edge where the newly selected phase toggles. At that moment
// the old and new phases are both high or both low, so clk_out never glitches.
// The published design gives the divide-by-2 with four phase outputs, the 4-to-1
// mux and a control block fed by the divider. How the control steps the mux
// (target register, Johnson-coded selection) is this design's own.
// Reset is asynchronous, active low: PHI1 selected, all phases low.
module div2_3p5_stage (
  input  logic in_p,     // +in
  input  logic in_n,     // -in (complement of in_p)
  input  logic rst_n,
  input  logic mod_in,   // from the first divide-by-2/3 cell
  input  logic d0,       // add half an input cycle
  input  logic d1,       // add one input cycle
  output logic clk_out,  // selected phase, to the first divide-by-2/3 cell
  output logic [3:0] phi // PHI4..PHI1, for observation
);

  // Divide-by-2: master on +in, slave on -in.
  logic ph1, ph2;
  always_ff @(posedge in_p or negedge rst_n) begin
    if (!rst_n) ph1 <= 1'b0;
    else        ph1 <= ~ph2;
  end
  always_ff @(posedge in_n or negedge rst_n) begin
    if (!rst_n) ph2 <= 1'b0;
    else        ph2 <= ph1;
  end
  assign phi = {~ph2, ~ph1, ph2, ph1};

  // Target phase, advanced once per divider period.
  logic [1:0] target;
  always_ff @(posedge clk_out or negedge rst_n) begin
    if (!rst_n)      target <= 2'd0;
    else if (mod_in) target <= target + {d1, d0};
  end

  // Phase the selection moves towards.
  logic [1:0] goal;
  assign goal = mod_in ? target + {d1, d0} : target;

  // Selection, Johnson coded: 00 = PHI1, 01 = PHI2, 11 = PHI3, 10 = PHI4.
  logic       sel_a, sel_b;
  logic [1:0] sel;
  always_comb begin
    unique case ({sel_a, sel_b})
      2'b00:   sel = 2'd0;
      2'b01:   sel = 2'd1;
      2'b11:   sel = 2'd2;
      default: sel = 2'd3;
    endcase
  end

  always_ff @(posedge in_n or negedge rst_n) begin
    if (!rst_n)                                sel_b <= 1'b0;
    else if (sel_a == sel_b && sel != goal)    sel_b <= ~sel_b;
  end
  always_ff @(posedge in_p or negedge rst_n) begin
    if (!rst_n)                                sel_a <= 1'b0;
    else if (sel_a != sel_b && sel != goal)    sel_a <= sel_b;
  end

  // 4-to-1 multiplexer.
  assign clk_out = phi[sel];

endmodule
