// pfd: phase/frequency detector with a single duty-cycle output.
//
// phi drives the charge pump's differential switch (phi and phi_b). It rises
// on a reference edge and falls on the next divider edge, so at equal
// frequencies its duty cycle is the phase lag of the divider behind the
// reference, as a fraction of a period: 50% when they are half a period apart.
// The output is linear over a full period, with no dead zone around any phase.
// For frequency detection the detector counts the difference between
// reference and divider edges in the range -1..2, and phi is high while it is
// 1 or 2. When the reference runs faster, extra reference edges push the count
// to 2 and phi stays high through the next divider edge; when the divider runs
// faster, phi stays low through the next reference edge. The average output
// then saturates towards 100% or 0% and steers the loop back into lock.
//
// Implementation: each input clocks its own two-bit Gray counter (ref_cnt on
// the reference, div_cnt on the divider). A counter advances only while the
// edge difference is inside its limit. The difference, and with it phi, is
// decoded from the two counters, which are read across the two clock domains
// without synchronization. Each counter changes one bit per edge, so the
// decoded difference moves by one step at a time. Simultaneous edges cancel.
// The published design takes its detector from earlier work and states only
// its purpose and the 50% duty-cycle operating point. This circuit is this
// design's own. Reset is asynchronous, active low; it starts with a difference
// of 0 (phi low).
module pfd (
  input  logic ref_in,  // 20 MHz reference
  input  logic div_in,  // divider output
  input  logic rst_n,
  output logic phi,     // to the charge pump
  output logic phi_b    // complement, the charge pump's second switch input
);

  logic [1:0] ref_cnt, div_cnt;

  function automatic logic [1:0] gray_to_bin(input logic [1:0] g);
    return {g[1], g[1] ^ g[0]};
  endfunction

  function automatic logic [1:0] bin_to_gray(input logic [1:0] b);
    return {b[1], b[1] ^ b[0]};
  endfunction

  // Edge difference modulo 4: 3 means -1.
  logic [1:0] diff;
  assign diff = gray_to_bin(ref_cnt) - gray_to_bin(div_cnt);

  always_ff @(posedge ref_in or negedge rst_n) begin
    if (!rst_n)            ref_cnt <= 2'b00;
    else if (diff != 2'd2) ref_cnt <= bin_to_gray(gray_to_bin(ref_cnt) + 2'd1);
  end

  always_ff @(posedge div_in or negedge rst_n) begin
    if (!rst_n)            div_cnt <= 2'b00;
    else if (diff != 2'd3) div_cnt <= bin_to_gray(gray_to_bin(div_cnt) + 2'd1);
  end

  assign phi   = (diff == 2'd1) || (diff == 2'd2);
  assign phi_b = ~phi;

endmodule
