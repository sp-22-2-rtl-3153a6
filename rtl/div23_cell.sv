// div23_cell: one divide-by-2/3 state machine of the 64-modulus divider chain.
//
// The cell divides clk_in by 2. In an output cycle during which mod_in is high
// and p is set, it divides by 3 instead, swallowing one input cycle. mod_out
// tells the cell before it (the one that clocks this cell) when to do the
// same. mod_out is high for exactly one clk_in cycle per output cycle in which
// mod_in is high. A chain of these cells, with the last cell's mod_in tied
// high, divides by 2^n + sum(p_i * 2^i). Each cell lengthens the chain's period
// by one of its own input cycles exactly once per chain period.
//
// State: cnt counts input cycles within the output cycle, 0 -> 1 -> (2 ->) 0.
// clk_out is registered and high while cnt == 0. mod_in is read one input edge
// after the rising edge of clk_out, when the next cell has updated it.
// The published design gives the cell's function (divide by 2 or 3, one control
// bit D2..D5 each) and its place in the chain. The state encoding and the
// modulus-control handshake are this design's own. Reset is asynchronous,
// active low.
module div23_cell (
  input  logic clk_in,
  input  logic rst_n,
  input  logic p,        // divide-by-3 request (one bit of the divider code)
  input  logic mod_in,   // from the next (slower) cell; high = this cell may stretch
  output logic clk_out,  // divided clock to the next cell
  output logic mod_out   // to the previous (faster) stage
);

  logic [1:0] cnt, cnt_nxt;

  always_comb begin
    unique case (cnt)
      2'd0:    cnt_nxt = 2'd1;
      2'd1:    cnt_nxt = (mod_in && p) ? 2'd2 : 2'd0;
      default: cnt_nxt = 2'd0;
    endcase
  end

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= 2'd0;
      clk_out <= 1'b0;
      mod_out <= 1'b0;
    end else begin
      cnt     <= cnt_nxt;
      clk_out <= (cnt_nxt == 2'd0);
      mod_out <= mod_in && (cnt_nxt == 2'd1);
    end
  end

endmodule
