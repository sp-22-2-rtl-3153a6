// tb_div23_cell: checks the divide-by-2/3 cell alone and in a chain.
//
// Single cell (mod_in tied high): output period 3 input cycles with p = 1, 2
// with p = 0, and mod_out high for exactly one input cycle per output cycle.
// Single cell with mod_in low: period 2, mod_out never high.
// Three-cell chain, last mod_in high: every output period must be
// 8 + p0 + 2*p1 + 4*p2 input cycles, for all eight settings of the p bits.
`timescale 1ns/1ps
module tb_div23_cell;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #1 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // Single cell.
  logic s_p, s_mod_in, s_out, s_mod_out;
  div23_cell u_single (
    .clk_in(clk), .rst_n, .p(s_p), .mod_in(s_mod_in), .clk_out(s_out), .mod_out(s_mod_out)
  );

  // Three-cell chain.
  logic [2:0] c_p;
  logic [3:0] c_clk;
  logic [3:0] c_mod;
  assign c_clk[0] = clk;
  assign c_mod[3] = 1'b1;
  for (genvar i = 0; i < 3; i++) begin : g_chain
    div23_cell u_c (
      .clk_in(c_clk[i]), .rst_n, .p(c_p[i]), .mod_in(c_mod[i+1]),
      .clk_out(c_clk[i+1]), .mod_out(c_mod[i])
    );
  end

  // Input cycle counter.
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Period and mod_out pulse measurement for the single cell.
  int unsigned s_last = 0, s_period = 0, s_mods = 0, s_mods_seen = 0;
  always @(posedge s_out) begin
    s_period    = cyc - s_last;
    s_last      = cyc;
    s_mods_seen = s_mods;
    s_mods      = 0;
  end
  always @(negedge clk) if (s_mod_out) s_mods++;

  int unsigned c_last = 0, c_period = 0;
  always @(posedge c_clk[3]) begin
    c_period = cyc - c_last;
    c_last   = cyc;
  end

  task automatic check_single(input logic p, input logic m, input int unsigned exp_per,
                              input int unsigned exp_mods);
    s_p = p;
    s_mod_in = m;
    repeat (3) @(posedge s_out);
    for (int k = 0; k < 10; k++) begin
      @(posedge s_out);
      #0.1;
      checks++;
      if (s_period != exp_per) begin
        failures++;
        $display("FAIL single p=%0b mod=%0b period %0d expected %0d", p, m, s_period, exp_per);
      end
      checks++;
      if (s_mods_seen != exp_mods) begin
        failures++;
        $display("FAIL single p=%0b mod=%0b mod_out cycles %0d expected %0d", p, m, s_mods_seen, exp_mods);
      end
    end
  endtask

  initial begin : run
    s_p = 1'b0; s_mod_in = 1'b0; c_p = '0;
    #4 rst_n = 1'b1;
    check_single(1'b1, 1'b1, 3, 1);
    check_single(1'b0, 1'b1, 2, 1);
    check_single(1'b1, 1'b0, 2, 0);
    for (int s = 0; s < 8; s++) begin
      c_p = 3'(s);
      repeat (3) @(posedge c_clk[3]);
      for (int k = 0; k < 5; k++) begin
        @(posedge c_clk[3]);
        #0.1;
        checks++;
        if (c_period != 8 + s) begin
          failures++;
          $display("FAIL chain p=%03b period %0d expected %0d", c_p, c_period, 8 + s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
