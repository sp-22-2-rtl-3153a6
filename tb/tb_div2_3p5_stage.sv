// tb_div2_3p5_stage: checks the divide-by-2/2.5/3/3.5 stage.
//
// The input is a differential clock with a half-period of 1 ns; time is
// counted in half input cycles. The testbench plays the first divide-by-2/3
// cell: it raises mod_in for one output cycle in every five, with random
// {d1,d0}. Expected: the output cycle during which mod_in is high lasts
// 4 + {d1,d0} half cycles, and every other cycle 4. The low
// time of clk_out is always 2 half cycles, so no glitch or runt pulse occurs
// when the multiplexer switches. The four phases are checked to be the
// divide-by-2 output and its copies delayed by 1, 2 and 3 half cycles.
`timescale 1ns/1ps
module tb_div2_3p5_stage;

  logic in_p = 1'b0;
  logic in_n;
  logic rst_n = 1'b0;
  assign in_n = ~in_p;
  always #1 in_p = ~in_p;

  int checks = 0;
  int failures = 0;
  int steps_seen [4] = '{0, 0, 0, 0};

  logic       mod_in, d0, d1;
  logic       clk_out;
  logic [3:0] phi;

  div2_3p5_stage dut (.in_p, .in_n, .rst_n, .mod_in, .d0, .d1, .clk_out, .phi);

  // Half-cycle count: the input toggles every 1 ns.
  function automatic int unsigned hc();
    return int'($realtime);
  endfunction

  // Phase relationship: phi[i] now equals phi[0] i half cycles ago.
  logic [3:0] ph1_hist;
  always @(in_p) begin
    #0.5;
    ph1_hist = {ph1_hist[2:0], phi[0]};
    if (rst_n && hc() > 8) begin
      for (int i = 1; i < 4; i++) begin
        checks++;
        if (phi[i] !== ph1_hist[i]) begin
          failures++;
          $display("FAIL phase %0d at half cycle %0d", i + 1, hc());
        end
      end
    end
  end

  // Next-cell model and period checks.
  int unsigned ncyc = 0;
  int unsigned last_rise = 0;
  int unsigned last_fall = 0;
  int          expect_k;        // extra half cycles expected in the cycle just ended

  always @(posedge clk_out) begin
    // The cycle ending now had mod_in and {d1,d0} as they still are.
    expect_k = mod_in ? int'({d1, d0}) : 0;
    if (ncyc > 2) begin
      checks++;
      if (hc() - last_rise != 4 + expect_k) begin
        failures++;
        $display("FAIL period %0d half cycles, expected %0d (cycle %0d)", hc() - last_rise, 4 + expect_k, ncyc);
      end
      if (expect_k > 0) steps_seen[expect_k]++;
      else steps_seen[0]++;
    end
    last_rise = hc();
    ncyc++;
    mod_in <= (ncyc % 5 == 4);
    if (ncyc % 5 == 0) {d1, d0} <= 2'($urandom);
  end

  always @(negedge clk_out) begin
    if (ncyc > 1) begin
      checks++;
      if (hc() - last_rise < 2) begin
        failures++;
        $display("FAIL high time %0d", hc() - last_rise);
      end
    end
    last_fall = hc();
  end

  always @(posedge clk_out) begin
    if (ncyc > 2) begin
      checks++;
      if (hc() - last_fall != 2) begin
        failures++;
        $display("FAIL low time %0d half cycles", hc() - last_fall);
      end
    end
  end

  initial begin : run
    mod_in = 1'b0; d0 = 1'b0; d1 = 1'b0;
    ph1_hist = '0;
    #3.5 rst_n = 1'b1;
    wait (ncyc == 600);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (steps_seen[k] == 0) begin
        failures++;
        $display("FAIL divide value %0d never exercised", k);
      end
    end
    $display("divide-by-2/2.5/3/3.5 cycles seen: %0d %0d %0d %0d",
             steps_seen[0], steps_seen[1], steps_seen[2], steps_seen[3]);
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
