// tb_mod64_divider: checks the 64-modulus divider's period for every code.
//
// The input is a differential clock with a half-period of 1 ns, so a period
// measured in ns is a period in half input cycles. Expected period:
// 64 + D half cycles, i.e. 32 + D/2 input cycles.
// Part 1 holds each of the 64 codes for several periods and checks every
// period after the first. Part 2 changes the code to a random value right
// after each rising edge of div_out, as the sigma-delta converter does. It
// checks that each period equals 64 + the code applied at its start.
`timescale 1ns/1ps
module tb_mod64_divider;

  logic in_p = 1'b0;
  logic in_n;
  logic rst_n = 1'b0;
  assign in_n = ~in_p;
  always #1 in_p = ~in_p;

  int checks = 0;
  int failures = 0;

  logic [5:0] div_code;
  logic       div_out;

  mod64_divider dut (.in_p, .in_n, .rst_n, .div_code, .div_out);

  int unsigned last_rise = 0;
  int unsigned period = 0;
  int unsigned nrise = 0;
  always @(posedge div_out) begin
    period    = int'($realtime) - last_rise;
    last_rise = int'($realtime);
    nrise++;
  end

  logic [5:0] applied;

  initial begin : run
    div_code = 6'd0;
    #5.5 rst_n = 1'b1;
    // Part 1: every code held.
    for (int c = 0; c < 64; c++) begin
      @(posedge div_out);
      #0.2 div_code = 6'(c);
      @(posedge div_out);   // period with the new code starts here
      repeat (3) begin
        @(posedge div_out);
        #0.1;
        checks++;
        if (period != 64 + c) begin
          failures++;
          $display("FAIL code %0d: period %0d half cycles, expected %0d", c, period, 64 + c);
        end
      end
    end
    // Part 2: a new random code every period.
    @(posedge div_out);
    #0.2 applied = 6'($urandom);
    div_code = applied;
    for (int k = 0; k < 2000; k++) begin
      @(posedge div_out);
      #0.1;
      checks++;
      if (period != 64 + int'(applied)) begin
        failures++;
        if (failures < 10)
          $display("FAIL dithered period %0d: %0d half cycles, expected %0d", k, period, 64 + applied);
      end
      #0.1 applied = 6'($urandom);
      div_code = applied;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
