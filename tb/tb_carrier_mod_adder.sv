// tb_carrier_mod_adder: random carrier words and signed modulation samples;
// the registered sum must equal carrier + modulation modulo 2^16 one clock
// later. Includes positive and negative samples and wrap-around cases.
`timescale 1ns/1ps
module tb_carrier_mod_adder;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [15:0]        carrier;
  logic signed [15:0] modulation;
  logic [15:0]        sum;

  carrier_mod_adder dut (.clk, .rst_n, .carrier, .modulation, .sum);

  int exp_val;

  initial begin : run
    carrier = '0;
    modulation = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 500; k++) begin
      carrier    = 16'($urandom);
      modulation = 16'($urandom_range(0, 4000)) - 16'd2000;
      if (k % 100 == 7) begin carrier = 16'hFFF0; modulation = 16'sd100; end
      if (k % 100 == 8) begin carrier = 16'h0010; modulation = -16'sd100; end
      exp_val = (int'(carrier) + int'(modulation)) & 16'hFFFF;
      @(negedge clk);
      checks++;
      if (int'(sum) != exp_val) begin
        failures++;
        $display("FAIL %h + %0d = %h, expected %h", carrier, modulation, sum, exp_val);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
