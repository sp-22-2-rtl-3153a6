// tb_serial_cfg_reg: shifts random 21-bit words {gain, carrier} in MSB first.
// The outputs must keep the previous word while shifting (also when ser_en
// pauses in mid-word) and show the new word after the ser_load pulse.
`timescale 1ns/1ps
module tb_serial_cfg_reg;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #25 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        ser_data, ser_en, ser_load;
  logic [15:0] carrier;
  logic [4:0]  gain;

  serial_cfg_reg dut (.clk, .rst_n, .ser_data, .ser_en, .ser_load, .carrier, .gain);

  logic [20:0] word, prev;

  task automatic check_out(input logic [20:0] w, input string what);
    checks++;
    if ({gain, carrier} !== w) begin
      failures++;
      $display("FAIL %s: gain=%0d carrier=%h expected %h", what, gain, carrier, w);
    end
  endtask

  initial begin : run
    ser_data = 1'b0; ser_en = 1'b0; ser_load = 1'b0;
    prev = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check_out('0, "reset");
    for (int k = 0; k < 40; k++) begin
      word = 21'($urandom);
      for (int b = 20; b >= 0; b--) begin
        ser_en = 1'b1;
        ser_data = word[b];
        @(negedge clk);
        if (b == 10) begin   // pause in mid-word
          ser_en = 1'b0;
          ser_data = ~ser_data;
          repeat (3) @(negedge clk);
        end
        check_out(prev, "while shifting");
      end
      ser_en = 1'b0;
      ser_load = 1'b1;
      @(negedge clk);
      ser_load = 1'b0;
      check_out(word, "after load");
      prev = word;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
