// tb_mash_sigma_delta: checks the pipelined MASH converter against a
// non-pipelined model, sample by sample, including its latency.
//
// Model (one sample per clock, no pipelining):
//   {c1, f1} = f1 + x.frac ;  m1 = x.int + c1
//   {c2, f2} = f2 + f1     ;  y  = m1 + c2 - c2_prev   (mod 64)
// x captured at edge n must appear on y after edge n+9. The input holds a few
// constant words (to check the average and the output range) and then random
// words. For a constant word the mean of y over 1024 samples must equal
// x / 1024 within 2/1024, and y must stay within int-1 .. int+2.
`timescale 1ns/1ps
module tb_mash_sigma_delta;

  localparam int LAT  = 9;
  localparam int NCYC = 6000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [15:0] x;
  logic [5:0]  y;

  mash_sigma_delta dut (.clk, .rst_n, .x, .y);

  logic [15:0] xs   [NCYC];
  logic [5:0]  yref [NCYC];

  initial begin : build
    logic [9:0]  f1, f2;
    logic [10:0] t1, t2;
    logic        c2_prev;
    logic [5:0]  m1;
    f1 = '0; f2 = '0; c2_prev = 1'b0;
    for (int n = 0; n < NCYC; n++) begin
      if (n < 1024)      xs[n] = 16'hB1A7;        // 44.41 codes
      else if (n < 2048) xs[n] = 16'h5C01;        // 23.0 codes + 1 LSB
      else if (n < 3072) xs[n] = 16'h7E00;        // 31.5 codes
      else               xs[n] = {2'b01, 14'($urandom)};
      t1 = {1'b0, f1} + {1'b0, xs[n][9:0]};
      f1 = t1[9:0];
      m1 = xs[n][15:10] + 6'(t1[10]);
      t2 = {1'b0, f2} + {1'b0, f1};
      f2 = t2[9:0];
      yref[n] = m1 + 6'(t2[10]) - 6'(c2_prev);
      c2_prev = t2[10];
    end
  end

  int unsigned sum_y;
  int          seg_start;

  initial begin : run
    x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    x = xs[0];
    sum_y = 0;
    for (int t = 0; t < NCYC; t++) begin
      @(negedge clk);          // edge t has happened
      if (t - LAT >= 0) begin
        checks++;
        if (y !== yref[t-LAT]) begin
          failures++;
          if (failures < 10) $display("FAIL sample %0d: y=%0d expected %0d", t-LAT, y, yref[t-LAT]);
        end
        // Average and range over the three constant segments.
        if (t - LAT < 3072) begin
          int n;
          int lo;
          n = t - LAT;
          lo = int'(xs[n][15:10]);
          checks++;
          if (int'(y) < lo - 1 || int'(y) > lo + 2) begin
            failures++;
            $display("FAIL range sample %0d: y=%0d", n, y);
          end
          sum_y += y;
          if (n % 1024 == 1023) begin
            // 1024 * mean(y) against the input word
            checks++;
            if (int'(sum_y) * 1024 - int'(xs[n]) * 1024 > 2 * 1024 ||
                int'(xs[n]) * 1024 - int'(sum_y) * 1024 > 2 * 1024) begin
              failures++;
              $display("FAIL mean: sum=%0d input=%0d", sum_y, xs[n]);
            end
            sum_y = 0;
          end
        end
      end
      if (t + 1 < NCYC) x = xs[t+1];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
