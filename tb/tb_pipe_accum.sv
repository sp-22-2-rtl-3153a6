// tb_pipe_accum: checks the carry-pipelined integrator against a plain
// integer model.
//
// Random samples v[n] are fed in skewed form (chunk j of v[n] at edge n+j).
// After every edge the skewed sum chunks and the top carry are compared with
// acc[n] = acc[n-1] + v[n] (mod 2^W) and its overflow. Two instances are
// checked: a full-feedback integrator (10 bits, as in the converter's second
// stage) and a 16-bit one whose low 10 bits accumulate (the first stage).
// A third instance is the 3-bit, one-bit-per-stage integrator used to explain
// the technique: its output y_j[n] must follow input sample n by j+1 cycles.
`timescale 1ns/1ps
module tb_pipe_accum;

  localparam int CH = 2;
  localparam int NCYC = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // Sample history, index = sample number.
  logic [15:0] v [NCYC];

  // Instance A: 10 bits, full feedback.
  logic [9:0] a_in, a_sum;
  logic       a_cout;
  pipe_accum #(.WIDTH(10), .CHUNK(CH), .FB_WIDTH(10)) dut_a (
    .clk, .rst_n, .in_skew(a_in), .sum_skew(a_sum), .carry_out(a_cout)
  );

  // Instance B: 16 bits, low 10 bits fed back.
  logic [15:0] b_in, b_sum;
  logic        b_cout;
  pipe_accum #(.WIDTH(16), .CHUNK(CH), .FB_WIDTH(10)) dut_b (
    .clk, .rst_n, .in_skew(b_in), .sum_skew(b_sum), .carry_out(b_cout)
  );

  // Instance C: 3 bits, one bit per stage.
  logic [2:0] c_in, c_sum;
  logic       c_cout_unused;
  pipe_accum #(.WIDTH(3), .CHUNK(1), .FB_WIDTH(3)) dut_c (
    .clk, .rst_n, .in_skew(c_in), .sum_skew(c_sum), .carry_out(c_cout_unused)
  );
  logic [2:0] rc_sum [NCYC];

  // Reference results per sample.
  logic [9:0]  ra_sum  [NCYC];
  logic        ra_cout [NCYC];
  logic [15:0] rb_sum  [NCYC];

  function automatic logic [15:0] skewed_in(input int t, input int nch);
    logic [15:0] w = '0;
    for (int j = 0; j < nch; j++)
      if (t - j >= 0) w[j*CH +: CH] = v[t-j][j*CH +: CH];
    return w;
  endfunction

  initial begin : build_reference
    logic [10:0] acc_a;
    logic [9:0]  acc_b_frac;
    logic [10:0] tmp;
    acc_a = '0;
    acc_b_frac = '0;
    rc_sum[0] = '0;
    for (int n = 0; n < NCYC; n++) begin
      v[n] = 16'($urandom);
      if (n % 50 < 5) v[n] = 16'hFFFF;  // long carry chains
      acc_a = {1'b0, acc_a[9:0]} + {1'b0, v[n][9:0]};
      ra_sum[n]  = acc_a[9:0];
      ra_cout[n] = acc_a[10];
      tmp = {1'b0, acc_b_frac} + {1'b0, v[n][9:0]};
      acc_b_frac = tmp[9:0];
      rb_sum[n] = {6'(v[n][15:10] + 6'(tmp[10])), tmp[9:0]};
      rc_sum[n] = 3'((n > 0 ? rc_sum[n-1] : 3'd0) + v[n][2:0]);
    end
  end

  initial begin : stimulus
    a_in = '0;
    b_in = '0;
    c_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    a_in = skewed_in(0, 5)[9:0];
    b_in = skewed_in(0, 8);
    c_in = {1'b0, 1'b0, v[0][0]};
    for (int t = 0; t < NCYC - 8; t++) begin
      @(negedge clk);  // edge t has happened
      for (int j = 0; j < 5; j++) begin
        if (t - j >= 0) begin
          checks++;
          if (a_sum[j*CH +: CH] !== ra_sum[t-j][j*CH +: CH]) begin
            failures++;
            $display("FAIL A sum chunk %0d sample %0d: %b vs %b", j, t-j, a_sum[j*CH +: CH], ra_sum[t-j][j*CH +: CH]);
          end
        end
      end
      for (int j = 0; j < 8; j++) begin
        if (t - j >= 0) begin
          checks++;
          if (b_sum[j*CH +: CH] !== rb_sum[t-j][j*CH +: CH]) begin
            failures++;
            $display("FAIL B sum chunk %0d sample %0d", j, t-j);
          end
        end
      end
      if (t - 4 >= 0) begin
        checks++;
        if (a_cout !== ra_cout[t-4]) begin
          failures++;
          $display("FAIL A carry sample %0d", t-4);
        end
      end
      for (int j = 0; j < 3; j++) begin
        if (t - j >= 0) begin
          checks++;
          if (c_sum[j] !== rc_sum[t-j][j]) begin
            failures++;
            $display("FAIL C bit %0d sample %0d", j, t-j);
          end
        end
      end
      a_in = skewed_in(t + 1, 5)[9:0];
      b_in = skewed_in(t + 1, 8);
      for (int j = 0; j < 3; j++) c_in[j] = (t + 1 - j >= 0) ? v[t+1-j][j] : 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
