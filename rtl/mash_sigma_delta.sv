// mash_sigma_delta: second-order MASH (1-1) sigma-delta converter with
// carry-pipelined adders.
//
// The input word x is IN_W bits: the upper OUT_W bits are the integer divider
// code and the lower FRAC_W bits the fraction. Stage 1 accumulates the fraction.
// Its upper chunks form m1 = integer part + carry, which is stage 1's
// quantized output. Stage 2 accumulates stage 1's fractional residue, and its
// carry c2 is differentiated. The output is
//     y[n] = m1[n] + c2[n] - c2[n-1]   (mod 2^OUT_W),
// so y averages to x / 2^FRAC_W with second-order shaped quantization noise.
//
// Every adder is cut into CHUNK-bit pieces with a carry register between them
// (pipe_accum, pipe_add). A PIPE SHIFT skews the input so chunk j enters j
// cycles late, and an ALIGN SHIFT realigns the output word. The converter has
// no global feedback, so pipelining adds only latency: x captured at clock edge
// n gives y[n] on the output after edge n + FRAC_W/CHUNK + OUT_W/CHUNK + 1,
// which is edge n+9 at the default sizes.
// That number follows from this implementation; the published text gives no
// latency. The structure (stage order, 6-bit most significant output of stage
// 1, 1-bit carry of stage 2, adder then subtractor, pipe/align shifts, two bits
// per stage) is the published one. The exact placement of the c2 delays is this
// design's own and differs from the published drawing by a constant shift.
// One output per clock. Reset is asynchronous, active low, and clears all
// state to zero.
module mash_sigma_delta
  import fracn_pkg::*;
#(
  parameter int unsigned IN_W  = SD_IN_W,
  parameter int unsigned OUT_W = SD_OUT_W,
  parameter int unsigned CHUNK = SD_CHUNK_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IN_W-1:0]  x,
  output logic [OUT_W-1:0] y
);

  localparam int unsigned FRAC_W  = IN_W - OUT_W;

  // PIPE SHIFT: chunk j of x reaches stage 1 at edge n+j.
  logic [IN_W-1:0] x_skew;
  skew_shift #(.WIDTH(IN_W), .CHUNK(CHUNK), .ALIGN(1'b0)) u_pipe_shift (
    .clk, .rst_n, .d(x), .q(x_skew)
  );

  // Stage 1: fraction accumulates, integer chunks add the carry.
  logic [IN_W-1:0] s1_skew;
  logic            s1_cout_unused;
  pipe_accum #(.WIDTH(IN_W), .CHUNK(CHUNK), .FB_WIDTH(FRAC_W)) u_stage1 (
    .clk, .rst_n, .in_skew(x_skew), .sum_skew(s1_skew), .carry_out(s1_cout_unused)
  );

  // Stage 2: integrates stage 1's residue. Its input chunks arrive already
  // skewed (chunk j of sample n after edge n+j), so stage 2 sees sample n at
  // edges n+1+j and its carry c2[n] is valid after edge n+FRAC_W/CHUNK.
  logic [FRAC_W-1:0] s2_skew_unused;
  logic              c2;
  pipe_accum #(.WIDTH(FRAC_W), .CHUNK(CHUNK), .FB_WIDTH(FRAC_W)) u_stage2 (
    .clk, .rst_n, .in_skew(s1_skew[FRAC_W-1:0]), .sum_skew(s2_skew_unused), .carry_out(c2)
  );

  // c2[n-1] is needed by the subtractor one edge after c2[n] is needed by the
  // adder: two register delays.
  logic [1:0] c2_dly;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c2_dly <= '0;
    else        c2_dly <= {c2_dly[0], c2};
  end

  // m1 chunk k (bits FRAC_W+k*CHUNK) of sample n is valid after edge
  // n+FRAC_W/CHUNK+k, so the output adder takes it at edge n+FRAC_W/CHUNK+1+k
  // together with c2[n] in its lowest chunk.
  logic [OUT_W-1:0] m1_skew;
  logic [OUT_W-1:0] add_skew;
  logic [OUT_W-1:0] sub_skew;
  assign m1_skew = s1_skew[IN_W-1 -: OUT_W];

  pipe_add #(.WIDTH(OUT_W), .CHUNK(CHUNK), .SUB(1'b0)) u_add (
    .clk, .rst_n, .a_skew(m1_skew), .b_skew({{(OUT_W-1){1'b0}}, c2}), .sum_skew(add_skew)
  );
  pipe_add #(.WIDTH(OUT_W), .CHUNK(CHUNK), .SUB(1'b1)) u_sub (
    .clk, .rst_n, .a_skew(add_skew), .b_skew({{(OUT_W-1){1'b0}}, c2_dly[1]}), .sum_skew(sub_skew)
  );

  // ALIGN SHIFT: all output chunks valid together after edge n+9 (default sizes).
  skew_shift #(.WIDTH(OUT_W), .CHUNK(CHUNK), .ALIGN(1'b1)) u_align_shift (
    .clk, .rst_n, .d(sub_skew), .q(y)
  );

  initial begin
    assert (IN_W > OUT_W && FRAC_W % CHUNK == 0 && OUT_W % CHUNK == 0)
      else $error("mash_sigma_delta: word widths must be multiples of CHUNK");
  end

endmodule
