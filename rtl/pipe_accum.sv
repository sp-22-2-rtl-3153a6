// pipe_accum: integrator with a carry-pipelined adder.
//
// The adder is cut into chunks of CHUNK bits. Each chunk has its own sum
// register and a carry register, so a carry moves up by only one chunk per
// clock cycle. Input and output are therefore "skewed": chunk j of sample n is
// taken at clock edge n+j and chunk j of the result is on sum_skew after that
// edge. carry_out is the carry out of the top chunk for sample n and is valid
// after edge n+NCH-1. There is no global feedback, so the extra latency does not
// change what is computed.
//
// Only the low FB_WIDTH bits are fed back and accumulate (modulo 2^FB_WIDTH).
// Chunks above FB_WIDTH just add the incoming carry to their input bits. With
// FB_WIDTH = WIDTH this is a plain pipelined integrator. With FB_WIDTH below
// WIDTH it is the first stage of the MASH converter: the upper chunks produce
// "integer part of the input plus overflow of the fractional accumulator".
// The chunk structure is the published one. The partial-feedback option is
// this design's own way of forming the converter's first-stage output.
// Reset is asynchronous and active low, and clears the state to zero.
module pipe_accum #(
  parameter int unsigned WIDTH    = 10,
  parameter int unsigned CHUNK    = 2,
  parameter int unsigned FB_WIDTH = WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] in_skew,
  output logic [WIDTH-1:0] sum_skew,
  output logic             carry_out
);

  localparam int unsigned NCH = WIDTH / CHUNK;

  logic [WIDTH-1:0] s_q;
  logic [NCH-1:0]   c_q;

  for (genvar j = 0; j < NCH; j++) begin : g_chunk
    localparam bit FEEDBACK = (j * CHUNK) < FB_WIDTH;
    logic [CHUNK-1:0] fb;
    logic             cin;
    assign fb  = FEEDBACK ? s_q[j*CHUNK +: CHUNK] : '0;
    if (j == 0) begin : g_lsb
      assign cin = 1'b0;
    end else begin : g_upper
      assign cin = c_q[j-1];
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s_q[j*CHUNK +: CHUNK] <= '0;
        c_q[j]                <= 1'b0;
      end else begin
        {c_q[j], s_q[j*CHUNK +: CHUNK]} <= {1'b0, fb} + {1'b0, in_skew[j*CHUNK +: CHUNK]}
                                           + {{CHUNK{1'b0}}, cin};
      end
    end
  end

  assign sum_skew  = s_q;
  assign carry_out = c_q[NCH-1];

  initial begin
    assert (WIDTH % CHUNK == 0 && FB_WIDTH % CHUNK == 0 && FB_WIDTH <= WIDTH)
      else $error("pipe_accum: WIDTH and FB_WIDTH must be multiples of CHUNK");
  end

endmodule
