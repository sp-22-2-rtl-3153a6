// pipe_add: two-operand adder (or subtractor) with a carry pipeline.
//
// Same chunk timing as pipe_accum but without feedback: chunk j of both
// operands for sample n is taken at edge n+j, and chunk j of a+b (SUB = 0) or
// a-b (SUB = 1, done as a + ~b + 1) is on sum_skew after that edge. The result
// wraps modulo 2^WIDTH. Used for the output adder and subtractor of the MASH
// converter, which the published structure also pipelines.
module pipe_add #(
  parameter int unsigned WIDTH = 6,
  parameter int unsigned CHUNK = 2,
  parameter bit          SUB   = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] a_skew,
  input  logic [WIDTH-1:0] b_skew,
  output logic [WIDTH-1:0] sum_skew
);

  localparam int unsigned NCH = WIDTH / CHUNK;

  logic [WIDTH-1:0] s_q;
  logic [NCH-1:0]   c_q;
  logic [WIDTH-1:0] b_eff;

  assign b_eff = SUB ? ~b_skew : b_skew;

  for (genvar j = 0; j < NCH; j++) begin : g_chunk
    logic cin;
    if (j == 0) begin : g_lsb
      assign cin = SUB;
    end else begin : g_upper
      assign cin = c_q[j-1];
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s_q[j*CHUNK +: CHUNK] <= '0;
        c_q[j]                <= 1'b0;
      end else begin
        {c_q[j], s_q[j*CHUNK +: CHUNK]} <= {1'b0, a_skew[j*CHUNK +: CHUNK]}
                                           + {1'b0, b_eff[j*CHUNK +: CHUNK]}
                                           + {{CHUNK{1'b0}}, cin};
      end
    end
  end

  assign sum_skew = s_q;

  initial begin
    assert (WIDTH % CHUNK == 0) else $error("pipe_add: WIDTH must be a multiple of CHUNK");
  end

endmodule
