// skew_shift: the PIPE SHIFT and ALIGN SHIFT delay blocks of the pipelined
// sigma-delta converter.
//
// The word is cut into chunks of CHUNK bits, chunk 0 holding the least
// significant bits. With ALIGN = 0 (PIPE SHIFT) chunk j is delayed by j clock
// cycles, so a chunk-pipelined adder receives each chunk in the cycle its carry
// arrives. With ALIGN = 1 (ALIGN SHIFT) chunk j is delayed by NCH-1-j cycles,
// which lines a skewed result back up into one word. Delays are plain
// registers cleared by the asynchronous active-low reset.
module skew_shift #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned CHUNK = 2,
  parameter bit          ALIGN = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  localparam int unsigned NCH = WIDTH / CHUNK;

  for (genvar j = 0; j < NCH; j++) begin : g_chunk
    localparam int unsigned DEPTH = ALIGN ? (NCH - 1 - j) : j;
    if (DEPTH == 0) begin : g_wire
      assign q[j*CHUNK +: CHUNK] = d[j*CHUNK +: CHUNK];
    end else begin : g_delay
      logic [CHUNK-1:0] dly [DEPTH];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < DEPTH; k++) dly[k] <= '0;
        end else begin
          dly[0] <= d[j*CHUNK +: CHUNK];
          for (int k = 1; k < DEPTH; k++) dly[k] <= dly[k-1];
        end
      end
      assign q[j*CHUNK +: CHUNK] = dly[DEPTH-1];
    end
  end

  initial begin
    assert (WIDTH % CHUNK == 0) else $error("skew_shift: WIDTH must be a multiple of CHUNK");
  end

endmodule
