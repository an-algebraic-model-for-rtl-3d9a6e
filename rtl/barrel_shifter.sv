// barrel_shifter: cyclic shifter of group G2, log n stages of 2:1
// multiplexers.
//
// The amount c = c_{log n} ... c_2 c_1 is taken bit by bit: the stage for
// amount bit i (0-based here) rotates the word by 2^i positions when that bit
// is set and passes it on unchanged otherwise, so that all stages together
// rotate by c. The bit at index j of a stage comes either from index j or
// from index j - 2^i (mod N) of the previous stage: each cell has two paths,
// as the butterfly-like wiring of the barrel shifter has. Bit i of din moves
// to bit (i + amt) mod N of dout (rotate toward the MSB).
// STAGES defaults to log2 N; a smaller value gives a shifter for amounts
// below 2^STAGES. Combinational, depth STAGES multiplexers.
module barrel_shifter #(
  parameter int N      = 64,
  parameter int STAGES = $clog2(N)
) (
  input  logic [N-1:0]      din,
  input  logic [STAGES-1:0] amt,
  output logic [N-1:0]      dout
);
  logic [N-1:0] stage [STAGES+1];

  assign stage[0] = din;
  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    localparam int D = (1 << i) % N;
    for (genvar j = 0; j < N; j++) begin : g_bit
      assign stage[i+1][j] = amt[i] ? stage[i][(j + N - D) % N] : stage[i][j];
    end
  end
  assign dout = stage[STAGES];
endmodule
