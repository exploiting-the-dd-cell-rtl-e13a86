// xor_combiner: XOR-combining of the raw DD-cell bits for the TRNG.
//
// Each round folds the word in half: bit i of the result is bit i XOR bit
// i+L/2 of the input, L being the current length. After `rounds` rounds the
// N_CELLS input bits have become N_CELLS >> rounds output bits, in the low
// bits of `dout`; the upper bits are zero. `nbits` gives that count.
// With 128 cells and the default 4 rounds every output bit is the XOR of 16
// cells, 8 bits per excitation, which with NCLK = 16 gives the throughput
// law TP = N * f / (NCLK * 2^rounds).
//
// The halving per round follows the throughput formula of the document;
// pairing cells L/2 apart (so that every XOR mixes cells of different CLBs)
// is this design's choice, the document does not say which cells are paired.
// Purely combinational.
`timescale 1ps/1fs
module xor_combiner #(
  parameter int unsigned N_CELLS    = 128,
  parameter int unsigned MAX_ROUNDS = 7,
  parameter int unsigned ROUNDS_W   = 3
) (
  input  logic [N_CELLS-1:0]          din,
  input  logic [ROUNDS_W-1:0]         rounds,
  output logic [N_CELLS-1:0]          dout,
  output logic [$clog2(N_CELLS+1)-1:0] nbits
);

  logic [N_CELLS-1:0] stage [MAX_ROUNDS+1];

  // stage[k] holds N_CELLS >> k valid bits: the word after k rounds.
  always_comb begin
    stage[0] = din;
    for (int k = 1; k <= MAX_ROUNDS; k++) begin
      stage[k] = '0;
      for (int i = 0; i < (N_CELLS >> k); i++)
        stage[k][i] = stage[k-1][i] ^ stage[k-1][i + (N_CELLS >> k)];
    end
  end

  always_comb begin
    dout  = stage[0];
    nbits = ($clog2(N_CELLS+1))'(N_CELLS);
    for (int k = 1; k <= MAX_ROUNDS; k++) begin
      if (int'(rounds) == k) begin
        dout  = stage[k];
        nbits = ($clog2(N_CELLS+1))'(N_CELLS >> k);
      end
    end
  end

endmodule
