// sym_net_top -- 2*2 net structure: a regular, reversible realisation of an
// M-output totally symmetric Boolean function of N variables.
//
// Three planes in a row, all combinational:
//   1. triangular_plane: N(N-1)/2 reversible MAX/MIN (OR/AND) cells give every
//      threshold function T_k = "at least k of the inputs are 1".
//   2. single_index_plane: N-2 fan-out and N-1 Feynman gates give the
//      single-index functions S^k = T_k xor T_{k+1} ("exactly k ones").
//   3. output_plane: rows of Feynman gates EXOR the S^k of each output's index
//      set; as the S^k are disjoint this is their OR.
// Every gate is reversible, so every signal that is not a wanted output
// leaves the structure as a garbage output: two per MAX/MIN cell (g_cells),
// the interval functions S^{k+1..N} of plane 2 (g_interval) and the S^k lines
// after plane 3 (g_single).
// INDEX_SET[j][k] = 1 puts index k (0 .. N) into output j's set, so f[j] = 1
// exactly when the number of 1 inputs is in that set. The default, N = 4 and
// M = 3, is the counter of ones: f is the binary count of 1s in x. The three
// planes follow the structure's description; the choice of default function
// is this design's.
module sym_net_top #(
  parameter int unsigned N = 4,              // input variables
  parameter int unsigned M = 3,              // outputs
  parameter logic [M-1:0][N:0] INDEX_SET = {5'b10000, 5'b01100, 5'b01010}
) (
  input  logic [N-1:0]       x,           // input variables
  output logic [M-1:0]       f,           // symmetric output functions
  output logic [N*(N-1)-1:0] g_cells,     // garbage of the MAX/MIN cells
  output logic [N-3:0]       g_interval,  // garbage interval functions
  output logic [N-1:0]       g_single     // single-index lines after plane 3
);

  logic [N-1:0] thr;   // T_k, k = 1 .. N
  logic [N-1:0] sing;  // S^k, k = 1 .. N

  triangular_plane #(.N(N)) u_plane1 (
    .x(x), .t(thr), .g(g_cells)
  );

  single_index_plane #(.N(N)) u_plane2 (
    .t(thr), .s(sing), .g(g_interval)
  );

  output_plane #(.N(N), .M(M), .INDEX_SET(INDEX_SET)) u_plane3 (
    .s(sing), .f(f), .s_out(g_single)
  );

endmodule
