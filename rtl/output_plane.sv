// output_plane -- third plane of the 2*2 net: a Feynman-gate plane that forms
// each output as an EXOR of single-index symmetric functions.
//
// The single-index lines S^1 .. S^N run through the plane as columns; each
// output is a row that starts from a constant and passes through a Feynman
// gate at every column it needs, the column line being the gate's control
// (passed on to the next row) and the row accumulator its target. Because the
// single-index functions are disjoint, their EXOR equals their OR, so the row
// realises S^I = OR of S^k over its index set I, like the OR plane of a PLA.
// Index 0 (no input is 1) has no line of its own: since S^0 xor S^1 xor ...
// xor S^N = 1, a row whose set holds index 0 starts from constant 1 and takes
// the columns NOT in its set instead. Gates per row = number of indices
// k >= 1 whose membership differs from that of index 0, at most N.
// INDEX_SET[j][k] = 1 puts index k in output j's set. The plane's function and
// its use of Feynman gates follow the structure's description; the constant-1
// handling of index 0 is this design's choice. Purely combinational.
module output_plane #(
  parameter int unsigned N = 4,              // number of input variables
  parameter int unsigned M = 3,              // number of outputs
  // default: counter of ones for N = 4 -- bit0 = S^{1,3}, bit1 = S^{2,3},
  // bit2 = S^{4}
  parameter logic [M-1:0][N:0] INDEX_SET = {5'b10000, 5'b01100, 5'b01010}
) (
  input  logic [N-1:0] s,      // s[k-1] = S^k
  output logic [M-1:0] f,      // f[j] = S^{INDEX_SET[j]}
  output logic [N-1:0] s_out   // the S^k lines after the last row (garbage)
);

  // Number of Feynman gates in the plane.
  function automatic int unsigned count_gates();
    int unsigned n = 0;
    for (int j = 0; j < int'(M); j++)
      for (int k = 1; k <= int'(N); k++)
        if (INDEX_SET[j][k] != INDEX_SET[j][0]) n++;
    return n;
  endfunction

  // Gate count, read by testbenches against the complexity bound.
  localparam int unsigned GATES = count_gates();

  logic [N-1:0] line [M+1];   // column lines entering row j
  logic [N:0]   acc  [M];     // acc[j][k]: row j after column k

  assign line[0] = s;

  for (genvar j = 0; j < M; j++) begin : g_row
    assign acc[j][0] = INDEX_SET[j][0];   // constant input of the row
    for (genvar k = 1; k <= N; k++) begin : g_col
      if (INDEX_SET[j][k] != INDEX_SET[j][0]) begin : g_gate
        feynman_gate u_fy (
          .a(line[j][k-1]), .b(acc[j][k-1]),
          .p(line[j+1][k-1]), .q(acc[j][k])
        );
      end else begin : g_wire
        assign line[j+1][k-1] = line[j][k-1];
        assign acc[j][k]      = acc[j][k-1];
      end
    end
    assign f[j] = acc[j][N];
  end

  assign s_out = line[M];

endmodule
