// triangular_plane -- first (triangular) plane of the 2*2 net: all positive
// unate symmetric functions of N binary variables.
//
// Column j (j = 1 .. N-1) belongs to input variable x[j] and holds j MAX/MIN
// cells. On entry to column j the lines lvl[j-1][0..j-1] carry the threshold
// functions of x[0..j-1], largest first: line i is 1 when at least i+1 of
// those inputs are 1. The new variable enters at the top cell; each cell
// passes the OR (max) of its two inputs on to its own line and the AND (min)
// down to the next cell, and the last AND becomes the new bottom line. After
// the last column, t[k-1] = S^{k..N}(x): "at least k of the N inputs are 1",
// so t[0] is the OR of all inputs and t[N-1] their AND, and each function
// contains the next one. The plane is N(N-1)/2 cells, each touching only its
// neighbours, with two garbage outputs per cell on g.
// The plane's function, its triangular, column-per-variable shape and its cell
// count follow the structure's description; the insertion order inside the
// triangle is this design's own choice. Purely combinational.
module triangular_plane
  import rev_pkg::*;
#(
  parameter int unsigned N = 4   // number of input variables
) (
  input  logic [N-1:0]       x,  // input variables
  output logic [N-1:0]       t,  // t[k-1] = 1 iff at least k inputs are 1
  output logic [N*(N-1)-1:0] g   // garbage, two bits per cell
);

  // Cell count, read by testbenches against the complexity bound.
  localparam int unsigned CELLS = minmax_cells(N);

  // lvl[j]: sorted lines after column j (bits above j unused, held at 0)
  logic [N-1:0] lvl [N];
  // carry[j]: value moving down column j, entering cell i on bit i
  logic [N:0]   carry [N];

  initial assert (N >= 2) else $error("triangular_plane needs N >= 2");

  assign lvl[0]   = N'(x[0]);
  assign carry[0] = '0;

  for (genvar j = 1; j < N; j++) begin : g_col
    localparam int unsigned BASE = (j * (j - 1)) / 2;  // first cell of column

    assign carry[j][0] = x[j];
    for (genvar i = 0; i < j; i++) begin : g_cell
      minmax_cell #(.W(1)) u_cell (
        .a    (carry[j][i]),
        .b    (lvl[j-1][i]),
        .max_o(lvl[j][i]),
        .min_o(carry[j][i+1]),
        .g_lo (g[2*(BASE+i)]),
        .g_hi (g[2*(BASE+i)+1])
      );
    end
    assign lvl[j][j] = carry[j][j];
    if (j + 1 < N) begin : g_pad
      assign lvl[j][N-1:j+1] = '0;
    end
    assign carry[j][N:j+1] = '0;
  end

  assign t = lvl[N-1];

endmodule
