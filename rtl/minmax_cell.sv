// minmax_cell -- reversible MAX/MIN cell built from two multi-valued Fredkin
// gates; for binary signals it is an OR/AND cell.
//
// It is the cell of the triangular plane: two inputs from its neighbours, two
// outputs to its neighbours (the larger and the smaller input) and two garbage
// outputs. The first gate takes the neighbour inputs as controls and the
// constants 0 and 1 as data, so its data outputs record the comparison:
// (0,1) when a < b, (1,0) otherwise. The second gate takes that pair as its
// controls and the pass-through copies of a and b as data (b on C, a on D), so
// it routes b to the MAX output and a to the MIN output when a < b, and the
// other way round when not. No signal is fanned out, and the 4-in/4-out map
// (a, b, 0, 1) -> (max, min, garbage) is one-to-one and conservative.
// That the cell is made of two multi-valued Fredkin gates, and what it
// computes, follow the structure's description; the exact wiring of the two
// gates, including the choice of the two constants, is this design's own.
// Purely combinational.
module minmax_cell #(
  parameter int unsigned W = 1   // bits per signal; 1 = binary (OR/AND)
) (
  input  logic [W-1:0] a,       // neighbour input
  input  logic [W-1:0] b,       // neighbour input
  output logic [W-1:0] max_o,   // max(a,b); OR for W = 1
  output logic [W-1:0] min_o,   // min(a,b); AND for W = 1
  output logic [W-1:0] g_lo,    // garbage: 0 if a < b, else 1
  output logic [W-1:0] g_hi     // garbage: 1 if a < b, else 0
);

  localparam logic [W-1:0] K0 = '0;
  localparam logic [W-1:0] K1 = W'(1);

  logic [W-1:0] a1, b1, r1, s1;

  // First gate: compare a with b, steer the constants.
  mvfg #(.W(W)) u_cmp (
    .a(a), .b(b), .c(K0), .d(K1),
    .p(a1), .q(b1), .r(r1), .s(s1)
  );

  // Second gate: controlled by the recorded comparison, sort the copies.
  mvfg #(.W(W)) u_sort (
    .a(r1), .b(s1), .c(b1), .d(a1),
    .p(g_lo), .q(g_hi), .r(max_o), .s(min_o)
  );

  // The cell is conservative: its neighbour outputs are the inputs, sorted.
  always_comb begin
    assert (max_o >= min_o);
    assert ((max_o == a && min_o == b) || (max_o == b && min_o == a));
  end

endmodule
