// mvfg -- multi-valued Fredkin gate (4 inputs, 4 outputs).
//
// The two control inputs pass straight through (P = A, Q = B). The two data
// inputs are routed straight (R = C, S = D) when A < B and crossed
// (R = D, S = C) otherwise. The gate is reversible (the controls are kept, so
// the routing can be undone) and conservative (the outputs are a permutation
// of the inputs). Signals only need an order relation; here they are W-bit
// unsigned numbers, and W = 1 gives the binary gate used by the net, where
// A < B means A = 0 and B = 1. The gate equations follow the structure's
// definition; the unsigned encoding of multi-valued signals is this design's
// choice. Purely combinational, no clock.
module mvfg #(
  parameter int unsigned W = 1   // bits per (multi-valued) signal
) (
  input  logic [W-1:0] a,  // control A
  input  logic [W-1:0] b,  // control B
  input  logic [W-1:0] c,  // data C
  input  logic [W-1:0] d,  // data D
  output logic [W-1:0] p,  // = A
  output logic [W-1:0] q,  // = B
  output logic [W-1:0] r,  // C if A < B else D
  output logic [W-1:0] s   // D if A < B else C
);

  logic less;

  always_comb begin
    less = (a < b);
    p    = a;
    q    = b;
    r    = less ? c : d;
    s    = less ? d : c;
  end

endmodule
