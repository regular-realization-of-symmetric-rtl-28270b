// rev_pkg -- shared constants and gate-count formulas of the 2*2 net structure.
//
// The net realises an m-output totally symmetric function of n binary
// variables in three planes of reversible gates. The functions below give the
// number of gates each plane holds, as stated by the complexity theorems of the
// structure (n(n-1)/2 MAX/MIN cells, n-2 fan-out gates and n-1 Feynman gates in
// the second plane, at most one Feynman gate per index in the third plane).
// The planes export the same counts as parameters so that testbenches can hold
// the built structure against these formulas.
package rev_pkg;

  // Constant wires fed into reversible gates.
  localparam logic CONST0 = 1'b0;

  // MAX/MIN cells of the triangular plane: 1+2+...+(n-1).
  function automatic int unsigned minmax_cells(input int unsigned n);
    return (n * (n - 1)) / 2;
  endfunction

  // Fan-out gates of the second plane (one per inner threshold line).
  function automatic int unsigned fanout_gates(input int unsigned n);
    return (n >= 2) ? n - 2 : 0;
  endfunction

  // EXOR-forming Feynman gates of the second plane.
  function automatic int unsigned plane2_feynman_gates(input int unsigned n);
    return (n >= 1) ? n - 1 : 0;
  endfunction

endpackage
