// single_index_plane -- second plane of the 2*2 net: threshold functions to
// single-index symmetric functions.
//
// Input t[k-1] = S^{k..N} ("at least k ones"). Neighbouring threshold
// functions differ in exactly one index, so S^k = t[k-1] xor t[k] for
// k = 1 .. N-1, and S^N = t[N-1]. The plane is a pair of gate columns:
// N-2 fan-out gates (Feynman gates with a constant-0 target) duplicate the
// inner lines t[1] .. t[N-2], then N-1 Feynman gates form the EXORs. Feynman
// gate k takes t[k] as control and t[k-1] as target; its target output is
// S^k and its control output repeats t[k]. For the last gate that repeat is
// S^N itself; for the others it is the interval function S^{k+1..N}, which
// leaves the plane as garbage on g.
// Output s[k-1] = S^k(x), k = 1 .. N: exactly one of them is 1 unless no
// input is 1 (index 0, handled by the output plane).
// Gate counts and function follow the structure's description; the pairing
// of copies with gates is this design's choice. Purely combinational.
module single_index_plane
  import rev_pkg::*;
#(
  parameter int unsigned N = 4   // number of input variables of the net
) (
  input  logic [N-1:0] t,  // threshold functions, t[k-1] = S^{k..N}
  output logic [N-1:0] s,  // single-index functions, s[k-1] = S^k
  output logic [N-3:0] g   // garbage: g[k-1] = S^{k+1..N}, k = 1 .. N-2
);

  // Gate counts, read by testbenches against the complexity bounds.
  localparam int unsigned FANOUTS  = fanout_gates(N);
  localparam int unsigned FEYNMANS = plane2_feynman_gates(N);

  initial assert (N >= 3) else $error("single_index_plane needs N >= 3");

  // Copies of each threshold line: ctl_copy feeds gate k-1 as control,
  // tgt_copy feeds gate k as target.
  logic [N-1:1] ctl_copy;
  logic [N-2:0] tgt_copy;

  assign tgt_copy[0]   = t[0];       // t[0] only serves as a target
  assign ctl_copy[N-1] = t[N-1];     // t[N-1] only serves as a control

  // Column 1: fan-out gates for the inner lines.
  for (genvar i = 1; i < N - 1; i++) begin : g_fanout
    feynman_gate u_fo (
      .a(t[i]), .b(CONST0),
      .p(ctl_copy[i]), .q(tgt_copy[i])
    );
  end

  // Column 2: S^k = T_k xor T_{k+1}.
  logic [N-2:0] pass;
  for (genvar i = 0; i < N - 1; i++) begin : g_xor
    feynman_gate u_fy (
      .a(ctl_copy[i+1]), .b(tgt_copy[i]),
      .p(pass[i]), .q(s[i])
    );
  end

  assign s[N-1] = pass[N-2];
  assign g      = pass[N-3:0];

endmodule
