// feynman_gate -- Feynman (controlled-NOT) gate, 2 inputs and 2 outputs.
//
// P = A, Q = A xor B. The gate is linear and its own inverse. With B tied to
// constant 0 it is the fan-out gate of reversible logic (both outputs carry A),
// and with B tied to 1 it is an inverter that keeps its input. The net uses it
// for fan-out and for EXOR-ing symmetric functions in its second and third
// planes. Purely combinational.
module feynman_gate (
  input  logic a,  // control, passed through
  input  logic b,  // target
  output logic p,  // = A
  output logic q   // = A xor B
);

  always_comb begin
    p = a;
    q = a ^ b;
  end

endmodule
