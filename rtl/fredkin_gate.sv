// fredkin_gate: 3-input, 3-output reversible Fredkin (controlled swap) gate.
// P = A, Q = ~A&B ^ A&C, R = ~A&C ^ A&B: when A is 1 the other two inputs
// trade places, otherwise they pass straight through. Self-inverse.
// Combinational.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = (~a & b) ^ (a & c);
    r = (~a & c) ^ (a & b);
  end
endmodule
