// toffoli_gate: 3-input, 3-output reversible Toffoli (controlled-controlled
// NOT) gate. P = A, Q = B, R = A&B ^ C. Self-inverse. Combinational.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = b;
    r = (a & b) ^ c;
  end
endmodule
