// scl_gate: 4-input, 4-output reversible SCL gate.
// Outputs: P = A, Q = B, R = C, S = A&(B|C) ^ D. The gate is its own
// inverse: feeding (P,Q,R,S) back in returns (A,B,C,D), which is what lets
// the decryption network reuse it unchanged. Purely combinational, no
// clock. The equations are those the design is built from; nothing here
// is a local choice.
module scl_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  always_comb begin
    p = a;
    q = b;
    r = c;
    s = (a & (b | c)) ^ d;
  end
endmodule
