// peres_gate: 3x3 reversible Peres gate.
//
// Outputs P = A, Q = A xor B, R = (A and B) xor C. The mapping from (A,B,C)
// to (P,Q,R) is one-to-one, so the inputs can always be recovered from the
// outputs. The equations are the document's. Purely combinational, no clock.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = a ^ b;
    r = (a & b) ^ c;
  end

endmodule
