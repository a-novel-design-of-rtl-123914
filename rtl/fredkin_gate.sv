// fredkin_gate: 3x3 reversible Fredkin (controlled swap) gate.
//
// Outputs P = A, Q = A'B + AC, R = AB + A'C: when the control A is 0, B and C
// pass straight through to Q and R; when A is 1 they are swapped. Output Q
// is therefore a 2:1 multiplexer (A ? C : B), which is how the carry select
// adder uses it. Equations as given in the document's gate diagram.
// Purely combinational, no clock.
module fredkin_gate (
  input  logic a,   // control
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = a ? c : b;
    r = a ? b : c;
  end

endmodule
