// mpfa: Modified Peres Full Adder, a 4x4 reversible full adder made of two
// cascaded Peres gates.
//
// Peres gate 1 takes (A, B, ai1) and gives P1 = A (garbage GO1),
// Q1 = A xor B and R1 = AB xor ai1. Peres gate 2 takes (Q1, Cin, R1) and
// gives P2 = A xor B (garbage GO2), Q2 = A xor B xor Cin = Sum and
// R2 = (A xor B)Cin xor AB xor ai1. With the ancilla ai1 held at 0, R2 is
// the full-adder carry out. The two-Peres structure, port names and
// ai1 = 0 come from the document; the order in which gate 1's outputs and Cin
// enter gate 2 is chosen here so that the pair forms a full adder.
// Purely combinational, no clock.
module mpfa
  import rcsla_pkg::*;
(
  input  logic          a,
  input  logic          b,
  input  logic          ai1,   // ancilla input, 0 for full-adder use
  input  logic          cin,
  output logic          sum,
  output logic          cout,
  output mpfa_garbage_t garbage
);

  logic p1, q1, r1;

  peres_gate u_pg1 (.a(a),  .b(b),   .c(ai1), .p(p1),          .q(q1),  .r(r1));
  peres_gate u_pg2 (.a(q1), .b(cin), .c(r1),  .p(garbage.go2), .q(sum), .r(cout));

  assign garbage.go1 = p1;

endmodule
