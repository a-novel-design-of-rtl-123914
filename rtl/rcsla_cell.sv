// rcsla_cell: 1-bit reversible carry select adder cell.
//
// Two MPFAs compute the sum and carry of A and B for both possible carries
// in at once: MPFA2 with a constant carry in of 0 (S1, C1) and MPFA1 with a
// constant carry in of 1 (S2, C2). Two Fredkin gates, controlled by the real
// carry in, act as 2:1 multiplexers: Cin = 0 selects S1/C1, Cin = 1 selects
// S2/C2 as SUM and COUT. Every other gate output is garbage x1..x8.
// This structure and the constant inputs follow the document's cell diagram;
// which Fredkin data input receives which MPFA result is chosen here so that
// the multiplexer output Q carries the selected value, as the text requires.
// Purely combinational: COUT settles one Fredkin gate after Cin once the
// MPFAs have settled.
module rcsla_cell
  import rcsla_pkg::*;
(
  input  logic          a,
  input  logic          b,
  input  logic          cin,
  output logic          sum,
  output logic          cout,
  output cell_garbage_t garbage
);

  logic s1, c1, s2, c2;
  mpfa_garbage_t g_mpfa1, g_mpfa2;

  // Carry in 1 (ancilla ai1 = 0)
  mpfa u_mpfa1 (.a(a), .b(b), .ai1(1'b0), .cin(1'b1), .sum(s2), .cout(c2), .garbage(g_mpfa1));
  // Carry in 0 (ancilla ai1 = 0)
  mpfa u_mpfa2 (.a(a), .b(b), .ai1(1'b0), .cin(1'b0), .sum(s1), .cout(c1), .garbage(g_mpfa2));

  // Carry multiplexer: Q = cin ? C2 : C1
  fredkin_gate u_fg_carry (.a(cin), .b(c1), .c(c2), .p(garbage.x7), .q(cout), .r(garbage.x8));
  // Sum multiplexer: Q = cin ? S2 : S1
  fredkin_gate u_fg_sum   (.a(cin), .b(s1), .c(s2), .p(garbage.x5), .q(sum),  .r(garbage.x6));

  assign garbage.x1 = g_mpfa2.go1;
  assign garbage.x2 = g_mpfa2.go2;
  assign garbage.x3 = g_mpfa1.go1;
  assign garbage.x4 = g_mpfa1.go2;

endmodule
