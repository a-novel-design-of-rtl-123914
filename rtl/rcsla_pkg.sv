// rcsla_pkg: types and constants shared by the reversible carry select adder.
//
// The adder is built from 3x3 reversible gates. Every gate output that does
// not carry a useful result is a "garbage" output; it is kept visible as a
// port so that the reversible structure (and the garbage count) can be
// inspected in simulation. The grouping of garbage bits into structs is a
// choice of this RTL; the names x1..x8 and go1/go2 follow the gate diagrams.
package rcsla_pkg;

  // Garbage outputs of one Modified Peres Full Adder (MPFA).
  typedef struct packed {
    logic go2;   // P output of the second Peres gate: A xor B
    logic go1;   // P output of the first Peres gate: A
  } mpfa_garbage_t;

  // Garbage outputs of one 1-bit carry select cell: x1..x4 from the two
  // MPFAs, x5..x8 from the two Fredkin multiplexers.
  typedef struct packed {
    logic x8, x7, x6, x5, x4, x3, x2, x1;
  } cell_garbage_t;

endpackage
