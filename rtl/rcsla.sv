// rcsla: WIDTH-bit reversible carry select adder (4 bits by default).
//
// The adder is a chain of WIDTH 1-bit carry select cells. Each cell holds
// its own pair of MPFAs, which work out sum and carry for a carry in of 0
// and of 1 in parallel, so that the incoming carry only has to pass through
// one Fredkin multiplexer per bit. Cell i takes bit i of A and B and the
// carry out of cell i-1 (cell 0 takes cin); the carry out of the last cell
// is cout. A 4-bit adder is 4 cells = 8 MPFAs + 8 Fredkin gates, the count
// the document gives. The document does not spell out how the cells are
// joined; chaining carry out to carry in is this design's reading.
// The per-cell garbage outputs are brought out on `garbage` for inspection
// and may be left unconnected. Purely combinational, no clock or reset.
module rcsla
  import rcsla_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0]          a,
  input  logic [WIDTH-1:0]          b,
  input  logic                      cin,
  output logic [WIDTH-1:0]          sum,
  output logic                      cout,
  output cell_garbage_t [WIDTH-1:0] garbage
);

  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    rcsla_cell u_cell (
      .a      (a[i]),
      .b      (b[i]),
      .cin    (carry[i]),
      .sum    (sum[i]),
      .cout   (carry[i+1]),
      .garbage(garbage[i])
    );
  end

  assign cout = carry[WIDTH];

endmodule
