// tb_rcsla_cell: exhaustive self-checking test of the 1-bit reversible carry
// select cell.
//
// For all eight (A, B, Cin) inputs it checks SUM and COUT against the integer
// sum A + B + Cin, and the garbage outputs against what the two MPFAs
// (carry in 0 and 1) and the two Fredkin multiplexers must leave behind:
// x1 = x3 = A, x2 = x4 = A xor B, x5 = x7 = Cin, and x6 / x8 the unselected
// sum / carry. It also checks the case a=1, b=1, cin=0 -> sum 0, carry 1.
module tb_rcsla_cell;
  import rcsla_pkg::*;

  logic a, b, cin, sum, cout;
  cell_garbage_t g;
  int unsigned checks = 0, failures = 0;

  rcsla_cell dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .garbage(g));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b cin=%0b got %0b expected %0b", what, a, b, cin, got, exp);
    end
  endtask

  initial begin
    int total, t0, t1;
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      t0    = int'(a) + int'(b);       // result with carry in 0
      t1    = t0 + 1;                  // result with carry in 1
      check("sum",  sum,  total % 2 == 1);
      check("cout", cout, total >= 2);
      check("x1", g.x1, a);
      check("x2", g.x2, t0 == 1);
      check("x3", g.x3, a);
      check("x4", g.x4, t0 == 1);
      check("x5", g.x5, cin);
      check("x7", g.x7, cin);
      check("x6", g.x6, cin ? (t0 % 2 == 1) : (t1 % 2 == 1));
      check("x8", g.x8, cin ? (t0 >= 2)     : (t1 >= 2));
    end
    {a, b, cin} = 3'b110;
    #1;
    check("example sum",  sum,  1'b0);
    check("example cout", cout, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
