// tb_peres_gate: exhaustive self-checking test of the 3x3 Peres gate.
//
// Applies all eight input patterns, compares P, Q, R with values computed
// from counts of ones (not from the gate equations' operators), checks that
// the eight output patterns are all different (the gate is reversible), and
// checks the worked example a=1, b=0, c=0 -> p=1, q=1, r=0.
module tb_peres_gate;

  logic a, b, c, p, q, r;
  int unsigned checks = 0, failures = 0;
  bit [7:0] seen;

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

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
      $display("FAIL %s: a=%0b b=%0b c=%0b got %0b expected %0b", what, a, b, c, got, exp);
    end
  endtask

  initial begin
    int ones_ab;
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      ones_ab = int'(a) + int'(b);
      check("p", p, a);
      check("q", q, ones_ab == 1);
      check("r", r, (ones_ab == 2) != (c == 1'b1));
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output pattern %03b produced twice", {p, q, r});
      end
      seen[{p, q, r}] = 1'b1;
    end
    {a, b, c} = 3'b100;
    #1;
    check("example p", p, 1'b1);
    check("example q", q, 1'b1);
    check("example r", r, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
