// tb_fredkin_gate: exhaustive self-checking test of the 3x3 Fredkin gate.
//
// For all eight inputs it checks that P follows A, that B and C pass through
// unchanged when A = 0 and are exchanged when A = 1, that the number of ones
// is conserved, and that the mapping is one-to-one. It also checks the two
// worked examples (a=0,b=1,c=1 -> 0,1,1 and a=1,b=0,c=1 -> 1,1,0).
module tb_fredkin_gate;

  logic a, b, c, p, q, r;
  int unsigned checks = 0, failures = 0;
  bit [7:0] seen;

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [2:0] got, input logic [2:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b c=%0b got %03b expected %03b", what, a, b, c, got, exp);
    end
  endtask

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      if (a == 1'b0) check("pass", {p, q, r}, {a, b, c});
      else           check("swap", {p, q, r}, {a, c, b});
      check("ones conserved", 3'(int'(p) + int'(q) + int'(r)), 3'(int'(a) + int'(b) + int'(c)));
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output pattern %03b produced twice", {p, q, r});
      end
      seen[{p, q, r}] = 1'b1;
    end
    {a, b, c} = 3'b011; #1; check("example 011", {p, q, r}, 3'b011);
    {a, b, c} = 3'b101; #1; check("example 101", {p, q, r}, 3'b110);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
