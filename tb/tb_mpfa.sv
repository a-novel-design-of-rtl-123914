// tb_mpfa: exhaustive self-checking test of the Modified Peres Full Adder.
//
// For all sixteen (A, B, ai1, Cin) inputs it checks that Sum and Cout are the
// binary sum of A + B + Cin when ai1 = 0, that ai1 = 1 inverts Cout, that the
// garbage outputs are GO1 = A and GO2 = A xor B, and that the 4-in/4-out
// mapping is one-to-one.
module tb_mpfa;
  import rcsla_pkg::*;

  logic a, b, ai1, cin, sum, cout;
  mpfa_garbage_t garbage;
  int unsigned checks = 0, failures = 0;
  bit [15:0] seen;

  mpfa dut (.a(a), .b(b), .ai1(ai1), .cin(cin), .sum(sum), .cout(cout), .garbage(garbage));

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
      $display("FAIL %s: a=%0b b=%0b ai1=%0b cin=%0b got %0b expected %0b",
               what, a, b, ai1, cin, got, exp);
    end
  endtask

  initial begin
    int total;
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, ai1, cin} = 4'(v);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      check("sum",  sum,  total % 2 == 1);
      check("cout", cout, (total >= 2) != (ai1 == 1'b1));
      check("go1",  garbage.go1, a);
      check("go2",  garbage.go2, (int'(a) + int'(b)) == 1);
      checks++;
      if (seen[{garbage, sum, cout}]) begin
        failures++;
        $display("FAIL output pattern %04b produced twice", {garbage, sum, cout});
      end
      seen[{garbage, sum, cout}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
