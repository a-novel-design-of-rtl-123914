// tb_rcsla_wide: self-checking test of the reversible carry select adder
// widened to 16 bits, showing that the cell chain scales beyond the 4-bit
// default.
//
// Applies 20000 vectors (random operands, with every eighth vector forcing
// A xor B to all ones so that a carry in crosses every cell) and compares
// {cout, sum} with the integer sum A + B + Cin. As in the 4-bit test it
// checks each cell's selected carry in and counts how often each mechanism
// happened: carry-in-0 selection, carry-in-1 selection, a carry out, and a
// carry that travels through every cell.
module tb_rcsla_wide;
  import rcsla_pkg::*;

  localparam int unsigned W = 16;

  logic [W-1:0]          a, b, sum;
  logic                  cin, cout;
  cell_garbage_t [W-1:0] garbage;
  int unsigned checks = 0, failures = 0;
  int unsigned n_sel0 = 0, n_sel1 = 0, n_cout = 0, n_full_ripple = 0;

  rcsla #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .garbage(garbage));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d cin=%0b got %0d expected %0d", what, a, b, cin, got, exp);
    end
  endtask

  initial begin
    longint unsigned total;
    logic [W:0] carries;
    for (int unsigned v = 0; v < 20000; v++) begin
      a   = W'($urandom);
      b   = W'($urandom);
      cin = 1'($urandom);
      // Every eighth vector makes every bit propagate, so the carry in
      // has to cross all cells.
      if (v % 8 == 0) begin
        b   = ~a;
        cin = v[3];
      end
      #1;
      total = longint'(a) + longint'(b) + longint'(cin);
      check("result", longint'({cout, sum}), total);
      // Carry into bit i is bit i of (a + b + cin) xor a xor b.
      carries = (W + 1)'(total) ^ {1'b0, a} ^ {1'b0, b};
      for (int i = 0; i < W; i++) begin
        check("cell carry in x5", longint'(garbage[i].x5), longint'(carries[i]));
        check("cell carry in x7", longint'(garbage[i].x7), longint'(carries[i]));
        if (garbage[i].x5) n_sel1++; else n_sel0++;
      end
      if (cout) n_cout++;
      if (cin && ((a ^ b) == '1)) n_full_ripple++;
    end
    checks += 4;
    if (n_sel0 == 0)        begin failures++; $display("FAIL never selected carry-in-0 result"); end
    if (n_sel1 == 0)        begin failures++; $display("FAIL never selected carry-in-1 result"); end
    if (n_cout == 0)        begin failures++; $display("FAIL never produced a carry out"); end
    if (n_full_ripple == 0) begin failures++; $display("FAIL carry never crossed every cell"); end
    $display("select0=%0d select1=%0d cout=%0d full_ripple=%0d", n_sel0, n_sel1, n_cout, n_full_ripple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
