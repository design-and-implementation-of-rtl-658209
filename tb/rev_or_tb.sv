// rev_or_tb: exhaustive self-checking test of the Fredkin-gate OR.
//
// For all four {A,B} it checks y = A or B, the garbage line g = A' + B and
// the pass-through a_copy = A against a hand-written table.
module rev_or_tb;

  logic a, b, a_copy, y, g;
  int   checks = 0, failures = 0;

  rev_or dut (.a(a), .b(b), .a_copy(a_copy), .y(y), .g(g));

  // Expected {a_copy, y, g} indexed by {A,B}.
  localparam logic [2:0] EXP [4] = '{3'b001, 3'b011, 3'b110, 3'b111};

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({a_copy, y, g} !== EXP[i]) begin
        failures++;
        $display("FAIL in=%02b out=%03b exp=%03b", 2'(i), {a_copy, y, g}, EXP[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : rev_or_tb
