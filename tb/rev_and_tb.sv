// rev_and_tb: exhaustive self-checking test of the Peres-gate AND.
//
// For all four {A,B} it checks y = A and B, x = A xor B and a_copy = A
// against a hand-written table.
module rev_and_tb;

  logic a, b, a_copy, x, y;
  int   checks = 0, failures = 0;

  rev_and dut (.a(a), .b(b), .a_copy(a_copy), .x(x), .y(y));

  // Expected {a_copy, x, y} indexed by {A,B}.
  localparam logic [2:0] EXP [4] = '{3'b000, 3'b010, 3'b110, 3'b101};

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
      if ({a_copy, x, y} !== EXP[i]) begin
        failures++;
        $display("FAIL in=%02b out=%03b exp=%03b", 2'(i), {a_copy, x, y}, EXP[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : rev_and_tb
