// fredkin_gate_tb: exhaustive self-checking test of the Fredkin gate.
//
// Applies all eight input patterns and compares P, Q, R with a hand-written
// truth table. It also checks the properties of a controlled swap: every
// output pattern is distinct, the gate applied twice gives back the input
// (it is its own inverse, checked through a second instance), and the number
// of ones is conserved.
module fredkin_gate_tb;

  logic a, b, c, p, q, r, p2, q2, r2;
  int   checks = 0, failures = 0;

  fredkin_gate dut  (.a(a), .b(b), .c(c), .p(p),  .q(q),  .r(r));
  fredkin_gate dut2 (.a(p), .b(q), .c(r), .p(p2), .q(q2), .r(r2));

  // Expected {P,Q,R} indexed by {A,B,C}.
  localparam logic [2:0] EXP [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                                     3'b100, 3'b110, 3'b101, 3'b111};

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] seen;
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if ({p, q, r} !== EXP[i]) begin
        failures++;
        $display("FAIL in=%03b out=%03b exp=%03b", 3'(i), {p, q, r}, EXP[i]);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %03b produced twice", {p, q, r});
      end
      seen[{p, q, r}] = 1'b1;
      checks++;
      if ({p2, q2, r2} !== 3'(i)) begin
        failures++;
        $display("FAIL gate twice on %03b gives %03b", 3'(i), {p2, q2, r2});
      end
      checks++;
      if ($countones({p, q, r}) != $countones(3'(i))) begin
        failures++;
        $display("FAIL ones not conserved for %03b", 3'(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : fredkin_gate_tb
