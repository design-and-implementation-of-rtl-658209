// cnot_gate_tb: exhaustive self-checking test of the CNOT gate.
//
// Applies all four input patterns, compares P and Q with a hand-written truth
// table, and checks that a second CNOT on the outputs restores the inputs
// (the gate is its own inverse).
module cnot_gate_tb;

  logic a, b, p, q, p2, q2;
  int   checks = 0, failures = 0;

  cnot_gate dut  (.a(a), .b(b), .p(p),  .q(q));
  cnot_gate dut2 (.a(p), .b(q), .p(p2), .q(q2));

  // Expected {P,Q} indexed by {A,B}.
  localparam logic [1:0] EXP [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

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
      if ({p, q} !== EXP[i]) begin
        failures++;
        $display("FAIL in=%02b out=%02b exp=%02b", 2'(i), {p, q}, EXP[i]);
      end
      checks++;
      if ({p2, q2} !== 2'(i)) begin
        failures++;
        $display("FAIL gate twice on %02b gives %02b", 2'(i), {p2, q2});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : cnot_gate_tb
