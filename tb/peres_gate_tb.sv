// peres_gate_tb: exhaustive self-checking test of the Peres gate.
//
// Applies all eight input patterns and compares P, Q, R with a truth table
// written out by hand (not with the gate's equations). It then checks the
// gate is reversible: the eight output patterns are all different, and the
// inverse A = P, B = P xor Q, C = R xor (P and B) returns the inputs.
module peres_gate_tb;

  logic a, b, c, p, q, r;
  int   checks = 0, failures = 0;

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  // Expected {P,Q,R} indexed by {A,B,C}.
  localparam logic [2:0] EXP [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                                     3'b110, 3'b111, 3'b101, 3'b100};

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] seen;
    logic       ib;
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
      ib = p ^ q;
      checks++;
      if ({p, ib, r ^ (p & ib)} !== 3'(i)) begin
        failures++;
        $display("FAIL inverse of %03b gives %03b", {p, q, r}, {p, ib, r ^ (p & ib)});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : peres_gate_tb
