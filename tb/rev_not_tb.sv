// rev_not_tb: self-checking test of the CNOT inverter.
//
// For A = 0 and 1 it checks that y is the complement of A and that the
// pass-through output a_copy equals A.
module rev_not_tb;

  logic a, a_copy, y;
  int   checks = 0, failures = 0;

  rev_not dut (.a(a), .a_copy(a_copy), .y(y));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 1'b0;
    #1;
    checks++; if (y !== 1'b1 || a_copy !== 1'b0) failures++;
    a = 1'b1;
    #1;
    checks++; if (y !== 1'b0 || a_copy !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : rev_not_tb
