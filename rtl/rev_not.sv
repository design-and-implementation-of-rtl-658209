// rev_not: reversible inverter made of one CNOT gate.
//
// The CNOT's data input is the signal A and its other input is the constant
// 1, so the xor output carries ~A while A itself passes through on the other
// output (a_copy). a_copy is the gate's pass-through line; in this design it
// is usually left unused (a garbage output). Combinational, quantum cost 1.
// The wiring (A and a constant 1) is the classic CNOT inverter; the port names
// are this design's own.
module rev_not (
  input  logic a,
  output logic a_copy,
  output logic y
);

  localparam int unsigned QUANTUM_COST = rev_pkg::QC_CNOT;

  cnot_gate u_cnot (
    .a (a),
    .b (1'b1),
    .p (a_copy),
    .q (y)
  );

endmodule : rev_not
