// cnot_gate: 2-input, 2-output reversible CNOT (Feynman) gate.
//
//   P = A
//   Q = A xor B
//
// A is the control and passes through; the target B is inverted when A is 1.
// The gate is its own inverse. With one input tied to 1 it becomes an
// inverter (see rev_not); with the target tied to 0 it copies the control,
// which is how a reversible network fans a signal out. Purely combinational,
// no clock. Quantum cost 1.
module cnot_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  localparam int unsigned QUANTUM_COST = rev_pkg::QC_CNOT;

  always_comb begin
    p = a;
    q = a ^ b;
  end

endmodule : cnot_gate
