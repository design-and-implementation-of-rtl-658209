// fredkin_gate: 3-input, 3-output reversible Fredkin (controlled-swap) gate.
//
//   P = A
//   Q = A'B + AC
//   R = A'C + AB
//
// A is the control: with A = 0 the data inputs B and C pass straight through,
// with A = 1 they are swapped. The two product terms of each output can never
// be 1 together, so writing the sums with xor instead of or gives the same
// gate. The gate is its own inverse and conserves the number of ones.
// Purely combinational, no clock. Quantum cost 5.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  localparam int unsigned QUANTUM_COST = rev_pkg::QC_FREDKIN;

  always_comb begin
    p = a;
    q = a ? c : b;
    r = a ? b : c;
  end

endmodule : fredkin_gate
