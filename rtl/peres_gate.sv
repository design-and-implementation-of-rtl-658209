// peres_gate: 3-input, 3-output reversible Peres gate.
//
//   P = A
//   Q = A xor B
//   R = (A and B) xor C
//
// The mapping is a bijection on the eight input patterns, so the inputs can
// always be recovered from the outputs (A = P, B = P xor Q, C = R xor P.Q').
// Purely combinational, no clock; the outputs follow the inputs within the
// same evaluation. Quantum cost 4. The equations are the standard Peres
// gate; the port names are lower-case versions of the usual A, B, C / P, Q, R.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  localparam int unsigned QUANTUM_COST = rev_pkg::QC_PERES;

  always_comb begin
    p = a;
    q = a ^ b;
    r = (a & b) ^ c;
  end

endmodule : peres_gate
