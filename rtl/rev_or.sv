// rev_or: reversible two-input OR made of one Fredkin gate.
//
// The Fredkin gate's third input is tied to 1. Its Q output is then
// A'B + A.1 = A or B. The other outputs are A (pass-through) and
// R = A'.1 + AB = A' + B, garbage lines the decoder leaves unused. (Some
// descriptions of this cell label R as AB; the Fredkin equation gives A' + B,
// which is what is built.) Combinational, quantum cost 5.
module rev_or (
  input  logic a,
  input  logic b,
  output logic a_copy,
  output logic y,
  output logic g
);

  localparam int unsigned QUANTUM_COST = rev_pkg::QC_FREDKIN;

  fredkin_gate u_fredkin (
    .a (a),
    .b (b),
    .c (1'b1),
    .p (a_copy),
    .q (y),
    .r (g)
  );

endmodule : rev_or
