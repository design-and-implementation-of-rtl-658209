// rev_and: reversible two-input AND made of one Peres gate.
//
// The Peres gate's third input is tied to 0, so R = AB xor 0 = A and B. The
// other two outputs are A (pass-through) and A xor B; the decoder leaves them
// unused, as garbage outputs, but they are brought out so the gate stays a
// complete 3-in/3-out reversible cell. Combinational, quantum cost 4.
module rev_and (
  input  logic a,
  input  logic b,
  output logic a_copy,
  output logic x,
  output logic y
);

  localparam int unsigned QUANTUM_COST = rev_pkg::QC_PERES;

  peres_gate u_peres (
    .a (a),
    .b (b),
    .c (1'b0),
    .p (a_copy),
    .q (x),
    .r (y)
  );

endmodule : rev_and
