// rev_pkg: constants shared by the reversible gate library.
//
// Each primitive gate carries its quantum cost, the number of elementary
// one- and two-qubit operations it takes to realise. The costs of the Peres
// (4), Fredkin (5) and CNOT (1) gates are the published values this library
// is built on; the decoder sums them to report the cost of its gate network.
package rev_pkg;

  localparam int unsigned QC_CNOT    = 1;
  localparam int unsigned QC_PERES   = 4;
  localparam int unsigned QC_FREDKIN = 5;

endpackage : rev_pkg
