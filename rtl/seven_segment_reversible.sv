// seven_segment_reversible: BCD to seven-segment decoder built only from
// reversible gates.
//
// Inputs A B C D are one BCD digit, A the most significant bit. Outputs a..g
// drive a common-cathode display, so a 1 lights a segment. Segment a is the
// top bar, b upper right, c lower right, d the bottom bar, e lower left,
// f upper left and g the middle bar. Digits 0..9 show their usual glyphs,
// with 6 and 9 drawn with their tails. Codes 10..15 are not valid BCD. They
// are don't-cares and show whatever the equations below produce.
//
// The logic is the minimised sum of products of each segment:
//   a = A + C + BD + B'D'
//   b = B' + C'D' + CD
//   c = B + C' + D
//   e = B'D' + CD'
//   d = e + BC'D + B'C + A      (reuses e)
//   f = A + C'D' + BC' + BD'
//   g = A + BC' + B'C + CD'
// Only three gate kinds are used:
//   - a CNOT with one input at 1 is an inverter (rev_not);
//   - a Peres gate with C = 0 is an AND (rev_and);
//   - a Fredkin gate with C = 1 is an OR (rev_or).
// There are 3 inverters for B' C' D', 9 ANDs for the eight distinct products
// plus BC'D = (BC')D, and 17 two-input ORs chained per segment. The network's
// quantum cost, QUANTUM_COST, is 3*1 + 9*4 + 17*5 = 124. The decoder's
// function follows the usual seven-segment decoder. The equations, the gate
// count and this exact netlist are this design's own.
//
// Each gate also has outputs the decoder does not need: the pass-through copy
// of A, the Peres gate's A xor B, and the Fredkin gate's A' + B. These are the
// garbage outputs of a reversible network. They are collected in the *_garb
// vectors and left unread, so lint reports them as unused. That is expected.
// Where one signal feeds several gates it is read several times. A strictly
// reversible netlist would copy it with extra CNOT gates (target at 0); those
// copies are not modelled here.
//
// Purely combinational, no clock and no reset. The outputs settle in the same
// evaluation as the inputs change. The critical path is an inverter, two ANDs
// and three ORs deep (segment d).
module seven_segment_reversible (
  input  logic A,
  input  logic B,
  input  logic C,
  input  logic D,
  output logic a,
  output logic b,
  output logic c,
  output logic d,
  output logic e,
  output logic f,
  output logic g
);

  localparam int unsigned N_NOT = 3;
  localparam int unsigned N_AND = 9;
  localparam int unsigned N_OR  = 17;
  localparam int unsigned QUANTUM_COST = N_NOT * rev_pkg::QC_CNOT
                                       + N_AND * rev_pkg::QC_PERES
                                       + N_OR  * rev_pkg::QC_FREDKIN;

  // Garbage outputs: one pass-through per gate, plus the second output of
  // each AND (A xor B) and OR (A' + B).
  logic [N_NOT-1:0] not_garb;
  logic [N_AND-1:0] and_garb_p, and_garb_x;
  logic [N_OR-1:0]  or_garb_p,  or_garb_r;

  // ---------------------------------------------------------------- inverters
  logic nB, nC, nD;

  rev_not u_not_b (.a(B), .a_copy(not_garb[0]), .y(nB));
  rev_not u_not_c (.a(C), .a_copy(not_garb[1]), .y(nC));
  rev_not u_not_d (.a(D), .a_copy(not_garb[2]), .y(nD));

  // ----------------------------------------------------------------- products
  logic p_bd, p_nbnd, p_ncnd, p_cd, p_bnc, p_bnd, p_nbc, p_cnd, p_bncd;

  rev_and u_and_bd   (.a(B),     .b(D),  .a_copy(and_garb_p[0]), .x(and_garb_x[0]), .y(p_bd));
  rev_and u_and_nbnd (.a(nB),    .b(nD), .a_copy(and_garb_p[1]), .x(and_garb_x[1]), .y(p_nbnd));
  rev_and u_and_ncnd (.a(nC),    .b(nD), .a_copy(and_garb_p[2]), .x(and_garb_x[2]), .y(p_ncnd));
  rev_and u_and_cd   (.a(C),     .b(D),  .a_copy(and_garb_p[3]), .x(and_garb_x[3]), .y(p_cd));
  rev_and u_and_bnc  (.a(B),     .b(nC), .a_copy(and_garb_p[4]), .x(and_garb_x[4]), .y(p_bnc));
  rev_and u_and_bnd  (.a(B),     .b(nD), .a_copy(and_garb_p[5]), .x(and_garb_x[5]), .y(p_bnd));
  rev_and u_and_nbc  (.a(nB),    .b(C),  .a_copy(and_garb_p[6]), .x(and_garb_x[6]), .y(p_nbc));
  rev_and u_and_cnd  (.a(C),     .b(nD), .a_copy(and_garb_p[7]), .x(and_garb_x[7]), .y(p_cnd));
  rev_and u_and_bncd (.a(p_bnc), .b(D),  .a_copy(and_garb_p[8]), .x(and_garb_x[8]), .y(p_bncd));

  // --------------------------------------------------------------------- sums
  // Segment a = A + C + BD + B'D'
  logic s_a0, s_a1;
  rev_or u_or_a0 (.a(A),    .b(C),      .a_copy(or_garb_p[0]),  .y(s_a0), .g(or_garb_r[0]));
  rev_or u_or_a1 (.a(s_a0), .b(p_bd),   .a_copy(or_garb_p[1]),  .y(s_a1), .g(or_garb_r[1]));
  rev_or u_or_a2 (.a(s_a1), .b(p_nbnd), .a_copy(or_garb_p[2]),  .y(a),    .g(or_garb_r[2]));

  // Segment b = B' + C'D' + CD
  logic s_b0;
  rev_or u_or_b0 (.a(nB),   .b(p_ncnd), .a_copy(or_garb_p[3]),  .y(s_b0), .g(or_garb_r[3]));
  rev_or u_or_b1 (.a(s_b0), .b(p_cd),   .a_copy(or_garb_p[4]),  .y(b),    .g(or_garb_r[4]));

  // Segment c = B + C' + D
  logic s_c0;
  rev_or u_or_c0 (.a(B),    .b(nC),     .a_copy(or_garb_p[5]),  .y(s_c0), .g(or_garb_r[5]));
  rev_or u_or_c1 (.a(s_c0), .b(D),      .a_copy(or_garb_p[6]),  .y(c),    .g(or_garb_r[6]));

  // Segment e = B'D' + CD'
  rev_or u_or_e0 (.a(p_nbnd), .b(p_cnd), .a_copy(or_garb_p[7]), .y(e),    .g(or_garb_r[7]));

  // Segment d = e + BC'D + B'C + A
  logic s_d0, s_d1;
  rev_or u_or_d0 (.a(e),    .b(p_bncd), .a_copy(or_garb_p[8]),  .y(s_d0), .g(or_garb_r[8]));
  rev_or u_or_d1 (.a(s_d0), .b(p_nbc),  .a_copy(or_garb_p[9]),  .y(s_d1), .g(or_garb_r[9]));
  rev_or u_or_d2 (.a(s_d1), .b(A),      .a_copy(or_garb_p[10]), .y(d),    .g(or_garb_r[10]));

  // Segment f = A + C'D' + BC' + BD'
  logic s_f0, s_f1;
  rev_or u_or_f0 (.a(A),    .b(p_ncnd), .a_copy(or_garb_p[11]), .y(s_f0), .g(or_garb_r[11]));
  rev_or u_or_f1 (.a(s_f0), .b(p_bnc),  .a_copy(or_garb_p[12]), .y(s_f1), .g(or_garb_r[12]));
  rev_or u_or_f2 (.a(s_f1), .b(p_bnd),  .a_copy(or_garb_p[13]), .y(f),    .g(or_garb_r[13]));

  // Segment g = A + BC' + B'C + CD'
  logic s_g0, s_g1;
  rev_or u_or_g0 (.a(A),    .b(p_bnc),  .a_copy(or_garb_p[14]), .y(s_g0), .g(or_garb_r[14]));
  rev_or u_or_g1 (.a(s_g0), .b(p_nbc),  .a_copy(or_garb_p[15]), .y(s_g1), .g(or_garb_r[15]));
  rev_or u_or_g2 (.a(s_g1), .b(p_cnd),  .a_copy(or_garb_p[16]), .y(g),    .g(or_garb_r[16]));

endmodule : seven_segment_reversible
