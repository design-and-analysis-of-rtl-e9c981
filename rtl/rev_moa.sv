// rev_moa: reversible multi-operand addition for the 4x4 multiplier.
//
// Adds the 16 partial products pp[4*i + j] (weight 2^(i+j)) column by column
// with 4 Peres gates used as half adders and 8 double Peres gates used as
// full adders, each with its C input tied to 0. Column k (weight 2^k) takes
// its partial products and the carries from column k-1; the gates sit in
// three rows, and each column's last gate delivers product bit Z_k:
//
//   Z0 = P00 (no gate)
//   Z1 : PG(P10, P01)                                  -> G1
//   Z2 : DPG(P20, P11, P02), then PG(c1, s2)           -> G2 G3, G7
//   Z3 : DPG(P30, P21, P12), DPG(c2a, P03, s3a),
//        PG(c2b, s3b)                                  -> G4 G5, G8 G9, G14
//   Z4 : PG(P31, P22), DPG(c3a, P13, s4a),
//        DPG(c3c, c3b, s4b)                            -> G6, G10 G11, G15 G16
//   Z5 : DPG(c4a, P23, P32), DPG(c4c, c4b, s5a)        -> G12 G13, G17 G18
//   Z6, Z7 : DPG(c5b, c5a, P33), carry out is Z7       -> G19 G20
//
// (arguments in A, B, D order for a DPG, A, B for a PG; Pij = x_i & y_j;
// sN/cN are the sum/carry of the gates above). For each gate the lower
// garbage number is its P output (= A) and, for a DPG, the higher one its
// Q output (= A xor B); garb[k-1] carries Gk.
//
// The gate count, gate kinds, the column a gate sits in and the G1..G20
// numbering follow the design's schematic. Which signal enters which gate
// input, and which of a DPG's two garbage outputs gets the lower number, are
// chosen so that the garbage bits agree with the design's published
// simulation values. Purely combinational, no clock.
module rev_moa
  import rev_mult_pkg::*;
(
  input  pp_t          pp,
  output product_t     z,
  output moa_garbage_t garb
);
  // Partial product Pij = x_i & y_j.
  function automatic logic P(input pp_t v, input int unsigned i, input int unsigned j);
    return v[pp_idx(i, j)];
  endfunction

  logic c1, s2, c2a, c2b, s3a, c3a, s3b, c3b, c3c;
  logic s4a, c4a, s4b, c4b, c4c, s5a, c5a, c5b;

  // Column 0
  assign z[0] = P(pp, 0, 0);

  // Row 1
  peres_gate u_pg1 (
    .a(P(pp, 1, 0)), .b(P(pp, 0, 1)), .c(1'b0),
    .p(garb[0]), .q(z[1]), .r(c1));
  double_peres_gate u_dpg2 (
    .a(P(pp, 2, 0)), .b(P(pp, 1, 1)), .c(1'b0), .d(P(pp, 0, 2)),
    .p(garb[1]), .q(garb[2]), .r(s2), .s(c2a));
  double_peres_gate u_dpg4 (
    .a(P(pp, 3, 0)), .b(P(pp, 2, 1)), .c(1'b0), .d(P(pp, 1, 2)),
    .p(garb[3]), .q(garb[4]), .r(s3a), .s(c3a));
  peres_gate u_pg6 (
    .a(P(pp, 3, 1)), .b(P(pp, 2, 2)), .c(1'b0),
    .p(garb[5]), .q(s4a), .r(c4a));

  // Row 2
  peres_gate u_pg7 (
    .a(c1), .b(s2), .c(1'b0),
    .p(garb[6]), .q(z[2]), .r(c2b));
  double_peres_gate u_dpg8 (
    .a(c2a), .b(P(pp, 0, 3)), .c(1'b0), .d(s3a),
    .p(garb[7]), .q(garb[8]), .r(s3b), .s(c3b));
  double_peres_gate u_dpg10 (
    .a(c3a), .b(P(pp, 1, 3)), .c(1'b0), .d(s4a),
    .p(garb[9]), .q(garb[10]), .r(s4b), .s(c4b));
  double_peres_gate u_dpg12 (
    .a(c4a), .b(P(pp, 2, 3)), .c(1'b0), .d(P(pp, 3, 2)),
    .p(garb[11]), .q(garb[12]), .r(s5a), .s(c5a));

  // Row 3
  peres_gate u_pg14 (
    .a(c2b), .b(s3b), .c(1'b0),
    .p(garb[13]), .q(z[3]), .r(c3c));
  double_peres_gate u_dpg15 (
    .a(c3c), .b(c3b), .c(1'b0), .d(s4b),
    .p(garb[14]), .q(garb[15]), .r(z[4]), .s(c4c));
  double_peres_gate u_dpg17 (
    .a(c4c), .b(c4b), .c(1'b0), .d(s5a),
    .p(garb[16]), .q(garb[17]), .r(z[5]), .s(c5b));
  double_peres_gate u_dpg19 (
    .a(c5b), .b(c5a), .c(1'b0), .d(P(pp, 3, 3)),
    .p(garb[18]), .q(garb[19]), .r(z[6]), .s(z[7]));
endmodule
