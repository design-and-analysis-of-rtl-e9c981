// rev_mult4x4: 4x4 unsigned multiplier built only from reversible gates.
//
// Two stages, both combinational:
//   rev_ppg  16 Toffoli gates form the partial products x[i] & y[j];
//   rev_moa  4 Peres and 8 double Peres gates add them into op = x * y.
// The circuit has 28 gates, 28 constant-0 inputs and 28 garbage outputs.
// Ports follow the design's simulation trace:
//   x, y  4-bit operands;   op  8-bit product;
//   g     the 28 garbage outputs: g[7:0] = g0..g7 of the Toffoli array
//         (copies of x3..x0, y3..y0), g[27:8] = G1..G20 of the adder network;
//   q     partial products q[15:1], q[4*i + j] = x[i] & y[j] (the missing
//         q[0] = x[0] & y[0] equals op[0]).
// No clock: op settles one gate-network delay after x or y changes.
module rev_mult4x4
  import rev_mult_pkg::*;
(
  input  operand_t     x,
  input  operand_t     y,
  output product_t     op,
  output garbage_t     g,
  output logic [15:1]  q
);
  pp_t          pp;
  ppg_garbage_t ppg_garb;
  moa_garbage_t moa_garb;

  rev_ppg u_ppg (
    .x    (x),
    .y    (y),
    .pp   (pp),
    .garb (ppg_garb)
  );

  rev_moa u_moa (
    .pp   (pp),
    .z    (op),
    .garb (moa_garb)
  );

  assign g = {moa_garb, ppg_garb};
  assign q = pp[15:1];
endmodule
