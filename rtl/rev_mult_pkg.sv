// rev_mult_pkg: shared sizes, types and cost figures of the 4x4 reversible
// multiplier.
//
// The multiplier is built only from reversible gates: a 4x4 array of Toffoli
// gates forms the partial products and a three-row network of Peres gates
// (half adders) and double Peres gates (full adders) adds them. Every gate
// gets one constant-0 input, and every gate output that is not used further
// is a garbage output. The cost figures below (28 gates, 28 constant inputs,
// 28 garbage outputs) are the design's published totals; the per-kind gate
// counts are read off its gate-level schematic and add up to them.
//
// Partial product numbering: pp[4*i + j] = x[i] & y[j], of weight 2^(i+j).
package rev_mult_pkg;

  localparam int unsigned N = 4;                 // operand width
  localparam int unsigned PP_BITS = N * N;       // 16 partial products
  localparam int unsigned PROD_BITS = 2 * N;     // 8-bit product

  localparam int unsigned TG_COUNT  = N * N;     // partial product generation
  localparam int unsigned PG_COUNT  = 4;         // half adders in the adder network
  localparam int unsigned DPG_COUNT = 8;         // full adders in the adder network
  localparam int unsigned GATE_COUNT = TG_COUNT + PG_COUNT + DPG_COUNT;  // 28

  // Each gate has exactly one input tied to 0.
  localparam int unsigned CONST_INPUTS = GATE_COUNT;                      // 28
  // Toffoli array: last copy of each x_i (row end) and each y_j (column end).
  localparam int unsigned PPG_GARBAGE = 2 * N;                            // g0..g7
  // Peres gate leaves P unused, double Peres gate leaves P and Q unused.
  localparam int unsigned MOA_GARBAGE = PG_COUNT + 2 * DPG_COUNT;         // G1..G20
  localparam int unsigned GARBAGE_OUTPUTS = PPG_GARBAGE + MOA_GARBAGE;    // 28

  typedef logic [N-1:0]           operand_t;
  typedef logic [PROD_BITS-1:0]   product_t;
  typedef logic [PP_BITS-1:0]     pp_t;
  typedef logic [PPG_GARBAGE-1:0] ppg_garbage_t;
  typedef logic [MOA_GARBAGE-1:0] moa_garbage_t;
  typedef logic [GARBAGE_OUTPUTS-1:0] garbage_t;

  // Bit position of partial product x[i] & y[j] in a pp_t.
  function automatic int unsigned pp_idx(input int unsigned i, input int unsigned j);
    return N * i + j;
  endfunction

endpackage
