// rev_ppg: reversible partial product generation for the 4x4 multiplier.
//
// A 4x4 array of Toffoli gates. The gate in row i, column j takes x[i] on A,
// y[j] on B and a constant 0 on C, so its R output is the partial product
// pp[4*i + j] = x[i] & y[j]. Reversible logic allows no direct fan-out, so
// each operand bit is instead copied from gate to gate: x[i] runs along its
// row from column 0 to column 3 through the A->P path, and y[j] runs down its
// column from row 3 (x3) to row 0 (x0) through the B->Q path. The copies that
// leave the end of a row or column are garbage outputs, numbered
//   garb[3-i] = copy of x[i] (g0 = x3 ... g3 = x0),
//   garb[7-j] = copy of y[j] (g4 = y3 ... g7 = y0).
// This array, its 16 constant inputs and the g0..g7 numbering follow the
// design's schematic; the bit order of garb is taken from its simulation
// trace. Purely combinational, no clock.
module rev_ppg
  import rev_mult_pkg::*;
(
  input  operand_t     x,
  input  operand_t     y,
  output pp_t          pp,
  output ppg_garbage_t garb
);
  // xw[i][j]: copy of x[i] entering column j; xw[i][N] leaves the row.
  logic [N:0] xw [N];
  // yw[j][k]: copy of y[j] entering the k-th row from the top (row N-1-k);
  // yw[j][N] leaves the column.
  logic [N:0] yw [N];

  for (genvar i = 0; i < N; i++) begin : g_row
    assign xw[i][0] = x[i];
    assign garb[N-1-i] = xw[i][N];
  end
  for (genvar j = 0; j < N; j++) begin : g_col
    assign yw[j][0] = y[j];
    assign garb[2*N-1-j] = yw[j][N];
  end

  for (genvar i = 0; i < N; i++) begin : g_tg_row
    for (genvar j = 0; j < N; j++) begin : g_tg_col
      toffoli_gate u_tg (
        .a (xw[i][j]),
        .b (yw[j][N-1-i]),
        .c (1'b0),
        .p (xw[i][j+1]),
        .q (yw[j][N-i]),
        .r (pp[pp_idx(i, j)])
      );
    end
  end
endmodule
