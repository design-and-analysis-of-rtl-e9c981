// tb_rev_mult4x4: end-to-end self-checking test of the 4x4 reversible
// multiplier, with the top at its only configuration.
//
// 1. The eight operand pairs of the reference simulation are applied at
//    100 ns intervals and op, g and q are compared with its printed values.
// 2. All 256 operand pairs are applied; op must equal x * y, q[4i+j] must be
//    x_i & y_j, and g[7:0] must carry the operand copies g0..g3 = x3..x0,
//    g4..g7 = y3..y0.
// 3. Reversibility of the whole circuit: with its 28 constant inputs fixed
//    at 0, the 36 outputs {op, g} must differ for every operand pair.
// Events counted (each must occur at least once): a carry into the top
// product bit (op[7] = 1), a product with every sum bit Z1..Z6 at 1
// (x * y = 126), and each of the 28 garbage outputs at 1.
module tb_rev_mult4x4;
  import rev_mult_pkg::*;

  operand_t    x, y;
  product_t    op;
  garbage_t    g;
  logic [15:1] q;
  int checks = 0, failures = 0;

  int ref_x  [8] = '{14, 7, 11, 2, 12, 5, 15, 8};
  int ref_y  [8] = '{15, 4, 1, 11, 14, 4, 1, 14};
  int ref_op [8] = '{210, 28, 11, 22, 168, 20, 15, 112};
  int ref_g  [8] = '{109816823, 46, 6541, 263636, 134754419, 42, 8079, 8305};
  int ref_q  [8] = '{32760, 546, 2056, 88, 30464, 514, 2184, 0};

  bit [35:0] outs [256];
  int carry_out_events = 0, full_column_events = 0;
  int garbage_high [GARBAGE_OUTPUTS];

  rev_mult4x4 dut (.x, .y, .op, .g, .q);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (garbage_high[b]) garbage_high[b] = 0;

    // 1. reference vectors
    for (int k = 0; k < 8; k++) begin
      x = operand_t'(ref_x[k]);
      y = operand_t'(ref_y[k]);
      #100;
      checks++;
      if (int'(op) != ref_op[k] || int'(g) != ref_g[k]) begin
        failures++;
        $display("FAIL ref %0d: x=%0d y=%0d op=%0d g=%0d, expected op=%0d g=%0d",
                 k, ref_x[k], ref_y[k], op, g, ref_op[k], ref_g[k]);
      end
      // The last pair's q value is not legible in the reference; it is
      // checked in step 2 like every other pair.
      if (k < 7) begin
        checks++;
        if (int'(q) != ref_q[k]) begin
          failures++;
          $display("FAIL ref %0d: q=%0d expected %0d", k, q, ref_q[k]);
        end
      end
    end

    // 2. all operand pairs
    for (int xv = 0; xv < 16; xv++) begin
      for (int yv = 0; yv < 16; yv++) begin
        x = operand_t'(xv);
        y = operand_t'(yv);
        #10;
        checks++;
        if (int'(op) != xv * yv) begin
          failures++;
          $display("FAIL x=%0d y=%0d op=%0d", xv, yv, op);
        end
        for (int i = 0; i < 4; i++) begin
          for (int j = 0; j < 4; j++) begin
            if (4*i + j == 0) continue;
            checks++;
            if (int'(q[4*i + j]) != (((xv >> i) & (yv >> j)) & 1)) begin
              failures++;
              $display("FAIL x=%0d y=%0d q[%0d]=%b", xv, yv, 4*i + j, q[4*i + j]);
            end
          end
          checks++;
          if (int'(g[3 - i]) != ((xv >> i) & 1) || int'(g[7 - i]) != ((yv >> i) & 1)) begin
            failures++;
            $display("FAIL x=%0d y=%0d g[7:0]=%b", xv, yv, g[7:0]);
          end
        end
        outs[16*xv + yv] = {op, g};
        if (op[7]) carry_out_events++;
        if (op[6:1] == 6'b111111) full_column_events++;
        for (int b = 0; b < int'(GARBAGE_OUTPUTS); b++) if (g[b]) garbage_high[b]++;
      end
    end

    // 3. reversibility of the whole circuit
    for (int m = 0; m < 256; m++) begin
      for (int n = m + 1; n < 256; n++) begin
        if (outs[m] == outs[n]) begin
          failures++;
          $display("FAIL operand pairs %0d and %0d give the same outputs", m, n);
        end
      end
    end
    checks++;

    $display("events: carry into op[7]=%0d, op[6:1] all ones=%0d", carry_out_events, full_column_events);
    checks++;
    if (carry_out_events == 0) begin failures++; $display("FAIL no carry into op[7]"); end
    checks++;
    if (full_column_events == 0) begin failures++; $display("FAIL op[6:1] never all ones"); end
    for (int b = 0; b < int'(GARBAGE_OUTPUTS); b++) begin
      checks++;
      if (garbage_high[b] == 0) begin
        failures++;
        $display("FAIL garbage output g[%0d] never 1", b);
      end
    end
    checks++;
    if (GATE_COUNT != 28 || CONST_INPUTS != 28 || GARBAGE_OUTPUTS != 28) begin
      failures++;
      $display("FAIL cost totals %0d/%0d/%0d", GATE_COUNT, CONST_INPUTS, GARBAGE_OUTPUTS);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
