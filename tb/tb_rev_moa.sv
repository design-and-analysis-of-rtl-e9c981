// tb_rev_moa: exhaustive self-checking test of the adder network.
// The network must return the weighted sum of any set of partial product
// bits, sum over i, j of pp[4i+j] * 2^(i+j), which never exceeds 225 and so
// fits the 8-bit result. All 65536 input patterns are applied. In addition,
// for eight operand pairs whose garbage outputs are known from a reference
// simulation, the garbage word G20..G1 is compared with those values.
module tb_rev_moa;
  import rev_mult_pkg::*;

  pp_t          pp;
  product_t     z;
  moa_garbage_t garb;
  int checks = 0, failures = 0;

  // Reference: operands and the full 28-bit garbage word of the multiplier;
  // bits 27:8 of it are G20..G1.
  int ref_x [8] = '{14, 7, 11, 2, 12, 5, 15, 8};
  int ref_y [8] = '{15, 4, 1, 11, 14, 4, 1, 14};
  int ref_g [8] = '{109816823, 46, 6541, 263636, 134754419, 42, 8079, 8305};

  rev_moa dut (.pp, .z, .garb);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      int sum;
      pp = pp_t'(v);
      #1;
      sum = 0;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          if ((v >> (4*i + j)) & 1) sum += 1 << (i + j);
      checks++;
      if (int'(z) != sum) begin
        failures++;
        if (failures < 10) $display("FAIL pp=%h z=%0d expected %0d", pp, z, sum);
      end
    end
    for (int k = 0; k < 8; k++) begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          pp[4*i + j] = 1'(((ref_x[k] >> i) & (ref_y[k] >> j)) & 1);
      #1;
      checks++;
      if (int'(garb) != (ref_g[k] >> 8)) begin
        failures++;
        $display("FAIL x=%0d y=%0d garbage=%h expected %h", ref_x[k], ref_y[k], garb, ref_g[k] >> 8);
      end
      checks++;
      if (int'(z) != ref_x[k] * ref_y[k]) begin
        failures++;
        $display("FAIL x=%0d y=%0d z=%0d", ref_x[k], ref_y[k], z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
