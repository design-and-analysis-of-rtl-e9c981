// tb_rev_ppg: exhaustive self-checking test of the partial product array.
// For all 256 operand pairs it checks every partial product bit against
// ((x >> i) & (y >> j)) & 1, and the garbage outputs against the operand
// copies they must carry (g0..g3 = x3..x0, g4..g7 = y3..y0).
module tb_rev_ppg;
  import rev_mult_pkg::*;

  operand_t     x, y;
  pp_t          pp;
  ppg_garbage_t garb;
  int checks = 0, failures = 0;

  rev_ppg dut (.x, .y, .pp, .garb);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xv = 0; xv < 16; xv++) begin
      for (int yv = 0; yv < 16; yv++) begin
        x = operand_t'(xv);
        y = operand_t'(yv);
        #10;
        for (int i = 0; i < 4; i++) begin
          for (int j = 0; j < 4; j++) begin
            checks++;
            if (int'(pp[4*i + j]) != (((xv >> i) & (yv >> j)) & 1)) begin
              failures++;
              $display("FAIL x=%0d y=%0d P%0d%0d=%b", xv, yv, i, j, pp[4*i + j]);
            end
          end
          checks++;
          if (int'(garb[3 - i]) != ((xv >> i) & 1) || int'(garb[7 - i]) != ((yv >> i) & 1)) begin
            failures++;
            $display("FAIL x=%0d y=%0d garbage=%b", xv, yv, garb);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
