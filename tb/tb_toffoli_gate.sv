// tb_toffoli_gate: exhaustive self-checking test of the Toffoli gate.
// Applies all 8 input combinations, checks (P, Q, R) against
// R = C xor (A and B) worked out with integer arithmetic, and checks that
// the 8 output patterns are all different (the gate is reversible).
module tb_toffoli_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit [7:0] seen;

  toffoli_gate dut (.a, .b, .c, .p, .q, .r);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      int exp_r;
      {a, b, c} = 3'(v);
      #10;
      exp_r = (int'(a) * int'(b) + int'(c)) % 2;
      checks++;
      if (p !== a || q !== b || int'(r) != exp_r) begin
        failures++;
        $display("FAIL abc=%b%b%b pqr=%b%b%b", a, b, c, p, q, r);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %b%b%b produced twice", p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
