// tb_peres_gate: exhaustive self-checking test of the Peres gate.
// Applies all 8 input combinations, checks P = A, Q = (A + B) mod 2 and
// R = (A*B + C) mod 2, checks that the gate is a half adder when C = 0
// (2R + Q = A + B), and that the 8 output patterns are all different.
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit [7:0] seen;

  peres_gate dut (.a, .b, .c, .p, .q, .r);

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
      {a, b, c} = 3'(v);
      #10;
      checks++;
      if (p !== a || int'(q) != (int'(a) + int'(b)) % 2 ||
          int'(r) != (int'(a) * int'(b) + int'(c)) % 2) begin
        failures++;
        $display("FAIL abc=%b%b%b pqr=%b%b%b", a, b, c, p, q, r);
      end
      if (c == 1'b0) begin
        checks++;
        if (2 * int'(r) + int'(q) != int'(a) + int'(b)) begin
          failures++;
          $display("FAIL half adder a=%b b=%b sum=%b carry=%b", a, b, q, r);
        end
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
