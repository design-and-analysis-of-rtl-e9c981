// tb_double_peres_gate: exhaustive self-checking test of the double Peres gate.
// Applies all 16 input combinations. P, Q and R are checked against sums
// mod 2; S is checked as C xor majority(A, B, D), computed by counting ones,
// which is what (A xor B)D xor AB xor C reduces to. With C = 0 the gate must
// be a full adder (2S + R = A + B + D). The 16 output patterns must all be
// different.
module tb_double_peres_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  bit [15:0] seen;

  double_peres_gate dut (.a, .b, .c, .d, .p, .q, .r, .s);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      int ones;
      {a, b, c, d} = 4'(v);
      #10;
      ones = int'(a) + int'(b) + int'(d);
      checks++;
      if (p !== a || int'(q) != (int'(a) + int'(b)) % 2 || int'(r) != ones % 2 ||
          int'(s) != ((ones >= 2 ? 1 : 0) + int'(c)) % 2) begin
        failures++;
        $display("FAIL abcd=%b%b%b%b pqrs=%b%b%b%b", a, b, c, d, p, q, r, s);
      end
      if (c == 1'b0) begin
        checks++;
        if (2 * int'(s) + int'(r) != ones) begin
          failures++;
          $display("FAIL full adder a=%b b=%b d=%b sum=%b carry=%b", a, b, d, r, s);
        end
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output %b%b%b%b produced twice", p, q, r, s);
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
