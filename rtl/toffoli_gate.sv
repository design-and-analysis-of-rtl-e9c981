// toffoli_gate: 3x3 reversible Toffoli gate (TG).
//
// Maps (A, B, C) to (P, Q, R) = (A, B, AB xor C), a one-to-one mapping of the
// eight input combinations. In the multiplier C is tied to 0, so R is the
// partial product A AND B while P and Q hand both operands on to the next
// gate: this is how a value is fanned out without breaking reversibility.
// Purely combinational; the gate function is the one the design specifies.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = b;
    r = (a & b) ^ c;
  end
endmodule
