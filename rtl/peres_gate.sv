// peres_gate: 3x3 reversible Peres gate (PG).
//
// Maps (A, B, C) to (P, Q, R) = (A, A xor B, AB xor C), a one-to-one mapping.
// With C tied to 0 it is a half adder: Q is the sum and R the carry of A and
// B, and P (a copy of A) is a garbage output. Purely combinational; the gate
// function is the one the design specifies.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = a ^ b;
    r = (a & b) ^ c;
  end
endmodule
