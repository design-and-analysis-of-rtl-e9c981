// double_peres_gate: 4x4 reversible double Peres gate (DPG).
//
// Maps (A, B, C, D) to (P, Q, R, S) with
//   P = A, Q = A xor B, R = A xor B xor D, S = (A xor B)D xor AB xor C,
// a one-to-one mapping of the sixteen input combinations. With C tied to 0 it
// is a full adder of A, B and D: R is the sum and S the carry (the majority
// of the three), while P and Q are garbage outputs. Purely combinational; the
// gate function is the one the design specifies.
module double_peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic axb;

  always_comb begin
    axb = a ^ b;
    p   = a;
    q   = axb;
    r   = axb ^ d;
    s   = (axb & d) ^ (a & b) ^ c;
  end
endmodule
