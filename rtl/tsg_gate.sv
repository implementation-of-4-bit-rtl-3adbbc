// tsg_gate: the 4x4 reversible "TSG" gate.
//
// Four inputs map one-to-one onto four outputs, so every output pattern
// identifies its input pattern (the gate is reversible):
//   p = a
//   q = a'c' ^ b'
//   r = q ^ d
//   s = (q & d) ^ (a & b ^ c)
// With c tied to 0 the gate is a full adder: q = a ^ b (bit propagate),
// r = a ^ b ^ d (sum) and s = (a ^ b) d ^ ab (carry out).
//
// Interface: single-bit inputs a, b, c, d and outputs p, q, r, s.
// Timing: purely combinational, no clock.
// The four output equations are those of the published TSG gate and agree
// with its 16-row truth table; only the port names are this design's own.
module tsg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  always_comb begin
    p = a;
    q = (~a & ~c) ^ ~b;
    r = q ^ d;
    s = (q & d) ^ ((a & b) ^ c);
  end

endmodule
