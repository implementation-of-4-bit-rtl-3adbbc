// fredkin_gate: the 3x3 reversible Fredkin (controlled swap) gate.
//
// Input a is the control and passes straight through. When a is 0 the
// other two inputs pass straight through; when a is 1 they swap:
//   p = a
//   q = a'b + ac
//   r = ab + a'c
// Tying c to 0 turns r into the two-input AND a & b. Used with a as a select
// line, q is the 2:1 multiplexer "a ? c : b".
//
// Interface: single-bit inputs a, b, c and outputs p, q, r.
// Timing: purely combinational, no clock.
// The output equations are the standard Fredkin gate; port names are this
// design's own.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = (~a & b) | (a & c);
    r = (a & b) | (~a & c);
  end

endmodule
