// tsg_full_adder: a one-bit full adder made of a single TSG gate.
//
// The operand bits drive the TSG inputs a and b, the constant 0 drives c and
// the carry input drives d. The gate then delivers
//   prop = x ^ y           (TSG output q, the bit's carry propagate)
//   sum  = x ^ y ^ cin     (TSG output r)
//   cout = (x ^ y) cin ^ xy (TSG output s)
// TSG output p (a copy of x) is a garbage output and is left open.
//
// Interface: x, y, cin in; sum, cout, prop out, all one bit.
// Timing: purely combinational.
// One TSG gate per bit, with c = 0 and the carry on d, follows the adder
// described for the carry skip block; that the propagate is taken from q is
// read from the block diagram, which wires a third TSG output to the Fredkin
// AND chain.
module tsg_full_adder (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic sum,
  output logic cout,
  output logic prop
);

  tsg_gate u_tsg (
    .a (x),
    .b (y),
    .c (1'b0),
    .d (cin),
    .p (),
    .q (prop),
    .r (sum),
    .s (cout)
  );

endmodule
