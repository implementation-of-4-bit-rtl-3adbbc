// rev_carry_skip_adder: an N-bit carry skip adder block made only of
// reversible gates (TSG and Fredkin).
//
// Structure (2N gates in all):
//   * N TSG full adders form a ripple carry adder, c[0] = cin,
//     c[i+1] = carry out of bit i, s[i] = sum of bit i.
//   * Each TSG adder also gives its bit propagate x[i] ^ y[i]. A chain of
//     N-1 Fredkin gates ANDs them into the block propagate p.
//   * One more Fredkin gate, controlled by p, chooses the block carry out:
//     cout = p ? cin : c[N]. When every bit propagates, cin goes straight
//     to cout without waiting for the ripple through the N adders; otherwise
//     the ripple carry c[N] leaves the block.
// In both cases cout equals the carry of x + y + cin, so the block computes
// {cout, s} = x + y + cin. The skip only shortens the worst-case carry
// path of a chain of such blocks; a zero-delay simulation cannot show that.
//
// Parameter: N, the block width (4, the published block).
// Interface: x, y (N bits) and cin in; s (N bits), cout and the block
// propagate p out. Timing: purely combinational, no clock and no reset.
// Follows the published block: TSG adders, Fredkin AND4 chain, Fredkin
// skip gate selecting cin when p = 1 and c4 otherwise. Which Fredkin input
// takes p, cin and c4 and which output is cout is this design's choice;
// bringing p out as a port is this design's addition.
module rev_carry_skip_adder #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout,
  output logic         p
);

  logic [N:0]   c;      // ripple carries, c[0] = cin
  logic [N-1:0] prop;   // bit propagates x[i] ^ y[i]

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    tsg_full_adder u_fa (
      .x    (x[i]),
      .y    (y[i]),
      .cin  (c[i]),
      .sum  (s[i]),
      .cout (c[i+1]),
      .prop (prop[i])
    );
  end

  fredkin_and_chain #(.N(N)) u_and (
    .in (prop),
    .y  (p)
  );

  // Skip gate: q = p'c[N] + p cin.
  fredkin_gate u_skip (
    .a (p),
    .b (c[N]),
    .c (cin),
    .p (),
    .q (cout),
    .r ()
  );

endmodule
