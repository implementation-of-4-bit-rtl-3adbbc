// fredkin_and_chain: an N-input AND built from N-1 Fredkin gates.
//
// Each Fredkin gate has its third input tied to 0, so its output r is the
// AND of its first two inputs. The gates are chained: the first ANDs in[0]
// and in[1], and each later gate ANDs the previous result with the next
// input bit. In the carry skip adder the inputs are the bit propagate
// signals and the output is the block propagate P.
//
// Parameter: N, the number of inputs (4 in the carry skip block, which then
// uses three gates). For N = 1 no gate is needed and y = in[0].
// Interface: in[N-1:0] in, y out. Timing: purely combinational.
// The gate count N-1 and the chain for AND4 follow the published block;
// the order in which the bits join the chain is this design's reading of
// the block diagram.
module fredkin_and_chain #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] in,
  output logic         y
);

  logic [N-1:0] partial;  // partial[i] = in[0] & ... & in[i]

  assign partial[0] = in[0];

  for (genvar i = 1; i < N; i++) begin : g_stage
    fredkin_gate u_fg (
      .a (in[i]),
      .b (partial[i-1]),
      .c (1'b0),
      .p (),
      .q (),
      .r (partial[i])
    );
  end

  assign y = partial[N-1];

endmodule
