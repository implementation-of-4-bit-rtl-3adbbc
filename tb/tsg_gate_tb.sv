// tsg_gate_tb: exhaustive check of the TSG gate against its 16-row truth
// table. The expected outputs {p,q,r,s} are written out row by row, indexed
// by the input pattern {a,b,c,d}. The test also checks that no two input
// patterns give the same output pattern, i.e. that the gate is reversible.
module tsg_gate_tb;

  logic a, b, c, d;
  logic p, q, r, s;
  int   checks   = 0;
  int   failures = 0;

  // Expected {p,q,r,s} for {a,b,c,d} = 0 .. 15.
  localparam logic [3:0] EXPECTED [16] = '{
    4'b0000, 4'b0010, 4'b0111, 4'b0100,
    4'b0110, 4'b0101, 4'b0001, 4'b0011,
    4'b1110, 4'b1101, 4'b1111, 4'b1100,
    4'b1001, 4'b1011, 4'b1000, 4'b1010
  };

  tsg_gate dut (.a, .b, .c, .d, .p, .q, .r, .s);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    bit [15:0] seen;
    seen = '0;
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      checks++;
      if ({p, q, r, s} !== EXPECTED[i]) begin
        failures++;
        $display("FAIL abcd=%4b: got pqrs=%4b, expected %4b", 4'(i), {p, q, r, s}, EXPECTED[i]);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL abcd=%4b: output pattern %4b repeated, gate not reversible", 4'(i), {p, q, r, s});
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
