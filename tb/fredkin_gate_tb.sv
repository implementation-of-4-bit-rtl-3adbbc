// fredkin_gate_tb: exhaustive check of the Fredkin gate as a controlled
// swap. The reference is behavioural: with a = 0 the outputs are (a, b, c),
// with a = 1 they are (a, c, b). The test also checks reversibility (no two
// inputs share an output) and the two uses made of the gate in the adder:
// r = a & b when c = 0, and q = a ? c : b.
module fredkin_gate_tb;

  logic a, b, c;
  logic p, q, r;
  int   checks   = 0;
  int   failures = 0;

  fredkin_gate dut (.a, .b, .c, .p, .q, .r);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    bit [7:0]   seen;
    logic [2:0] want;
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      want = a ? {a, c, b} : {a, b, c};
      checks++;
      if ({p, q, r} !== want) begin
        failures++;
        $display("FAIL abc=%3b: got pqr=%3b, expected %3b", 3'(i), {p, q, r}, want);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL abc=%3b: output %3b repeated", 3'(i), {p, q, r});
      end
      seen[{p, q, r}] = 1'b1;
      if (!c) begin
        checks++;
        if (r !== (a & b)) begin
          failures++;
          $display("FAIL abc=%3b: r is not a AND b", 3'(i));
        end
      end
      checks++;
      if (q !== (a ? c : b)) begin
        failures++;
        $display("FAIL abc=%3b: q is not the multiplexer a ? c : b", 3'(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
