// fredkin_and_chain_tb: checks the Fredkin AND chain at its default width
// of 4 (all 16 inputs) and at widths 1 and 7 (all inputs), against the
// reduction AND of the input.
module fredkin_and_chain_tb;

  logic [3:0] in4;
  logic [0:0] in1;
  logic [6:0] in7;
  logic       y4, y1, y7;
  int         checks   = 0;
  int         failures = 0;

  fredkin_and_chain            dut4 (.in(in4), .y(y4));
  fredkin_and_chain #(.N(1))   dut1 (.in(in1), .y(y1));
  fredkin_and_chain #(.N(7))   dut7 (.in(in7), .y(y7));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    in1 = '0;
    in7 = '0;
    for (int i = 0; i < 16; i++) begin
      in4 = 4'(i);
      #1;
      checks++;
      if (y4 !== (i == 15)) begin
        failures++;
        $display("FAIL N=4 in=%4b: y=%b", in4, y4);
      end
    end
    for (int i = 0; i < 2; i++) begin
      in1 = 1'(i);
      #1;
      checks++;
      if (y1 !== in1[0]) begin
        failures++;
        $display("FAIL N=1 in=%b: y=%b", in1, y1);
      end
    end
    for (int i = 0; i < 128; i++) begin
      in7 = 7'(i);
      #1;
      checks++;
      if (y7 !== (i == 127)) begin
        failures++;
        $display("FAIL N=7 in=%7b: y=%b", in7, y7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
