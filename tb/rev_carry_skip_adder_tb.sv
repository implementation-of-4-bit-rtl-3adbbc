// rev_carry_skip_adder_tb: end-to-end test of the 4-bit reversible carry
// skip adder at its default width. It applies all 512 combinations of
// x, y and cin and checks {cout, s} against integer addition and p against
// "every bit propagates" (x ^ y all ones).
//
// It also counts the two ways the carry leaves the block and fails if
// either never happened:
//   skip   p = 1: cout is cin, carried around the adders by the skip gate
//                 (counted separately for cin = 0 and cin = 1);
//   ripple p = 0: cout is the carry out of the most significant adder
//                 (counted separately for cout = 0 and cout = 1).
module rev_carry_skip_adder_tb;

  logic [3:0] x, y, s;
  logic       cin, cout, p;
  int         checks   = 0;
  int         failures = 0;
  int         n_skip0  = 0, n_skip1 = 0;
  int         n_rip0   = 0, n_rip1  = 0;

  rev_carry_skip_adder dut (.x, .y, .cin, .s, .cout, .p);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int total;
    bit all_prop;
    for (int i = 0; i < 512; i++) begin
      {cin, x, y} = 9'(i);
      #1;
      total    = int'(x) + int'(y) + int'(cin);
      all_prop = ((x ^ y) == 4'hF);
      checks++;
      if ({cout, s} !== 5'(total)) begin
        failures++;
        $display("FAIL x=%0d y=%0d cin=%b: got %0d, expected %0d", x, y, cin, {cout, s}, total);
      end
      checks++;
      if (p !== all_prop) begin
        failures++;
        $display("FAIL x=%4b y=%4b: p=%b, expected %b", x, y, p, all_prop);
      end
      if (p) begin
        checks++;
        if (cout !== cin) begin
          failures++;
          $display("FAIL skip: x=%4b y=%4b cin=%b cout=%b", x, y, cin, cout);
        end
        if (cin) n_skip1++; else n_skip0++;
      end else begin
        if (cout) n_rip1++; else n_rip0++;
      end
    end
    $display("skip with cin=0: %0d, skip with cin=1: %0d, ripple cout=0: %0d, ripple cout=1: %0d",
             n_skip0, n_skip1, n_rip0, n_rip1);
    checks++;
    if (n_skip0 == 0 || n_skip1 == 0 || n_rip0 == 0 || n_rip1 == 0) begin
      failures++;
      $display("FAIL a carry path was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
