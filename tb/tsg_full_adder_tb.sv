// tsg_full_adder_tb: exhaustive check of the one-TSG full adder against
// integer addition: {cout, sum} = x + y + cin and prop = x ^ y.
module tsg_full_adder_tb;

  logic x, y, cin;
  logic sum, cout, prop;
  int   checks   = 0;
  int   failures = 0;

  tsg_full_adder dut (.x, .y, .cin, .sum, .cout, .prop);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int total;
    for (int i = 0; i < 8; i++) begin
      {x, y, cin} = 3'(i);
      #1;
      total = int'(x) + int'(y) + int'(cin);
      checks++;
      if ({cout, sum} !== 2'(total)) begin
        failures++;
        $display("FAIL x=%b y=%b cin=%b: got cout,sum=%b%b, expected %0d", x, y, cin, cout, sum, total);
      end
      checks++;
      if (prop !== (x != y)) begin
        failures++;
        $display("FAIL x=%b y=%b: prop=%b", x, y, prop);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
