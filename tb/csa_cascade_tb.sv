// csa_cascade_tb: four 4-bit reversible carry skip blocks chained into a
// 16-bit adder, the way the blocks are meant to be used: the carry out of
// each block is the carry in of the next. 20000 random operand pairs, plus
// the corner cases that make the carry skip across several blocks, are
// checked against integer addition. The test counts, for each block, how
// often its skip gate passed the incoming carry on (p = 1) and fails if
// some block never skipped or never rippled.
module csa_cascade_tb;

  localparam int unsigned BLOCKS = 4;
  localparam int unsigned W      = 4 * BLOCKS;

  logic [W-1:0]      a, b, sum;
  logic              cin;
  logic [BLOCKS:0]   carry;
  logic [BLOCKS-1:0] p;
  int                checks   = 0;
  int                failures = 0;
  int                n_skip   [BLOCKS];
  int                n_ripple [BLOCKS];

  assign carry[0] = cin;

  for (genvar k = 0; k < BLOCKS; k++) begin : g_blk
    rev_carry_skip_adder u_blk (
      .x    (a[4*k +: 4]),
      .y    (b[4*k +: 4]),
      .cin  (carry[k]),
      .s    (sum[4*k +: 4]),
      .cout (carry[k+1]),
      .p    (p[k])
    );
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] va, input logic [W-1:0] vb, input logic vc);
    logic [W:0] want;
    a   = va;
    b   = vb;
    cin = vc;
    #1;
    want = {1'b0, va} + {1'b0, vb} + (W+1)'(vc);
    checks++;
    if ({carry[BLOCKS], sum} !== want) begin
      failures++;
      $display("FAIL %h + %h + %b: got %h, expected %h", va, vb, vc, {carry[BLOCKS], sum}, want);
    end
    for (int k = 0; k < BLOCKS; k++) begin
      if (p[k]) n_skip[k]++; else n_ripple[k]++;
    end
  endtask

  initial begin : stimulus
    for (int k = 0; k < BLOCKS; k++) begin
      n_skip[k]   = 0;
      n_ripple[k] = 0;
    end
    // Carry generated in block 0 and skipped through all later blocks.
    apply(16'h0001, 16'hFFFF, 1'b0);
    apply(16'hFFFF, 16'h0000, 1'b1);
    apply(16'hAAAA, 16'h5555, 1'b1);
    apply(16'hAAAA, 16'h5555, 1'b0);
    apply(16'h000F, 16'h0001, 1'b0);
    for (int i = 0; i < 20000; i++) begin
      apply(W'($urandom), W'($urandom), 1'($urandom));
    end
    // Operands chosen so that every block propagates.
    for (int i = 0; i < 200; i++) begin
      logic [W-1:0] r;
      r = W'($urandom);
      apply(r, ~r, 1'($urandom));
    end
    for (int k = 0; k < BLOCKS; k++) begin
      $display("block %0d: skipped %0d times, rippled %0d times", k, n_skip[k], n_ripple[k]);
      checks++;
      if (n_skip[k] == 0 || n_ripple[k] == 0) begin
        failures++;
        $display("FAIL block %0d did not use both carry paths", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
