// latch_select_group_tb: checks one latch-select group against integer sums.
//
// Two instances, 2 and 5 bits wide, share a clock of period 10. For every
// operand pair the operands are applied during a low phase, one clock cycle
// passes (high phase, in which the latch captures the carry-in-1 result,
// then low phase), and in the low phase the select is driven to 0 and then to
// 1: {co, s} must be a + b and then a + b + 1. The select is switched inside
// the low phase, as a late carry from the group below would be. The
// testbench also checks that the result is ready within one clock cycle of
// the operands, the latency the design promises.
module latch_select_group_tb;
  localparam int unsigned WA = 2;
  localparam int unsigned WB = 5;

  logic          clk;
  logic          c_sel;
  logic [WA-1:0] aa, ba, sa;
  logic          coa;
  logic [WB-1:0] ab, bb, sb;
  logic          cob;
  int checks = 0, failures = 0;
  int cycles;

  initial begin
    clk    = 1'b0;
    cycles = 0;
  end
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  latch_select_group dut_a (
    .clk(clk), .a(aa), .b(ba), .c_sel(c_sel), .s(sa), .co(coa)
  );
  latch_select_group #(.WIDTH(WB)) dut_b (
    .clk(clk), .a(ab), .b(bb), .c_sel(c_sel), .s(sb), .co(cob)
  );

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int start;
    c_sel = 1'b0;
    aa = '0; ba = '0; ab = '0; bb = '0;
    @(negedge clk);
    for (int v = 0; v < (1 << (2 * WB)); v++) begin
      // Apply operands in the low phase.
      {ab, bb} = (2 * WB)'(v);
      {aa, ba} = (2 * WA)'(v);
      c_sel = 1'($urandom);
      start = cycles;
      @(negedge clk);
      #1;
      checks++;
      if (cycles - start != 1) begin
        failures++;
        $display("FAIL latency %0d cycles", cycles - start);
      end
      // Late select: 0 first, then 1, both inside the low phase.
      c_sel = 1'b0;
      #1;
      checks += 2;
      if ({coa, sa} !== (WA + 1)'(int'(aa) + int'(ba))) begin
        failures++;
        $display("FAIL W=2 sel=0 a=%0d b=%0d -> %0d", aa, ba, {coa, sa});
      end
      if ({cob, sb} !== (WB + 1)'(int'(ab) + int'(bb))) begin
        failures++;
        $display("FAIL W=5 sel=0 a=%0d b=%0d -> %0d", ab, bb, {cob, sb});
      end
      c_sel = 1'b1;
      #1;
      checks += 2;
      if ({coa, sa} !== (WA + 1)'(int'(aa) + int'(ba) + 1)) begin
        failures++;
        $display("FAIL W=2 sel=1 a=%0d b=%0d -> %0d", aa, ba, {coa, sa});
      end
      if ({cob, sb} !== (WB + 1)'(int'(ab) + int'(bb) + 1)) begin
        failures++;
        $display("FAIL W=5 sel=1 a=%0d b=%0d -> %0d", ab, bb, {cob, sb});
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
