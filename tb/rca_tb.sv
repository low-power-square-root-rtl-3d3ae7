// rca_tb: exhaustive check of the ripple carry adder at the default width (2)
// and at 5 bits, the widest group of the 16-bit adder. {co, s} is compared
// with the integer sum a + b + ci for every input combination.
module rca_tb;
  localparam int unsigned W2 = 2;
  localparam int unsigned W5 = 5;

  logic [W2-1:0] a2, b2, s2;
  logic          ci2, co2;
  logic [W5-1:0] a5, b5, s5;
  logic          ci5, co5;
  int checks = 0, failures = 0;

  rca dut2 (.a(a2), .b(b2), .ci(ci2), .s(s2), .co(co2));
  rca #(.WIDTH(W5)) dut5 (.a(a5), .b(b5), .ci(ci5), .s(s5), .co(co5));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * W2 + 1)); v++) begin
      {ci2, a2, b2} = (2 * W2 + 1)'(v);
      #1;
      checks++;
      if ({co2, s2} !== (W2 + 1)'(int'(a2) + int'(b2) + int'(ci2))) begin
        failures++;
        $display("FAIL W=2 a=%0d b=%0d ci=%0b -> %0d", a2, b2, ci2, {co2, s2});
      end
    end
    for (int v = 0; v < (1 << (2 * W5 + 1)); v++) begin
      {ci5, a5, b5} = (2 * W5 + 1)'(v);
      #1;
      checks++;
      if ({co5, s5} !== (W5 + 1)'(int'(a5) + int'(b5) + int'(ci5))) begin
        failures++;
        $display("FAIL W=5 a=%0d b=%0d ci=%0b -> %0d", a5, b5, ci5, {co5, s5});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
