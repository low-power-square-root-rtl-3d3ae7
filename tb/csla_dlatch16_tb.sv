// csla_dlatch16_tb: end-to-end test of the 16-bit latch-based carry select
// adder at its own sizes.
//
// Clock period 10. For each operation the operands and carry in are applied
// in a low phase and held for one full clock cycle; in the next low phase
// {cout, sum} is compared with the integer a + b + cin, twice (early and late
// in the phase) to show the result holds for the whole phase. The result must
// be ready one clock cycle after the operands.
//
// Operands are corner cases (zero, all ones, carry rippling through every
// group) followed by random values. The testbench counts how often each group
// took the latched carry-in-1 result (select carry 1) and the live adder's
// carry-in-0 result (select carry 0), how often cin and cout were 1, and how
// often a carry rippled through all 16 bits; each must have happened at least
// once.
module csla_dlatch16_tb;
  import csla_pkg::*;

  localparam int unsigned N_RANDOM = 20000;

  logic              clk;
  logic [N_BITS-1:0] a, b, sum;
  logic              cin, cout;
  int checks = 0, failures = 0;
  int cycles;

  int sel_latch  [NUM_GROUPS-1];
  int sel_adder  [NUM_GROUPS-1];
  int n_cin, n_cout, n_ripple_all;

  initial begin
    clk    = 1'b0;
    cycles = 0;
  end
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  csla_dlatch16 dut (
    .clk (clk),
    .a   (a),
    .b   (b),
    .cin (cin),
    .sum (sum),
    .cout(cout)
  );

  initial begin : watchdog
    repeat (N_RANDOM + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string when);
    logic [N_BITS:0] expect_res;
    expect_res = (N_BITS + 1)'(a) + (N_BITS + 1)'(b) + (N_BITS + 1)'(cin);
    checks++;
    if ({cout, sum} !== expect_res) begin
      failures++;
      $display("FAIL %s: a=%h b=%h cin=%0b -> cout=%0b sum=%h, expected %h",
               when, a, b, cin, cout, sum, expect_res);
    end
  endtask

  task automatic run_op(logic [N_BITS-1:0] av, logic [N_BITS-1:0] bv, logic cv);
    int start;
    a = av; b = bv; cin = cv;
    start = cycles;
    @(negedge clk);
    #1;
    checks++;
    if (cycles - start != 1) begin
      failures++;
      $display("FAIL latency %0d cycles", cycles - start);
    end
    compare("early low phase");
    // Coverage of the selection in each upper group (carry out of group g).
    for (int g = 0; g < NUM_GROUPS - 1; g++) begin
      if (dut.carry[g]) sel_latch[g]++;
      else              sel_adder[g]++;
    end
    if (cin)  n_cin++;
    if (cout) n_cout++;
    if (((a ^ b) == '1) && cin) n_ripple_all++;
    #3;
    compare("late low phase");
  endtask

  initial begin
    n_cin = 0; n_cout = 0; n_ripple_all = 0;
    foreach (sel_latch[g]) begin
      sel_latch[g] = 0;
      sel_adder[g] = 0;
    end
    a = '0; b = '0; cin = 1'b0;
    @(negedge clk);

    run_op(16'h0000, 16'h0000, 1'b0);
    run_op(16'h0000, 16'h0000, 1'b1);
    run_op(16'hFFFF, 16'h0000, 1'b1);  // carry ripples through every group
    run_op(16'hAAAA, 16'h5555, 1'b1);  // same, propagate in every bit
    run_op(16'hFFFF, 16'hFFFF, 1'b1);
    run_op(16'hFFFF, 16'hFFFF, 1'b0);
    run_op(16'h8000, 16'h8000, 1'b0);  // carry only out of the top group
    // A carry generated at the top of each group, nothing else.
    run_op(16'h0002, 16'h0002, 1'b0);
    run_op(16'h0008, 16'h0008, 1'b0);
    run_op(16'h0040, 16'h0040, 1'b0);
    run_op(16'h0400, 16'h0400, 1'b0);

    for (int i = 0; i < N_RANDOM; i++)
      run_op(N_BITS'($urandom), N_BITS'($urandom), 1'($urandom));

    for (int g = 0; g < NUM_GROUPS - 1; g++) begin
      $display("group %0d: latched carry-in-1 result chosen %0d times, adder carry-in-0 result %0d times",
               g + 1, sel_latch[g], sel_adder[g]);
      checks += 2;
      if (sel_latch[g] == 0) begin
        failures++;
        $display("FAIL group %0d never selected its latch", g + 1);
      end
      if (sel_adder[g] == 0) begin
        failures++;
        $display("FAIL group %0d never selected its adder", g + 1);
      end
    end
    $display("cin=1: %0d, cout=1: %0d, carry through all bits: %0d", n_cin, n_cout, n_ripple_all);
    checks += 3;
    if (n_cin == 0)        begin failures++; $display("FAIL cin never 1"); end
    if (n_cout == 0)       begin failures++; $display("FAIL cout never 1"); end
    if (n_ripple_all == 0) begin failures++; $display("FAIL no full carry ripple"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
