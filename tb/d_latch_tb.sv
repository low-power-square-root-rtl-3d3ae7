// d_latch_tb: checks the level-sensitive latch.
// While en is high, q must follow every change of d after a short settle time;
// while en is low, q must keep the value d had when en fell, whatever d does.
// q_n must always be the complement of q. A short directed sequence on bit 0
// (d falls while enabled, pulses while disabled, pulses again once enabled)
// is followed by random data.
module d_latch_tb;
  localparam int unsigned W = 4;

  logic         en;
  logic [W-1:0] d, q, q_n, expect_q;
  int checks = 0, failures = 0;

  d_latch #(.WIDTH(W)) dut (.en(en), .d(d), .q(q), .q_n(q_n));

  task automatic check(string what);
    checks++;
    if (q !== expect_q || q_n !== ~expect_q) begin
      failures++;
      $display("FAIL %s: en=%0b d=%h q=%h q_n=%h expected q=%h", what, en, d, q, q_n, expect_q);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Enabled, d = 1: q = 1.
    en = 1'b1; d = 4'h1; #1; expect_q = 4'h1; check("transparent d=1");
    // d falls while enabled: q follows.
    d = 4'h0; #1; expect_q = 4'h0; check("transparent d=0");
    // Disable, then pulse d: q must stay 0.
    en = 1'b0; #1; check("closed");
    d = 4'h1; #1; check("hold during d pulse");
    d = 4'h0; #1; check("hold after d pulse");
    // Enable again, pulse d: q follows.
    en = 1'b1; #1; check("reopened");
    d = 4'h1; #1; expect_q = 4'h1; check("transparent pulse high");
    d = 4'h0; #1; expect_q = 4'h0; check("transparent pulse low");

    // Random phases.
    for (int i = 0; i < 2000; i++) begin
      en = 1'b1;
      d  = W'($urandom);
      #1;
      expect_q = d;
      check("random transparent");
      d = W'($urandom);
      #1;
      expect_q = d;
      check("random follow");
      en = 1'b0;
      #1;
      check("random close");
      for (int k = 0; k < 3; k++) begin
        d = W'($urandom);
        #1;
        check("random hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
