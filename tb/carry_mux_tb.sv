// carry_mux_tb: checks the carry-select multiplexer at its default width (3)
// and at 6 bits (the top group's sum plus carry): y must equal in1 when sel is
// 1 and in0 when sel is 0, for random words.
module carry_mux_tb;
  localparam int unsigned W6 = 6;

  logic          sel;
  logic [2:0]    i0a, i1a, ya;
  logic [W6-1:0] i0b, i1b, yb;
  int checks = 0, failures = 0;

  carry_mux duta (.sel(sel), .in0(i0a), .in1(i1a), .y(ya));
  carry_mux #(.WIDTH(W6)) dutb (.sel(sel), .in0(i0b), .in1(i1b), .y(yb));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      sel = 1'(i & 1);
      i0a = 3'($urandom);
      i1a = 3'($urandom);
      i0b = W6'($urandom);
      i1b = W6'($urandom);
      #1;
      checks += 2;
      if (ya !== (sel ? i1a : i0a)) begin
        failures++;
        $display("FAIL W=3 sel=%0b in0=%h in1=%h y=%h", sel, i0a, i1a, ya);
      end
      if (yb !== (sel ? i1b : i0b)) begin
        failures++;
        $display("FAIL W=6 sel=%0b in0=%h in1=%h y=%h", sel, i0b, i1b, yb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
