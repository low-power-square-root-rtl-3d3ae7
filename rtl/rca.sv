// rca: WIDTH-bit ripple carry adder.
//
// A chain of WIDTH full adders; the carry out of bit i is the carry in of bit
// i+1, so the delay grows linearly with WIDTH. Inputs a, b and ci give the
// WIDTH-bit sum s and the carry out co. Combinational, no clock.
// In the adder, the least significant group is one of these fed by the
// external carry in; every upper group has one whose carry in is the clock.
module rca #(
  parameter int unsigned WIDTH = 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co
);

  logic [WIDTH:0] c;

  assign c[0] = ci;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (s[i]),
      .co(c[i+1])
    );
  end

  assign co = c[WIDTH];

endmodule
