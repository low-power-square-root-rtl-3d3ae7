// full_adder: one-bit full adder, the cell the ripple carry adders are built from.
//
// s  = a xor b xor ci
// co = majority(a, b, ci)
// Purely combinational, no clock. The equations are the textbook ones; the
// gate-level form of the cell is left to synthesis.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end

endmodule
