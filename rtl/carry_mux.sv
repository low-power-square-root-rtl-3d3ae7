// carry_mux: carry-select multiplexer of one adder group.
//
// Chooses between the group's two precomputed results, each a word holding the
// group sum and its carry out: in1 (computed for a carry in of 1) when sel is
// 1, in0 (computed for a carry in of 0) when sel is 0. sel is the carry coming
// out of the group below. A 2*WIDTH-to-WIDTH multiplexer, combinational.
module carry_mux #(
  parameter int unsigned WIDTH = 3
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  output logic [WIDTH-1:0] y
);

  always_comb y = sel ? in1 : in0;

endmodule
