// latch_select_group: one carry-select group that reuses a single adder.
//
// A conventional carry select group has two ripple adders, one assuming a
// carry in of 0 and one assuming 1. Here one WIDTH-bit ripple adder does both
// additions in one clock cycle, time-shared by the clock:
//   clk high: the adder's carry in is 1 and the D latch is transparent, so the
//             latch follows the carry-in-1 result {co, s}.
//   clk low:  the latch closes and holds the carry-in-1 result, and the adder's
//             carry in becomes 0, so its live output is the carry-in-0 result.
// The multiplexer then picks the latch (c_sel = 1) or the adder (c_sel = 0),
// where c_sel is the carry out of the group below.
//
// Timing: a and b must be stable from before the rising edge of clk until the
// end of the following low phase. s and co are valid during the low phase
// only; during the high phase both multiplexer inputs carry the carry-in-1
// result. The latch holds WIDTH+1 bits (sum and carry).
//
// The clock-as-data path and the latch are intended. The latch's complement
// output is not needed here and is left unused.
//
// The single shared adder, the clock-enabled latch and the select rule (latch
// for a carry of 1, live adder for 0) follow the published design. Driving
// the adder's carry in from the clock, and the choice of the high phase for
// the latch, are this implementation's reading of how one adder yields both
// results.
module latch_select_group #(
  parameter int unsigned WIDTH = 2
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             c_sel,
  output logic [WIDTH-1:0] s,
  output logic             co
);

  logic [WIDTH:0] rca_res;    // {carry, sum} of the adder, carry in = clk
  logic [WIDTH:0] held_res;   // carry-in-1 result stored in the latch
  logic [WIDTH:0] held_res_n; // unused complement output of the latch
  logic [WIDTH:0] sel_res;

  rca #(.WIDTH(WIDTH)) u_rca (
    .a (a),
    .b (b),
    .ci(clk),
    .s (rca_res[WIDTH-1:0]),
    .co(rca_res[WIDTH])
  );

  d_latch #(.WIDTH(WIDTH + 1)) u_latch (
    .en (clk),
    .d  (rca_res),
    .q  (held_res),
    .q_n(held_res_n)
  );

  carry_mux #(.WIDTH(WIDTH + 1)) u_mux (
    .sel(c_sel),
    .in0(rca_res),
    .in1(held_res),
    .y  (sel_res)
  );

  assign s  = sel_res[WIDTH-1:0];
  assign co = sel_res[WIDTH];

endmodule
