// csla_dlatch16: 16-bit square-root carry select adder with D latches.
//
// sum/cout = a + b + cin. Bits 1:0 are a plain 2-bit ripple adder fed by cin.
// The upper 14 bits are four carry-select groups of 2, 3, 4 and 5 bits (bits
// 3:2, 6:4, 10:7, 15:11). Each upper group has one ripple adder whose carry in
// is the clock and a D latch enabled by the clock: in the high phase the latch
// captures the group's carry-in-1 result, in the low phase the adder produces
// the carry-in-0 result, and the carry from the group below (c1, c3, c6, c10)
// selects one of them. The carry out of the top group is cout.
//
// Timing: hold a, b and cin stable for one whole clock cycle, starting before
// a rising edge; sum and cout are valid during the following low phase. While
// clk is high the outputs are not meaningful. There are no flip-flops and no
// reset. The group widths come from csla_pkg.
//
// The partition, the select carries c1, c3, c6, c10 and the use of one adder
// and one latch per group follow the published design; the one-cycle timing
// with results read in the low phase follows from the latch phase chosen in
// latch_select_group.
module csla_dlatch16
  import csla_pkg::*;
(
  input  logic              clk,
  input  logic [N_BITS-1:0] a,
  input  logic [N_BITS-1:0] b,
  input  logic              cin,
  output logic [N_BITS-1:0] sum,
  output logic              cout
);

  // carry[g] is the selected carry out of group g.
  logic [NUM_GROUPS-1:0] carry;

  rca #(.WIDTH(GROUP_W[0])) u_rca_lsb (
    .a (a[GROUP_W[0]-1:0]),
    .b (b[GROUP_W[0]-1:0]),
    .ci(cin),
    .s (sum[GROUP_W[0]-1:0]),
    .co(carry[0])
  );

  for (genvar g = 1; g < NUM_GROUPS; g++) begin : g_group
    localparam int unsigned W   = GROUP_W[g];
    localparam int unsigned LSB = group_lsb(g);

    latch_select_group #(.WIDTH(W)) u_group (
      .clk  (clk),
      .a    (a[LSB +: W]),
      .b    (b[LSB +: W]),
      .c_sel(carry[g-1]),
      .s    (sum[LSB +: W]),
      .co   (carry[g])
    );
  end

  assign cout = carry[NUM_GROUPS-1];

endmodule
