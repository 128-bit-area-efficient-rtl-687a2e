// sqrt_csla16: 16-bit area-efficient square-root carry select adder.
//
// {cout, s} = a + b + cin. The 16 bits are split into five groups of
// 2, 2, 3, 4 and 5 bits (bits 1:0, 3:2, 6:4, 10:7 and 15:11). The lowest
// group is a 2-bit ripple carry adder that takes cin. Each higher group is
// a bec_group: it forms its carry-in-0 result with a ripple adder and its
// carry-in-1 result with a binary to excess-1 converter, and the carry out
// of the group below selects between them. The group sizes grow by one
// bit per group so that a group's two results are ready at about the time
// the carry reaches its multiplexer (hence "square root": the number of
// groups grows as the square root of the width).
//
// In the unit-gate model the groups 2 to 5 have sum outputs at 13, 16, 19
// and 22 gate delays. The partition and the group structure are the
// published ones. Purely combinational, no clock.
module sqrt_csla16
  import csla_pkg::*;
(
  input  logic [CSLA16_WIDTH-1:0] a,
  input  logic [CSLA16_WIDTH-1:0] b,
  input  logic                    cin,
  output logic [CSLA16_WIDTH-1:0] s,
  output logic                    cout
);
  // c[g] is the carry into group g; c[NGROUPS] is the carry out.
  logic [CSLA16_NGROUPS:0] c;

  assign c[0] = cin;

  // Group 1: plain ripple carry adder.
  rca #(.N(CSLA16_GW[0])) u_g1 (
    .a (a[CSLA16_GW[0]-1:0]),
    .b (b[CSLA16_GW[0]-1:0]),
    .ci(c[0]),
    .s (s[CSLA16_GW[0]-1:0]),
    .co(c[1])
  );

  // Groups 2 to 5: ripple adder + excess-1 converter + multiplexer.
  for (genvar g = 1; g < CSLA16_NGROUPS; g++) begin : g_grp
    localparam int unsigned W   = CSLA16_GW[g];
    localparam int unsigned LSB = csla16_lsb(g);
    bec_group #(.N(W)) u_grp (
      .a   (a[LSB+W-1:LSB]),
      .b   (b[LSB+W-1:LSB]),
      .cin (c[g]),
      .s   (s[LSB+W-1:LSB]),
      .cout(c[g+1])
    );
  end

  assign cout = c[CSLA16_NGROUPS];
endmodule
