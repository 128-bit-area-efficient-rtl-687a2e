// bec_group: one carry select group of the area-efficient (BEC-based)
// square-root carry select adder.
//
// The group adds its N-bit slices of the operands twice over, once for
// each value of the carry that will arrive from the groups below:
//   * carry-in 0: an N-bit ripple adder whose least significant cell is a
//     half adder (no carry-in) and whose other N-1 cells are full adders,
//     giving the (N+1)-bit result r0 = {carry, sum};
//   * carry-in 1: r1 = r0 + 1, made by an (N+1)-bit binary to excess-1
//     converter from r0 instead of by a second ripple adder. r0 is at most
//     2^(N+1) - 2, so r1 never wraps.
// A 2(N+1):(N+1) multiplexer then selects r1 when cin = 1 and r0 when
// cin = 0, so {cout, s} = a + b + cin. Both results are formed while the
// carry is still on its way; only the multiplexer lies on the carry path.
//
// This structure is the published one. N = 2 (default), 3, 4 and 5 are the
// groups 2 to 5 of the 16-bit adder. Purely combinational.
module bec_group #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,   // carry from the group below: the select
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N:0] r0;   // {carry, sum} for carry-in 0
  logic [N:0] r1;   // {carry, sum} for carry-in 1
  logic [N:0] r;
  logic       c_ha;

  half_adder u_ha (.a(a[0]), .b(b[0]), .s(r0[0]), .c(c_ha));

  if (N > 1) begin : g_rca
    rca #(.N(N-1)) u_rca (
      .a (a[N-1:1]),
      .b (b[N-1:1]),
      .ci(c_ha),
      .s (r0[N-1:1]),
      .co(r0[N])
    );
  end else begin : g_no_rca
    assign r0[N] = c_ha;
  end

  bec #(.N(N+1)) u_bec (.b(r0), .x(r1));

  mux_sel #(.N(N+1)) u_mux (.d0(r0), .d1(r1), .sel(cin), .y(r));

  assign s    = r[N-1:0];
  assign cout = r[N];
endmodule
