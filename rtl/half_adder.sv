// half_adder: one-bit half adder.
//
// s = a XOR b (an AOI XOR cell), c = a AND b: 6 units of area and 3 gate
// delays in the unit-gate model. Used as the least significant cell of the
// carry-in-0 ripple adder of each carry select group, where the carry-in
// is a constant 0. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  xor_aoi u_xor (.a(a), .b(b), .y(s));

  always_comb c = a & b;
endmodule
