// full_adder: one-bit full adder.
//
// s = a XOR b XOR ci from two AOI XOR cells; co = (a AND b) OR (ci AND
// (a XOR b)), reusing the first XOR. That is 2*5 + 2 + 1 = 13 units of
// area, as counted for the full adder in the unit-gate model; the sum path
// (XOR, XOR) is 6 gate delays. The carry equation is the usual one, chosen
// here because it meets that count. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;

  xor_aoi u_xor0 (.a(a), .b(b),  .y(p));
  xor_aoi u_xor1 (.a(p), .b(ci), .y(s));

  always_comb co = (a & b) | (ci & p);
endmodule
