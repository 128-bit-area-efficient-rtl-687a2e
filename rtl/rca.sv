// rca: N-bit ripple carry adder.
//
// A chain of N full adders: the carry out of bit i is the carry in of bit
// i+1, so the result settles one full adder after another from the least
// significant bit. {co, s} = a + b + ci. It is the first (least
// significant) group of the square-root carry select adder, where it
// takes the adder's carry-in, and the upper part of the carry-in-0 adder
// of every other group. Purely combinational.
//
// Parameter N (default 2, the width of the first group of the 16-bit
// adder) must be at least 1.
module rca #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         ci,
  output logic [N-1:0] s,
  output logic         co
);
  logic [N:0] c;

  assign c[0] = ci;

  for (genvar i = 0; i < N; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end

  assign co = c[N];
endmodule
