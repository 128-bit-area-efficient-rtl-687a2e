// bec: N-bit binary to excess-1 converter.
//
// Adds one to its input without a carry-in: x = b + 1 (mod 2^N). Bit 0 is
// inverted; every higher bit i is toggled when all bits below it are 1:
// x[i] = b[i] XOR (b[0] AND ... AND b[i-1]). The AND terms are formed as a
// chain, each AND taking the previous term and the next input bit, so an
// N-bit converter needs one inverter, N-1 XOR cells and N-2 ANDs.
// N must be at least 2. This gate structure follows the published 4-bit converter;
// the generalisation to any N follows its pattern.
//
// In the carry select group it turns the carry-in-0 result {carry, sum}
// of the group into the carry-in-1 result, replacing the second ripple
// carry adder of a regular carry select adder. Purely combinational.
module bec #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] b,
  output logic [N-1:0] x
);
  if (N < 2) begin : g_bad_width
    $error("bec: N must be at least 2");
  end

  // t[i] = b[0] AND ... AND b[i-1], the toggle condition of bit i.
  logic [N-1:1] t;

  always_comb x[0] = ~b[0];

  assign t[1] = b[0];
  xor_aoi u_xor1 (.a(b[1]), .b(t[1]), .y(x[1]));

  for (genvar i = 2; i < N; i++) begin : g_bit
    assign t[i] = t[i-1] & b[i-1];
    xor_aoi u_xor (.a(b[i]), .b(t[i]), .y(x[i]));
  end
endmodule
