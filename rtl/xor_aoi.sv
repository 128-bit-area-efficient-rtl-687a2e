// xor_aoi: two-input exclusive OR made only of AND, OR and inverter gates.
//
// y = (a AND NOT b) OR (NOT a AND b): two inverters, two ANDs and one OR,
// i.e. 5 units of area and 3 gate delays (inverter, AND, OR) in the
// unit-gate model that all the adder cells here are counted in.
// Purely combinational, no clock.
module xor_aoi (
  input  logic a,
  input  logic b,
  output logic y
);
  logic na, nb;

  always_comb begin
    na = ~a;
    nb = ~b;
    y  = (a & nb) | (na & b);
  end
endmodule
