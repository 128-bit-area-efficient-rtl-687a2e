// mux2_aoi: 2:1 multiplexer made of AND, OR and inverter gates.
//
// y = (NOT sel AND d0) OR (sel AND d1): one inverter, two ANDs and one OR,
// 4 units of area and 3 gate delays in the unit-gate model. The gate-level
// form is this design's choice; only the cell's area and delay are given.
// Purely combinational.
module mux2_aoi (
  input  logic d0,   // passed when sel = 0
  input  logic d1,   // passed when sel = 1
  input  logic sel,
  output logic y
);
  logic nsel;

  always_comb begin
    nsel = ~sel;
    y    = (nsel & d0) | (sel & d1);
  end
endmodule
