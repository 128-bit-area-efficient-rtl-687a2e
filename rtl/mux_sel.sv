// mux_sel: 2N:N multiplexer.
//
// N 2:1 AOI multiplexers sharing one select: y = sel ? d1 : d0, bit by
// bit. In a carry select group d0 is the carry-in-0 result, d1 the
// carry-in-1 result (from the excess-1 converter) and sel the carry coming
// from the group below; the 8:4 multiplexer of the 4-bit example is
// N = 4, the default. Purely combinational; 4N units of area, 3 gate
// delays from sel or data to y.
module mux_sel #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] d0,
  input  logic [N-1:0] d1,
  input  logic         sel,
  output logic [N-1:0] y
);
  for (genvar i = 0; i < N; i++) begin : g_bit
    mux2_aoi u_mux (.d0(d0[i]), .d1(d1[i]), .sel(sel), .y(y[i]));
  end
endmodule
