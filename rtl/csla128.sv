// csla128: 128-bit area-efficient carry select adder (top).
//
// {cout, s} = a + b + cin over WIDTH bits (default 128). The adder is a
// chain of WIDTH/16 16-bit square-root carry select adders (sqrt_csla16):
// the carry out of one 16-bit slice is the carry in of the next. Inside a
// slice the carry passes through one 2-bit ripple adder and four 2:1
// multiplexers, whose group results were formed in parallel by ripple
// adders and binary to excess-1 converters.
//
// The 128-bit width is the published one; how the 16-bit structure is
// extended to 128 bits is not spelled out, and chaining 16-bit slices is
// this design's choice. WIDTH must be a multiple of 16.
// Purely combinational, no clock or reset.
module csla128
  import csla_pkg::*;
#(
  parameter int unsigned WIDTH = 128
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  localparam int unsigned NSLICE = WIDTH / CSLA16_WIDTH;

  if (WIDTH % CSLA16_WIDTH != 0 || NSLICE == 0) begin : g_bad_width
    $error("csla128: WIDTH must be a non-zero multiple of 16");
  end

  // c[k] is the carry into slice k.
  logic [NSLICE:0] c;

  assign c[0] = cin;

  for (genvar k = 0; k < NSLICE; k++) begin : g_slice
    sqrt_csla16 u_slice (
      .a   (a[k*CSLA16_WIDTH +: CSLA16_WIDTH]),
      .b   (b[k*CSLA16_WIDTH +: CSLA16_WIDTH]),
      .cin (c[k]),
      .s   (s[k*CSLA16_WIDTH +: CSLA16_WIDTH]),
      .cout(c[k+1])
    );
  end

  assign cout = c[NSLICE];
endmodule
