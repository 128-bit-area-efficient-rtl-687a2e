// tb_csla128: end-to-end self-check of the 128-bit adder at its default
// parameters, against {cout, s} = a + b + cin computed on 129-bit vectors.
// Runs corner cases (a carry rippling through all 128 bits, all ones plus
// all ones, the sign bit alone) and 20,000 random additions. From the
// reference sum it works out the carry entering each carry select group
// of each 16-bit slice and counts how often the excess-1 result and the
// direct result were selected; it fails if any group never saw one of
// them, if no carry ever crossed a slice boundary, or if no carry out was
// ever produced.
module tb_csla128;
  localparam int W      = 128;
  localparam int NSLICE = W / 16;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [W-1:0] a, b, s;
  logic         cin, cout;

  // Least significant bit of the four carry select groups of a slice.
  localparam int GROUP_LSB [4] = '{2, 4, 7, 11};
  int sel1 [NSLICE][4];
  int sel0 [NSLICE][4];
  int slice_carries = 0;  // carries that crossed a slice boundary
  int couts = 0;
  int full_ripple = 0;    // carry rippled from bit 0 to the carry out

  csla128 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] r;
    for (int i = 0; i < W / 32; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb,
                       input logic tc);
    logic [W:0]   exp;
    logic [W-1:0] carries;
    a = ta; b = tb; cin = tc;
    @(posedge clk);
    exp = (W+1)'(ta) + (W+1)'(tb) + (W+1)'(tc);
    carries = ta ^ tb ^ exp[W-1:0];   // carry into each bit position
    checks++;
    if ({cout, s} !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b\n  got      %h\n  expected %h",
               ta, tb, tc, {cout, s}, exp);
    end
    for (int k = 0; k < NSLICE; k++) begin
      for (int g = 0; g < 4; g++)
        if (carries[k*16 + GROUP_LSB[g]]) sel1[k][g]++; else sel0[k][g]++;
      if (k > 0 && carries[k*16]) slice_carries++;
    end
    if (exp[W]) couts++;
    if (tc && (ta ^ tb) == '1) full_ripple++;
  endtask

  initial begin
    int missing = 0;
    for (int k = 0; k < NSLICE; k++)
      for (int g = 0; g < 4; g++) begin
        sel1[k][g] = 0;
        sel0[k][g] = 0;
      end

    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);      // carry ripples through all 128 bits
    apply('0, '1, 1'b1);
    apply('1, '1, 1'b1);
    apply({1'b1, {(W-1){1'b0}}}, {1'b1, {(W-1){1'b0}}}, 1'b0);
    apply({1'b0, {(W-1){1'b1}}}, W'(1), 1'b0);
    for (int i = 0; i < 20000; i++)
      apply(rand_word(), rand_word(), 1'($urandom));

    for (int k = 0; k < NSLICE; k++)
      for (int g = 0; g < 4; g++)
        if (sel1[k][g] == 0 || sel0[k][g] == 0) begin
          missing++;
          $display("FAIL slice %0d group %0d did not see both select values",
                   k, g + 2);
        end
    checks++;
    if (missing != 0) failures++;
    $display("slice 0 group 2: excess-1 result selected %0d times, direct %0d times",
             sel1[0][0], sel0[0][0]);
    $display("slice %0d group 5: excess-1 result selected %0d times, direct %0d times",
             NSLICE - 1, sel1[NSLICE-1][3], sel0[NSLICE-1][3]);

    checks++;
    if (slice_carries == 0) begin
      failures++;
      $display("FAIL no carry crossed a 16-bit slice boundary");
    end
    checks++;
    if (couts == 0) begin
      failures++;
      $display("FAIL no carry out was produced");
    end
    checks++;
    if (full_ripple == 0) begin
      failures++;
      $display("FAIL no carry rippled through the whole adder");
    end
    $display("carries across slice boundaries: %0d, carry outs: %0d, full-length ripples: %0d",
             slice_carries, couts, full_ripple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
