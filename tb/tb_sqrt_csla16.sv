// tb_sqrt_csla16: self-check of the 16-bit square-root carry select adder
// against {cout, s} = a + b + cin, on corner cases and 50,000 random
// vectors. The carry into each of the four carry select groups (bits 2, 4,
// 7 and 11) is worked out from the reference sum; the test counts how
// often each group had to pick its carry-in-1 (excess-1) result and its
// carry-in-0 result, and fails if either never happened for some group.
module tb_sqrt_csla16;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [15:0] a, b, s;
  logic        cin, cout;

  localparam int GROUP_LSB [4] = '{2, 4, 7, 11};
  int sel1 [4];
  int sel0 [4];
  int couts = 0;

  sqrt_csla16 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] ta, input logic [15:0] tb,
                       input logic tc);
    logic [16:0] exp;
    logic [15:0] carries;
    a = ta; b = tb; cin = tc;
    @(posedge clk);
    exp = 17'(ta) + 17'(tb) + 17'(tc);
    carries = ta ^ tb ^ exp[15:0];  // carry into each bit position
    checks++;
    if ({cout, s} !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got=%h expected=%h", ta, tb, tc,
               {cout, s}, exp);
    end
    for (int g = 0; g < 4; g++)
      if (carries[GROUP_LSB[g]]) sel1[g]++; else sel0[g]++;
    if (exp[16]) couts++;
  endtask

  initial begin
    for (int g = 0; g < 4; g++) begin
      sel1[g] = 0;
      sel0[g] = 0;
    end
    apply(16'h0000, 16'h0000, 1'b0);
    apply(16'hffff, 16'h0000, 1'b1);   // carry ripples through every group
    apply(16'hffff, 16'hffff, 1'b1);
    apply(16'h8000, 16'h8000, 1'b0);
    apply(16'h7fff, 16'h0001, 1'b0);
    for (int i = 0; i < 50000; i++)
      apply(16'($urandom), 16'($urandom), 1'($urandom));
    for (int g = 0; g < 4; g++) begin
      $display("group %0d: carry-in-1 result selected %0d times, carry-in-0 %0d times",
               g + 2, sel1[g], sel0[g]);
      checks++;
      if (sel1[g] == 0 || sel0[g] == 0) begin
        failures++;
        $display("FAIL group %0d did not see both select values", g + 2);
      end
    end
    checks++;
    if (couts == 0) begin
      failures++;
      $display("FAIL no carry out was produced");
    end
    $display("carry out produced %0d times", couts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
