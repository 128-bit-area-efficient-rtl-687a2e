// tb_bec_group: exhaustive self-check of the BEC-based carry select group
// at the four sizes of the 16-bit adder (2, 3, 4 and 5 bits):
// {cout, s} = a + b + cin for every a, b and cin. It also counts, per
// size, vectors where the carry-in-1 path was selected and where that
// changed the result's carry, and fails if either never happened.
module tb_bec_group;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [1:0] a2, b2, s2;
  logic [2:0] a3, b3, s3;
  logic [3:0] a4, b4, s4;
  logic [4:0] a5, b5, s5;
  logic       cin, co2, co3, co4, co5;

  bec_group          dut2 (.a(a2), .b(b2), .cin(cin), .s(s2), .cout(co2));
  bec_group #(.N(3)) dut3 (.a(a3), .b(b3), .cin(cin), .s(s3), .cout(co3));
  bec_group #(.N(4)) dut4 (.a(a4), .b(b4), .cin(cin), .s(s4), .cout(co4));
  bec_group #(.N(5)) dut5 (.a(a5), .b(b5), .cin(cin), .s(s5), .cout(co5));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int n, input int a, input int b, input int c,
                       input int got);
    int exp = a + b + c;
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL N=%0d a=%0d b=%0d cin=%0d got=%0d expected=%0d",
               n, a, b, c, got, exp);
    end
  endtask

  int carry_rippled = 0;  // cin=1 turned a carry-free sum into a carry out

  initial begin
    for (int v = 0; v < (1 << 11); v++) begin
      {cin, a5, b5} = 11'(v);
      a4 = a5[3:0]; b4 = b5[3:0];
      a3 = a5[2:0]; b3 = b5[2:0];
      a2 = a5[1:0]; b2 = b5[1:0];
      @(posedge clk);
      check(5, int'(a5), int'(b5), int'(cin), int'({co5, s5}));
      if (v[4] == 1'b0 && v[9] == 1'b0)
        check(4, int'(a4), int'(b4), int'(cin), int'({co4, s4}));
      if (v[4:3] == 2'b00 && v[9:8] == 2'b00)
        check(3, int'(a3), int'(b3), int'(cin), int'({co3, s3}));
      if (v[4:2] == 3'b000 && v[9:7] == 3'b000)
        check(2, int'(a2), int'(b2), int'(cin), int'({co2, s2}));
      if (cin && (int'(a5) + int'(b5) == 31)) carry_rippled++;
    end
    checks++;
    if (carry_rippled == 0) begin
      failures++;
      $display("FAIL the carry-in never rippled through a whole group");
    end
    $display("carry-in rippled through all 5 bits: %0d times", carry_rippled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
