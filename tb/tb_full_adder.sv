// tb_full_adder: exhaustive self-check of the full adder:
// {co, s} = a + b + ci.
module tb_full_adder;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  logic a, b, ci, s, co;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      @(posedge clk);
      checks++;
      if ({co, s} !== 2'(int'(a) + int'(b) + int'(ci))) begin
        failures++;
        $display("FAIL a=%b b=%b ci=%b co=%b s=%b", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
