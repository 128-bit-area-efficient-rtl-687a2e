// tb_half_adder: exhaustive self-check of the half adder: {c, s} = a + b.
module tb_half_adder;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  logic a, b, s, c;

  half_adder dut (.a(a), .b(b), .s(s), .c(c));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      @(posedge clk);
      checks++;
      if ({c, s} !== 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b s=%b", a, b, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
