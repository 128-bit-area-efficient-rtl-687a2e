// tb_rca: self-check of the ripple carry adder, exhaustively at the
// default width (2 bits) and at 5 bits, against {co, s} = a + b + ci.
module tb_rca;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [1:0] a2, b2, s2;
  logic       ci2, co2;
  logic [4:0] a5, b5, s5;
  logic       ci5, co5;

  rca        dut2 (.a(a2), .b(b2), .ci(ci2), .s(s2), .co(co2));
  rca #(.N(5)) dut5 (.a(a5), .b(b5), .ci(ci5), .s(s5), .co(co5));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 5); v++) begin
      {ci2, a2, b2} = 5'(v);
      @(posedge clk);
      checks++;
      if ({co2, s2} !== 3'(int'(a2) + int'(b2) + int'(ci2))) begin
        failures++;
        $display("FAIL N=2 a=%0d b=%0d ci=%b -> %b", a2, b2, ci2, {co2, s2});
      end
    end
    for (int v = 0; v < (1 << 11); v++) begin
      {ci5, a5, b5} = 11'(v);
      @(posedge clk);
      checks++;
      if ({co5, s5} !== 6'(int'(a5) + int'(b5) + int'(ci5))) begin
        failures++;
        $display("FAIL N=5 a=%0d b=%0d ci=%b -> %b", a5, b5, ci5, {co5, s5});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
