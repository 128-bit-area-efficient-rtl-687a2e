// tb_xor_aoi: exhaustive self-check of the AOI XOR cell against a ^ b.
// A free-running clock paces the vectors; a watchdog ends the run with a
// failure if it does not finish in time.
module tb_xor_aoi;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  logic a, b, y;

  xor_aoi dut (.a(a), .b(b), .y(y));

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
      if (y !== (a != b)) begin
        failures++;
        $display("FAIL a=%b b=%b y=%b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
