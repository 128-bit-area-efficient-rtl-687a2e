// tb_mux2_aoi: exhaustive self-check of the 2:1 AOI multiplexer.
module tb_mux2_aoi;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  logic d0, d1, sel, y;

  mux2_aoi dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

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
      {sel, d1, d0} = 3'(v);
      @(posedge clk);
      checks++;
      if (y !== (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%b d1=%b d0=%b y=%b", sel, d1, d0, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
