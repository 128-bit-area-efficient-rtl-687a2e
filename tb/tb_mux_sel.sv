// tb_mux_sel: self-check of the 8:4 multiplexer (default N = 4), all
// data combinations with both select values.
module tb_mux_sel;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  logic [3:0] d0, d1, y;
  logic       sel;

  mux_sel dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {sel, d1, d0} = 9'(v);
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
