// tb_bec: self-check of the binary to excess-1 converter. The default
// 4-bit converter is checked against its full 16-row function table
// (x = b + 1 modulo 16, so 1111 wraps to 0000), written out here as
// constants; 3- and 6-bit converters are checked exhaustively against
// b + 1.
module tb_bec;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [3:0] b4, x4;
  logic [2:0] b3, x3;
  logic [5:0] b6, x6;

  // Function table of the 4-bit converter, indexed by the input.
  localparam logic [3:0] TABLE4 [16] = '{
    4'b0001, 4'b0010, 4'b0011, 4'b0100, 4'b0101, 4'b0110, 4'b0111, 4'b1000,
    4'b1001, 4'b1010, 4'b1011, 4'b1100, 4'b1101, 4'b1110, 4'b1111, 4'b0000
  };

  bec          dut4 (.b(b4), .x(x4));
  bec #(.N(3)) dut3 (.b(b3), .x(x3));
  bec #(.N(6)) dut6 (.b(b6), .x(x6));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      b4 = 4'(v);
      b3 = 3'(v);
      b6 = 6'(v);
      @(posedge clk);
      if (v < 16) begin
        checks++;
        if (x4 !== TABLE4[v]) begin
          failures++;
          $display("FAIL N=4 b=%b x=%b expected %b", b4, x4, TABLE4[v]);
        end
      end
      if (v < 8) begin
        checks++;
        if (x3 !== 3'(v + 1)) begin
          failures++;
          $display("FAIL N=3 b=%b x=%b", b3, x3);
        end
      end
      checks++;
      if (x6 !== 6'(v + 1)) begin
        failures++;
        $display("FAIL N=6 b=%b x=%b", b6, x6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
