// tb_csla_widths: self-check of the chained adder at the smaller word
// sizes its WIDTH parameter allows (16, 32 and 64 bits), against
// {cout, s} = a + b + cin, with corner cases and 10,000 random additions
// per width. The 128-bit default is covered by tb_csla128.
module tb_csla_widths;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [15:0] a16, b16, s16;
  logic [31:0] a32, b32, s32;
  logic [63:0] a64, b64, s64;
  logic        cin, co16, co32, co64;

  csla128 #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .cin(cin), .s(s16), .cout(co16));
  csla128 #(.WIDTH(32)) dut32 (.a(a32), .b(b32), .cin(cin), .s(s32), .cout(co32));
  csla128 #(.WIDTH(64)) dut64 (.a(a64), .b(b64), .cin(cin), .s(s64), .cout(co64));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // All three adders get the low bits of the same 64-bit operands.
  task automatic apply(input logic [63:0] ta, input logic [63:0] tb,
                       input logic tc);
    logic [64:0] e64;
    logic [32:0] e32;
    logic [16:0] e16;
    a64 = ta;        b64 = tb;
    a32 = ta[31:0];  b32 = tb[31:0];
    a16 = ta[15:0];  b16 = tb[15:0];
    cin = tc;
    @(posedge clk);
    e64 = 65'(ta) + 65'(tb) + 65'(tc);
    e32 = 33'(ta[31:0]) + 33'(tb[31:0]) + 33'(tc);
    e16 = 17'(ta[15:0]) + 17'(tb[15:0]) + 17'(tc);
    checks += 3;
    if ({co64, s64} !== e64) begin
      failures++;
      $display("FAIL W=64 a=%h b=%h cin=%b got %h", ta, tb, tc, {co64, s64});
    end
    if ({co32, s32} !== e32) begin
      failures++;
      $display("FAIL W=32 a=%h b=%h cin=%b got %h", ta[31:0], tb[31:0], tc,
               {co32, s32});
    end
    if ({co16, s16} !== e16) begin
      failures++;
      $display("FAIL W=16 a=%h b=%h cin=%b got %h", ta[15:0], tb[15:0], tc,
               {co16, s16});
    end
  endtask

  initial begin
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply(64'h8000_8000_8000_8000, 64'h8000_8000_8000_8000, 1'b0);
    for (int i = 0; i < 10000; i++)
      apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
