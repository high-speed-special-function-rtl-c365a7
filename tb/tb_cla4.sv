// tb_cla4: exhaustive test of the 4-bit carry-lookahead adder: every a, b
// and carry in (512 cases) against a + b + cin.
module tb_cla4;
  logic       clk = 1'b0;
  logic [3:0] a, b, s;
  logic       cin, cout;
  int checks = 0;
  int failures = 0;

  cla4 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, a, b} = 9'(i);
      @(posedge clk);
      checks++;
      if ({cout, s} != 5'(a) + 5'(b) + 5'(cin)) begin
        failures++;
        $display("FAIL %0d+%0d+%0d = %0d", a, b, cin, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
