// tb_compressor42: exhaustive test of the 4:2 compressor: for all 32 input
// combinations a+b+c+d+cin must equal sum + 2*(carry + cout), and cout
// must not depend on cin (so a row of compressors has no ripple).
module tb_compressor42;
  logic clk = 1'b0;
  logic a, b, c, d, cin, sum, carry, cout;
  logic cout_prev;
  int checks = 0;
  int failures = 0;

  compressor42 dut (.a(a), .b(b), .c(c), .d(d), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {a, b, c, d, cin} = 5'(i);
      @(posedge clk);
      checks++;
      if (int'(a) + int'(b) + int'(c) + int'(d) + int'(cin) !=
          int'(sum) + 2 * (int'(carry) + int'(cout))) begin
        failures++;
        $display("FAIL inputs=%b sum=%b carry=%b cout=%b", 5'(i), sum, carry, cout);
      end
      if (cin) begin
        checks++;
        if (cout != cout_prev) begin
          failures++;
          $display("FAIL cout depends on cin for %b", 5'(i));
        end
      end
      cout_prev = cout;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
