// tb_wallace_tree: the reduction tree at its default size (5 rows of 22
// bits: 4:2 compressors then a full-adder row) and at 7 and 3 rows (a
// 4:2 row and a full-adder row in one stage; a single full-adder row).
// Random rows, including all-ones rows; the two outputs must add up to
// the sum of the inputs modulo 2^W.
module tb_wallace_tree;
  logic        clk = 1'b0;
  logic [21:0] r5 [5];
  logic [21:0] s5, c5;
  logic [33:0] r7 [7];
  logic [33:0] s7, c7;
  logic [14:0] r3 [3];
  logic [14:0] s3, c3;
  int checks = 0;
  int failures = 0;

  wallace_tree dut5 (.rows(r5), .sum_row(s5), .carry_row(c5));
  wallace_tree #(.W(34), .N(7)) dut7 (.rows(r7), .sum_row(s7), .carry_row(c7));
  wallace_tree #(.W(15), .N(3)) dut3 (.rows(r3), .sum_row(s3), .carry_row(c3));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [21:0] e5;
    logic [33:0] e7;
    logic [14:0] e3;
    for (int i = 0; i < 3000; i++) begin
      e5 = '0; e7 = '0; e3 = '0;
      for (int r = 0; r < 5; r++) begin
        r5[r] = (i < 10) ? '1 : 22'($urandom);
        e5 += r5[r];
      end
      for (int r = 0; r < 7; r++) begin
        r7[r] = (i < 10) ? '1 : {2'($urandom), $urandom};
        e7 += r7[r];
      end
      for (int r = 0; r < 3; r++) begin
        r3[r] = (i < 10) ? '1 : 15'($urandom);
        e3 += r3[r];
      end
      @(posedge clk);
      checks++;
      if (22'(s5 + c5) != e5 || 34'(s7 + c7) != e7 || 15'(s3 + c3) != e3) begin
        failures++;
        $display("FAIL i=%0d: 5 rows %h vs %h, 7 rows %h vs %h, 3 rows %h vs %h",
                 i, 22'(s5 + c5), e5, 34'(s7 + c7), e7, 15'(s3 + c3), e3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
