// tb_multi_operand_adder: three 15-bit two's complement operands (the
// default, as in the polynomial sum) and five 12-bit ones, random and
// extreme values, against their sum modulo 2^W.
module tb_multi_operand_adder;
  logic        clk = 1'b0;
  logic [14:0] ops3 [3];
  logic [14:0] sum3;
  logic [11:0] ops5 [5];
  logic [11:0] sum5;
  int checks = 0;
  int failures = 0;

  multi_operand_adder dut3 (.ops(ops3), .sum(sum3));
  multi_operand_adder #(.W(12), .N(5)) dut5 (.ops(ops5), .sum(sum5));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e3, e5;
    for (int i = 0; i < 3000; i++) begin
      e3 = 0; e5 = 0;
      foreach (ops3[k]) begin
        ops3[k] = (i < 5) ? 15'h7FFF : (i < 10) ? 15'h4000 : 15'($urandom);
        e3 += int'($signed(ops3[k]));
      end
      foreach (ops5[k]) begin
        ops5[k] = (i < 5) ? 12'hFFF : 12'($urandom);
        e5 += int'($signed(ops5[k]));
      end
      @(posedge clk);
      checks++;
      if (sum3 != 15'(e3) || sum5 != 12'(e5)) begin
        failures++;
        $display("FAIL i=%0d sum3=%h want %h sum5=%h want %h", i, sum3, 15'(e3), sum5, 12'(e5));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
