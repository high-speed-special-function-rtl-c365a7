// tb_booth3_multiplier: the complete Booth-3 / Wallace / hybrid-CLA
// multiplier at its default 10x10 size for every pair of signed operands,
// and at the two other sizes used in the special function unit (19x10 and
// 15x19) for random operands and the extreme values, against a*b.
module tb_booth3_multiplier;
  logic        clk = 1'b0;
  logic [9:0]  a, b;
  logic [19:0] p;
  logic        hm;
  logic [18:0] a2;
  logic [9:0]  b2;
  logic [28:0] p2;
  logic        hm2;
  logic [14:0] a3;
  logic [18:0] b3;
  logic [33:0] p3;
  logic        hm3;
  int checks = 0;
  int failures = 0;

  booth3_multiplier dut (.a(a), .b(b), .p(p), .hm_active(hm));
  booth3_multiplier #(.WA(19), .WB(10)) dut2 (.a(a2), .b(b2), .p(p2), .hm_active(hm2));
  booth3_multiplier #(.WA(15), .WB(19)) dut3 (.a(a3), .b(b3), .p(p3), .hm_active(hm3));

  always #5 clk = ~clk;

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_wide();
    checks++;
    if ($signed(p2) != 29'(longint'($signed(a2)) * longint'($signed(b2))) ||
        $signed(p3) != 34'(longint'($signed(a3)) * longint'($signed(b3)))) begin
      failures++;
      if (failures < 10)
        $display("FAIL %0d*%0d=%0d, %0d*%0d=%0d", $signed(a2), $signed(b2), $signed(p2),
                 $signed(a3), $signed(b3), $signed(p3));
    end
  endtask

  initial begin
    for (int i = 0; i < (1 << 20); i++) begin
      {a, b} = 20'(i);
      a2 = {$urandom}[18:0];
      b2 = 10'($urandom);
      a3 = 15'($urandom);
      b3 = 19'($urandom);
      if (i < 4) begin
        a2 = i[0] ? 19'h40000 : 19'h3FFFF;
        b2 = i[1] ? 10'h200 : 10'h1FF;
        a3 = i[0] ? 15'h4000 : 15'h3FFF;
        b3 = i[1] ? 19'h40000 : 19'h3FFFF;
      end
      @(posedge clk);
      checks++;
      if ($signed(p) != 20'(int'($signed(a)) * int'($signed(b)))) begin
        failures++;
        if (failures < 10) $display("FAIL %0d*%0d=%0d", $signed(a), $signed(b), $signed(p));
      end
      if (i % 16 == 0) check_wide();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
