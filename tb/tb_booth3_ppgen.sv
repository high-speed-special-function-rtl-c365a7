// tb_booth3_ppgen: the 10x10 Booth-3 partial product generator, for every
// pair of 10-bit signed operands. The four partial product rows with
// their sign-template bits plus the row of S bits, added here with plain
// arithmetic modulo 2^22, must give a*b in the low 20 bits; hm_active must
// be set exactly when some Booth digit of b is +3 or -3.
module tb_booth3_ppgen;
  logic        clk = 1'b0;
  logic [9:0]  a, b;
  logic [21:0] rows [5];
  logic        hm_active;
  int checks = 0;
  int failures = 0;

  booth3_ppgen dut (.a(a), .b(b), .rows(rows), .hm_active(hm_active));

  always #5 clk = ~clk;

  initial begin
    repeat (1100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [21:0] tot;
    logic [12:0] bx;
    logic [3:0]  g;
    bit          any3;
    int          d;
    for (int i = 0; i < (1 << 20); i++) begin
      {a, b} = 20'(i);
      @(posedge clk);
      tot = rows[0] + rows[1] + rows[2] + rows[3] + rows[4];
      bx = {{2{b[9]}}, b, 1'b0};
      any3 = 1'b0;
      for (int k = 0; k < 4; k++) begin
        g = bx[3*k +: 4];
        d = -4 * g[3] + 2 * g[2] + g[1] + g[0];
        if (d == 3 || d == -3) any3 = 1'b1;
      end
      checks++;
      if ($signed(tot[19:0]) != 20'(int'($signed(a)) * int'($signed(b))) || hm_active != any3) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d sum=%0d hm=%b", $signed(a), $signed(b), $signed(tot[19:0]), hm_active);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
