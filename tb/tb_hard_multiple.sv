// tb_hard_multiple: the 3M generator of a 10-bit multiplicand with four
// Booth groups. For random multiplicands and group patterns it checks:
// each group's Disable is low exactly when that group's digit
// -4*b3+2*b2+b1+b0 is +3 or -3; the adder is active when any group needs
// 3M; m3 = 3*m (12-bit two's complement) when active and 0 when not.
// Both the enabled and the disabled case must occur.
module tb_hard_multiple;
  logic        clk = 1'b0;
  logic [9:0]  m;
  logic [15:0] groups;
  logic [11:0] m3;
  logic [3:0]  grp_disable;
  logic        active;
  int checks = 0;
  int failures = 0;
  int n_on = 0;
  int n_off = 0;

  hard_multiple dut (.m(m), .groups(groups), .m3(m3), .grp_disable(grp_disable), .active(active));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] want_dis;
    logic [3:0] g;
    int d;
    for (int i = 0; i < 4000; i++) begin
      m = 10'($urandom);
      // bias towards patterns without any 3M digit as well
      groups = (i % 3 == 0) ? {4{4'($urandom) & 4'b0011}} : 16'($urandom);
      @(posedge clk);
      for (int k = 0; k < 4; k++) begin
        g = groups[4*k +: 4];
        d = -4 * g[3] + 2 * g[2] + g[1] + g[0];
        want_dis[k] = !(d == 3 || d == -3);
      end
      checks++;
      if (grp_disable != want_dis || active != !(&want_dis)) begin
        failures++;
        $display("FAIL groups=%h disable=%b want %b active=%b", groups, grp_disable, want_dis, active);
      end
      checks++;
      if (active) begin
        n_on++;
        if ($signed(m3) != 12'(3 * int'($signed(m)))) begin
          failures++;
          $display("FAIL m=%0d m3=%0d", $signed(m), $signed(m3));
        end
      end else begin
        n_off++;
        if (m3 != '0) begin
          failures++;
          $display("FAIL disabled adder output %h", m3);
        end
      end
    end
    $display("3M adder active %0d times, disabled %0d times", n_on, n_off);
    checks++;
    if (n_on == 0 || n_off == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
