// tb_booth3_decoder: exhaustive test of the radix-8 Booth recoder.
// For all 16 groups {b3,b2,b1,b0} the digit d = -4*b3 + 2*b2 + b1 + b0 is
// worked out here; the selects must be exactly the one for |d| (none for
// d = 0) and S must equal b3.
module tb_booth3_decoder;
  import sfu_pkg::*;

  logic       clk = 1'b0;
  logic [3:0] grp;
  booth_sel_t sel;
  logic       s;
  int checks = 0;
  int failures = 0;

  booth3_decoder dut (.grp(grp), .sel(sel), .s(s));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, mag;
    logic [3:0] want;
    for (int g = 0; g < 16; g++) begin
      grp = 4'(g);
      @(posedge clk);
      d   = -4 * g[3] + 2 * g[2] + g[1] + g[0];
      mag = (d < 0) ? -d : d;
      want = (mag == 0) ? 4'b0000 : 4'(1 << (mag - 1));  // {x4,x3,x2,x1}
      checks++;
      if (sel !== want || s !== g[3]) begin
        failures++;
        $display("FAIL grp=%b d=%0d sel=%b s=%b", grp, d, sel, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
