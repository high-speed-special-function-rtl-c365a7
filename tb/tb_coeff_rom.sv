// tb_coeff_rom: reads the 7 coefficient sets and compares them with the
// decimal coefficients of the 1/(1+x) table (C0, C1 scaled by 2^14, 2^18,
// 2^14 respectively, C1 with its sign bit restored), to within half an
// LSB; the unused address must read zero.
module tb_coeff_rom;
  import sfu_pkg::*;

  logic        clk = 1'b0;
  logic [2:0]  addr;
  coeff_t      coeff;
  int checks = 0;
  int failures = 0;

  localparam real RC0 [7] = '{0.9999389648, 0.9963989258, 0.9868774414, 0.9722290039,
                              0.9537353516, 0.9228515625, 0.8764038086};
  localparam real RC1 [7] = '{-0.9927825928, -0.935333252, -0.8586997986, -0.7798805237,
                              -0.7055931091, -0.609462738, -0.5019607544};
  localparam real RC2 [7] = '{0.8372802734, 0.5992431640, 0.4434814453, 0.3374023437,
                              0.2626342773, 0.1877441406, 0.1256103515};

  coeff_rom dut (.addr(addr), .coeff(coeff));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit close(real got, real want);
    real d = got - want;
    if (d < 0) d = -d;
    return d <= 0.5;
  endfunction

  initial begin
    real c1v;
    for (int i = 0; i < 7; i++) begin
      addr = 3'(i);
      @(posedge clk);
      c1v = real'(int'(coeff.c1)) - 262144.0;  // restore the sign bit
      checks++;
      if (!close(real'(coeff.c0), RC0[i] * 16384.0) ||
          !close(c1v, RC1[i] * 262144.0) ||
          !close(real'(coeff.c2), RC2[i] * 16384.0)) begin
        failures++;
        $display("FAIL addr=%0d c0=%0d c1=%0f c2=%0d", i, coeff.c0, c1v, coeff.c2);
      end
    end
    addr = 3'd7;
    @(posedge clk);
    checks++;
    if (coeff != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
