// tb_address_encoder: all 128 values of the 7 input MSBs against the
// segment list of 1/(1+x): segments of 16/128 starting at 0, 16, 32, 48,
// 64 (addresses 0..4) and of 32/128 starting at 80 and 112 (addresses 5,
// 6). Also counts that every address is produced.
module tb_address_encoder;
  logic       clk = 1'b0;
  logic [6:0] xm;
  logic [2:0] addr;
  int checks = 0;
  int failures = 0;
  int hits [7];

  localparam int START [7] = '{0, 16, 32, 48, 64, 80, 112};
  localparam int WIDTH [7] = '{16, 16, 16, 16, 16, 32, 32};

  address_encoder dut (.xm(xm), .addr(addr));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want;
    foreach (hits[i]) hits[i] = 0;
    for (int v = 0; v < 128; v++) begin
      xm = 7'(v);
      @(posedge clk);
      want = -1;
      for (int s = 0; s < 7; s++)
        if (v >= START[s] && v < START[s] + WIDTH[s]) want = s;
      checks++;
      if (int'(addr) != want) begin
        failures++;
        $display("FAIL xm=%0d addr=%0d want %0d", v, addr, want);
      end else begin
        hits[want]++;
      end
    end
    foreach (hits[i]) begin
      checks++;
      if (hits[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
