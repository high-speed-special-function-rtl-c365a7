// tb_hybrid_adder: tests the hybrid CLA/ripple adder at its default width
// (22 bits, a multiple-of-4 padding case) and at 16 bits (exact blocks):
// random operands plus carries that run the whole width, against a + b +
// cin computed in wider arithmetic.
module tb_hybrid_adder;
  logic        clk = 1'b0;
  logic [21:0] a, b, s;
  logic        cin, cout;
  logic [15:0] a16, b16, s16;
  logic        cout16;
  int checks = 0;
  int failures = 0;

  hybrid_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  hybrid_adder #(.W(16)) dut16 (.a(a16), .b(b16), .cin(cin), .s(s16), .cout(cout16));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    @(posedge clk);
    checks++;
    if ({cout, s} != 23'(a) + 23'(b) + 23'(cin) ||
        {cout16, s16} != 17'(a16) + 17'(b16) + 17'(cin)) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b s=%h cout=%b / s16=%h cout16=%b", a, b, cin, s, cout, s16, cout16);
    end
  endtask

  initial begin
    // full-length carry chains
    a = '1; b = '0; a16 = '1; b16 = '0; cin = 1'b1; check();
    a = '1; b = '1; a16 = '1; b16 = '1; cin = 1'b1; check();
    a = 22'h2AAAAA; b = 22'h155555; a16 = 16'hAAAA; b16 = 16'h5555; cin = 1'b1; check();
    for (int i = 0; i < 3000; i++) begin
      a = 22'($urandom); b = 22'($urandom); cin = 1'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
