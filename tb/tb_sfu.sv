// tb_sfu: end-to-end test of the 1/(1+x) special function unit at its
// default (and only) size.
//
// Applies every one of the 512 input codes, one per clock cycle, and
// checks, with the unit being combinational, that the result is valid in
// the same cycle:
//  - z against a reference computed here with plain integer arithmetic
//    from the coefficient table (each term truncated to 13 fractional
//    bits),
//  - z against the five published example points (X = 0, 219, 68, 28,
//    178 -> Z = 8191, 5736, 7230, 7766, 6077),
//  - |z/2^13 - 1/(1+x)| below 3.1 * 2^-13,
//  - seg_addr against the segment boundaries 1/8, 1/4, 3/8, 1/2, 5/8, 7/8.
// It also counts how often each mechanism happened: every segment address
// used, each multiplier's 3M adder both switched on and switched off. A
// mechanism that never happened counts as a failure.
module tb_sfu;
  import sfu_pkg::*;

  logic              clk = 1'b0;
  logic [N_BITS-1:0] x;
  logic [Z_BITS-1:0] z;
  logic [A_BITS-1:0] seg_addr;
  logic [2:0]        hm_active;

  int checks = 0;
  int failures = 0;
  int cycles = 0;
  int seg_hits [ENTRIES];
  int hm_on [3];
  int hm_off [3];

  // coefficient sets, written out independently of the design
  localparam longint C0 [7] = '{16383, 16325, 16169, 15929, 15626, 15120, 14359};
  localparam longint C1 [7] = '{-260252, -245192, -225103, -204441, -184967, -159767, -131586};
  localparam longint C2 [7] = '{13718, 9818, 7266, 5528, 4303, 3076, 2058};

  sfu dut (.x(x), .z(z), .seg_addr(seg_addr), .hm_active(hm_active));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int seg_of(int xi);
    // boundaries in units of 2^-9: 64,128,192,256,320 (1/8 steps), 448
    if (xi < 320) return xi / 64;
    if (xi < 448) return 5;
    return 6;
  endfunction

  function automatic longint ref_z(int xi);
    int s = seg_of(xi);
    longint t0 = C0[s] >>> 1;
    longint t1 = (C1[s] * xi) >>> 14;
    longint t2 = (C2[s] * xi * xi) >>> 19;
    return t0 + t1 + t2;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=%0d z=%0d seg=%0d", what, x, z, seg_addr);
    end
  endtask

  int ex_x [5] = '{0, 219, 68, 28, 178};
  int ex_z [5] = '{8191, 5736, 7230, 7766, 6077};

  initial begin
    int c0;
    real f, err;
    foreach (seg_hits[i]) seg_hits[i] = 0;
    foreach (hm_on[i]) begin
      hm_on[i] = 0;
      hm_off[i] = 0;
    end
    x = '0;
    @(negedge clk);
    for (int xi = 0; xi < 512; xi++) begin
      x = N_BITS'(xi);
      c0 = cycles;
      #1;  // combinational: result must be there before the next edge
      check(longint'(z) == ref_z(xi), "reference value");
      check(int'(seg_addr) == seg_of(xi), "segment address");
      f   = 8192.0 / (1.0 + real'(xi) / 512.0);
      err = real'(z) - f;
      if (err < 0) err = -err;
      check(err < 3.1, "approximation error");
      check(cycles == c0, "zero latency");
      seg_hits[seg_addr]++;
      for (int m = 0; m < 3; m++) begin
        if (hm_active[m]) hm_on[m]++;
        else hm_off[m]++;
      end
      @(negedge clk);
    end
    foreach (ex_x[i]) begin
      x = N_BITS'(ex_x[i]);
      #1;
      check(int'(z) == ex_z[i], "published example");
      @(negedge clk);
    end
    for (int s = 0; s < ENTRIES; s++) begin
      $display("segment %0d used %0d times", s, seg_hits[s]);
      check(seg_hits[s] > 0, "segment used");
    end
    for (int m = 0; m < 3; m++) begin
      $display("multiplier %0d: 3M adder on %0d, off %0d", m, hm_on[m], hm_off[m]);
      check(hm_on[m] > 0, "3M adder switched on");
      check(hm_off[m] > 0, "3M adder switched off");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
