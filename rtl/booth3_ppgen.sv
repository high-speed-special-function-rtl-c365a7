// booth3_ppgen: Booth-3 (radix-8) partial product generator with the
// pre-extended sign template.
//
// The WB-bit signed multiplier b is cut into NG = ceil(WB/3) overlapping
// groups of four bits: group g is {b[3g+2], b[3g+1], b[3g], b[3g-1]} with
// b[-1] = 0 and the sign bit repeated above the MSB (for 10 bits:
// {m2,m1,m0,0}, {m5..m2}, {m8..m5}, {m9,m9,m9,m8}). Each group is decoded
// into a select of M, 2M, 3M or 4M and a sign S. Bit k of partial product
// g is ((M[k]&selM) | (3M[k]&sel3M) | (M[k-1]&sel2M) | (M[k-2]&sel4M)) ^ S.
//
// Instead of deriving a sign-extension signal from the selects, the
// multiplicand is first sign-extended by two bits (P = WA+2 bits, room
// for 3M and 4M) and the template used for unsigned operands is applied,
// with C = the MSB of each P-bit partial product:
//   row 0:        C' C C C | pp0
//   rows 1..NG-2: 1 1 C'   | ppg   (shifted 3g bits)
//   row NG-1:     C'       | pp    (shifted 3(NG-1) bits)
// and S of every group added at the LSB of its row. The S bits never share
// a column, so they form one extra row. Summed modulo 2^W, the NG+1 rows
// give a*b in their low WA+WB bits. Grouping, bit cell and template follow
// the published design; packing the S bits into a row is this
// implementation's choice. Purely combinational.
module booth3_ppgen
  import sfu_pkg::*;
#(
  parameter int unsigned WA = 10,  // multiplicand width (signed)
  parameter int unsigned WB = 10   // multiplier width (signed)
) (
  input  logic [WA-1:0] a,
  input  logic [WB-1:0] b,
  output logic [booth3_width(WA, WB)-1:0] rows [booth3_groups(WB)+1],
  output logic          hm_active    // 3M adder in use
);

  localparam int unsigned NG = booth3_groups(WB);
  localparam int unsigned P  = WA + 2;
  localparam int unsigned W  = booth3_width(WA, WB);
  localparam int unsigned BX = 3 * NG + 1;

  logic [P+1:0]   mxs;      // {extended multiplicand, 2'b00}: index k+2 is M[k]
  logic [P-1:0]   m3;
  logic [BX-1:0]  bx;       // {sign extension, b, 0}
  logic [4*NG-1:0] groups;
  logic [NG-1:0]  grp_disable;
  logic [W-1:0]   srow;

  assign mxs = {{2{a[WA-1]}}, a, 2'b00};
  assign bx  = {{(BX-WB-1){b[WB-1]}}, b, 1'b0};

  for (genvar g = 0; g < NG; g++) begin : g_grp
    assign groups[4*g +: 4] = bx[3*g +: 4];
  end

  hard_multiple #(.WA(WA), .NG(NG)) u_hm (
    .m          (a),
    .groups     (groups),
    .m3         (m3),
    .grp_disable(grp_disable),
    .active     (hm_active)
  );

  for (genvar g = 0; g < NG; g++) begin : g_pp
    booth_sel_t   sel;
    logic         s;
    logic [P-1:0] pp;
    logic         c;

    booth3_decoder u_dec (.grp(groups[4*g +: 4]), .sel(sel), .s(s));

    for (genvar k = 0; k < P; k++) begin : g_bit
      assign pp[k] = ((mxs[k+2] & sel.x1) | (m3[k] & sel.x3) |
                      (mxs[k+1] & sel.x2) | (mxs[k]   & sel.x4)) ^ s;
    end

    assign c = pp[P-1];
    assign srow[3*g] = s;
    if (3*g + 1 < W) begin : g_sgap
      assign srow[3*g+1] = 1'b0;
    end
    if (3*g + 2 < W) begin : g_sgap2
      assign srow[3*g+2] = 1'b0;
    end

    // sign template bits above the partial product
    logic [3:0] tmpl;
    if (g == 0) begin : g_first
      assign tmpl = {~c, c, c, c};
    end else if (g < NG - 1) begin : g_mid
      assign tmpl = {1'b0, 2'b11, ~c};
    end else begin : g_last
      assign tmpl = {3'b000, ~c};
    end

    always_comb begin
      rows[g] = '0;
      rows[g][3*g +: P] = pp;
      for (int t = 0; t < 4; t++) begin
        if (3*g + P + t < W) rows[g][3*g + P + t] = tmpl[t];
      end
    end
  end

  if (3 * NG < W) begin : g_stop
    assign srow[W-1:3*NG] = '0;
  end

  assign rows[NG] = srow;

endmodule
