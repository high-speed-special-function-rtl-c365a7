// wallace_tree: reduces N operand rows of W bits to a sum row and a carry
// row whose total equals the sum of the operands modulo 2^W.
//
// Each reduction stage takes the rows four at a time into rows of 4:2
// compressors (four rows in, two out); a leftover group of three rows goes
// through a row of full adders (three in, two out) and one or two leftover
// rows pass to the next stage unchanged. Stages repeat until two rows are
// left; a hybrid carry-lookahead adder then adds them (outside this
// module). Using 4:2 compressors and full adders in a Wallace tree follows
// the published design. The reduction here is row-wise: bit positions that
// are constant zero in a given use (the ragged edges of a partial product
// array) collapse to half adders or wires in synthesis, instead of the
// hand-placed column-by-column allocation of a custom layout.
// Purely combinational; no carry ripples within a stage.
module wallace_tree #(
  parameter int unsigned W = 22,
  parameter int unsigned N = 5
) (
  input  logic [W-1:0] rows [N],
  output logic [W-1:0] sum_row,
  output logic [W-1:0] carry_row
);

  // rows left after one stage
  function automatic int next_rows(int n);
    return (n / 4) * 2 + ((n % 4 == 3) ? 2 : (n % 4));
  endfunction

  // rows at the input of stage s
  function automatic int rows_at(int s);
    int n = N;
    for (int i = 0; i < s; i++) n = next_rows(n);
    return n;
  endfunction

  function automatic int num_stages();
    int n = N;
    int k = 0;
    while (n > 2) begin
      n = next_rows(n);
      k++;
    end
    return k;
  endfunction

  localparam int NS = num_stages();

  // Each stage owns its input and output rows (cur, nxt); stage st reads
  // the nxt rows of stage st-1.
  for (genvar st = 0; st < NS; st++) begin : g_stage
    localparam int NI = rows_at(st);
    localparam int NO = next_rows(NI);
    localparam int NQ = NI / 4;   // groups of four rows
    localparam int NR = NI % 4;   // leftover rows

    logic [W-1:0] cur [N];
    logic [W-1:0] nxt [N];

    if (st == 0) begin : g_first
      assign cur = rows;
    end else begin : g_next
      assign cur = g_stage[st-1].nxt;
    end

    // rows of 4:2 compressors
    for (genvar q = 0; q < NQ; q++) begin : g_c42
      logic [W:0] ci;   // column-to-column carry, never rippling further
      logic [W-1:0] cy;
      assign ci[0] = 1'b0;
      for (genvar i = 0; i < W; i++) begin : g_bit
        compressor42 u_c42 (
          .a    (cur[4*q][i]),
          .b    (cur[4*q+1][i]),
          .c    (cur[4*q+2][i]),
          .d    (cur[4*q+3][i]),
          .cin  (ci[i]),
          .sum  (nxt[2*q][i]),
          .carry(cy[i]),
          .cout (ci[i+1])
        );
      end
      // carries out of the top column fall outside the modulo-2^W result
      assign nxt[2*q+1] = {cy[W-2:0], 1'b0};
    end

    if (NR == 3) begin : g_fa
      // one row of full adders for the three leftover rows
      logic [W-1:0] cy;
      for (genvar i = 0; i < W; i++) begin : g_bit
        full_adder u_fa (
          .a    (cur[4*NQ][i]),
          .b    (cur[4*NQ+1][i]),
          .c    (cur[4*NQ+2][i]),
          .sum  (nxt[2*NQ][i]),
          .carry(cy[i])
        );
      end
      assign nxt[2*NQ+1] = {cy[W-2:0], 1'b0};
    end else begin : g_pass
      for (genvar r = 0; r < NR; r++) begin : g_row
        assign nxt[2*NQ+r] = cur[4*NQ+r];
      end
    end

    // rows of this level that carry nothing
    for (genvar r = NO; r < N; r++) begin : g_unused
      assign nxt[r] = '0;
    end
  end

  if (NS == 0) begin : g_direct
    assign sum_row = rows[0];
    if (N >= 2) begin : g_two
      assign carry_row = rows[1];
    end else begin : g_one
      assign carry_row = '0;
    end
  end else begin : g_out
    assign sum_row   = g_stage[NS-1].nxt[0];
    assign carry_row = g_stage[NS-1].nxt[1];
  end

endmodule
