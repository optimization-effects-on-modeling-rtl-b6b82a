// pp_tree: reduction tree of 4:2 compressor rows.
//
// Reduces ROWS non-negative W-bit vectors to a sum and a carry vector whose
// total equals the total of the inputs (mod 2^W). Each level groups the rows
// in fours and compresses every group to two rows; rows left over pass to the
// next level unchanged, so 24 rows take the levels 24 -> 12 -> 6 -> 4 -> 2.
// A level that is left with exactly three rows (not reached for 24) uses a
// 3:2 row. The carry output is already at its weight. Purely combinational.
module pp_tree #(
  parameter int unsigned ROWS = 24,
  parameter int unsigned W    = 48
) (
  input  logic [ROWS-1:0][W-1:0] rows,
  output logic [W-1:0]           sum,
  output logic [W-1:0]           carry
);
  // number of rows entering level l
  function automatic int unsigned rows_at(int unsigned l);
    int unsigned n;
    n = ROWS;
    for (int unsigned i = 0; i < l; i++) begin
      if (n == 3) n = 2;
      else if (n > 3) n = 2 * (n / 4) + n % 4;
    end
    return n;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned l;
    l = 0;
    while (rows_at(l) > 2) l++;
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels();

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned N      = rows_at(l);
    localparam int unsigned GROUPS = N / 4;
    localparam int unsigned REST   = N % 4;
    localparam int unsigned NEXT   = rows_at(l + 1);
    logic [W-1:0] cur [N];      // rows entering this level
    logic [W-1:0] nxt [NEXT];   // rows leaving it
    for (genvar k = 0; k < N; k++) begin : g_cur
      if (l == 0) begin : g_in
        assign cur[k] = rows[k];
      end else begin : g_prev
        assign cur[k] = g_level[l-1].nxt[k];
      end
    end
    if (N == 3) begin : g_three
      logic [W-1:0] c3;
      csa32 #(.W(W)) u_csa (.x(cur[0]), .y(cur[1]), .z(cur[2]), .sum(nxt[0]), .carry(c3));
      assign nxt[1] = {c3[W-2:0], 1'b0};
    end else begin : g_four
      for (genvar g = 0; g < GROUPS; g++) begin : g_grp
        compressor42_row #(.W(W)) u_row (
          .x0(cur[4*g]), .x1(cur[4*g+1]), .x2(cur[4*g+2]), .x3(cur[4*g+3]),
          .sum(nxt[2*g]), .carry(nxt[2*g+1])
        );
      end
      for (genvar k = 0; k < REST; k++) begin : g_pass
        assign nxt[2*GROUPS+k] = cur[4*GROUPS+k];
      end
    end
  end

  if (LEVELS == 0) begin : g_none
    assign sum   = rows[0];
    assign carry = (ROWS > 1) ? rows[ROWS > 1 ? 1 : 0] : '0;
  end else begin : g_out
    assign sum   = g_level[LEVELS-1].nxt[0];
    assign carry = g_level[LEVELS-1].nxt[1];
  end
endmodule
