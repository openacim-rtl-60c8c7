// cmp42_mult: unsigned N x N multiplier whose partial products are reduced
// by a tree of 4-2 compressors, exact or approximate.
//
// Stage 0 forms the N partial-product rows with AND gates (row j is a & b[j]
// shifted left by j). Each reduction level takes the rows in groups of four
// and, in every bit column, feeds the four bits of a group into one 4-2
// compressor: s stays in the column, c moves one column up, and the exact
// compressor's cout is chained into the cin of the next column's
// compressor. Each group of four rows becomes two. When three rows are left
// over they go through a row of full adders (3 rows -> 2); one or two left
// over rows pass to the next level unchanged. Levels repeat until two rows
// remain (8 -> 4 -> 2 for N = 8, 16 -> 8 -> 4 -> 2 for N = 16), and a
// carry-propagate adder sums them. The product is kept modulo 2^(2N).
//
// Columns 0 .. APPROX_COLS-1 use cmp42_approx (no carry chain there; the
// first exact column gets cin = 0), the rest use cmp42_exact; the
// full-adder rows are always exact. APPROX_COLS = 0 gives the exact
// multiplier, APPROX_COLS = 8 the approximate multiplier with approximate
// compressors in columns #0 to #7. The three-step structure (partial
// products, compressor reduction with approximation in the low columns,
// final adder) and the support of any width follow the document; the
// regular row-group tree is this design's own placement of the compressors.
//
// Interface: a, b operands (N >= 2); p product. Purely combinational.
module cmp42_mult #(
  parameter int unsigned N           = 8,
  parameter int unsigned APPROX_COLS = 8   // approximate columns #0 to #7
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned W = 2 * N;

  // rows left after one level of reduction
  function automatic int unsigned rows_next(input int unsigned r);
    return (r / 4) * 2 + ((r % 4 == 3) ? 2 : r % 4);
  endfunction

  // rows present at level l
  function automatic int unsigned rows_at(input int unsigned n, input int unsigned l);
    int unsigned r = n;
    for (int unsigned i = 0; i < l; i++) r = rows_next(r);
    return r;
  endfunction

  // number of levels needed to reach two rows
  function automatic int unsigned num_levels(input int unsigned n);
    int unsigned r = n, l = 0;
    while (r > 2) begin
      r = rows_next(r);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels(N);

  if (N < 2) begin : g_bad_n
    $error("cmp42_mult: N must be at least 2");
  end

  // partial-product generation
  logic [W-1:0] pp [N];
  for (genvar j = 0; j < N; j++) begin : g_pp
    assign pp[j] = W'({N{b[j]}} & a) << j;
  end

  // level l reduces the RIN rows in cur to the ROUT rows in nxt
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned RIN  = rows_at(N, l);
    localparam int unsigned ROUT = rows_next(RIN);
    localparam int unsigned G    = RIN / 4;   // groups of four rows
    localparam int unsigned REM  = RIN % 4;   // rows left over
    logic [W-1:0] cur [RIN];
    logic [W-1:0] nxt [ROUT];
    if (l == 0) begin : g_first
      assign cur = pp;
    end else begin : g_next
      assign cur = g_lvl[l-1].nxt;
    end

    for (genvar g = 0; g < G; g++) begin : g_grp
      logic [W:0] chain;  // cout of column i-1 into cin of column i
      logic [W:0] hi;     // c outputs, one column up
      logic [W-1:0] lo;   // s outputs
      assign chain[0] = 1'b0;
      assign hi[0]    = 1'b0;
      for (genvar i = 0; i < W; i++) begin : g_col
        if (i < APPROX_COLS) begin : g_apx
          cmp42_approx u_cmp (
            .x1(cur[4*g][i]),   .x2(cur[4*g+1][i]),
            .x3(cur[4*g+2][i]), .x4(cur[4*g+3][i]),
            .c (hi[i+1]),       .s (lo[i])
          );
          assign chain[i+1] = 1'b0;
        end else begin : g_exa
          cmp42_exact u_cmp (
            .x1(cur[4*g][i]),   .x2(cur[4*g+1][i]),
            .x3(cur[4*g+2][i]), .x4(cur[4*g+3][i]),
            .cin(chain[i]),
            .s (lo[i]), .c(hi[i+1]), .cout(chain[i+1])
          );
        end
      end
      assign nxt[2*g]   = lo;
      assign nxt[2*g+1] = hi[W-1:0];
      // carries out of the top column lie above the 2N-bit product, and the
      // chain is cut in the approximate columns: those bits go unread
      logic unused_carries;
      assign unused_carries = ^{chain, hi[W]};
    end

    if (REM == 3) begin : g_fa_row
      logic [W:0]   hi;
      logic [W-1:0] lo;
      assign hi[0] = 1'b0;
      for (genvar i = 0; i < W; i++) begin : g_col
        full_adder u_fa (
          .a(cur[4*G][i]), .b(cur[4*G+1][i]), .ci(cur[4*G+2][i]),
          .sum(lo[i]), .co(hi[i+1])
        );
      end
      assign nxt[2*G]   = lo;
      assign nxt[2*G+1] = hi[W-1:0];
    end else begin : g_pass
      for (genvar r = 0; r < REM; r++) begin : g_row
        assign nxt[2*G+r] = cur[4*G+r];
      end
    end
  end

  // final carry-propagate adder
  if (LEVELS == 0) begin : g_no_tree
    assign p = pp[0] + pp[1];
  end else begin : g_cpa
    assign p = g_lvl[LEVELS-1].nxt[0] + g_lvl[LEVELS-1].nxt[1];
  end
endmodule
