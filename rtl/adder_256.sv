// Parallel prefix adder, N bits wide (256 by default), with carry-in and an
// N+1-bit result {carry-out, sum}.
//
// Three stages:
//   1. Pre-computation: g_i = a_i & b_i, p_i = a_i ^ b_i for every bit; the
//      carry-in enters as an extra column "-1" with g_-1 = cin.
//   2. Prefix stage: a Kogge-Stone network of log2(N+1) rounded up levels. At
//      level l every column i combines with column i - 2^l. A black cell is used
//      while the group still ends above the carry-in column; once it reaches
//      the carry-in column only the group generate is needed and a gray cell
//      is used.
//   3. Final computation: s_i = p_i ^ G_{i-1:-1}, carry-out = G_{N-1:-1}.
// With SPARSE = 1 the adder becomes a sparse Kogge-Stone adder: black cells
// first reduce every 4-bit block to one group (G, P), the Kogge-Stone tree
// then runs over the blocks only, delivering the carry into every fourth
// bit, and each 4-bit block finishes its sum with a ripple chain of four full
// adders (N must then be a multiple of 4).
// Combinational, no clock. The three-stage structure, the black/gray cells,
// the carry-in as g_-1 and the sparse variant with 4-bit ripple blocks follow
// the design; which topology the MAC uses is left open there, and the dense
// Kogge-Stone default is this implementation's own choice.
module adder_256 #(
  parameter int unsigned N      = 256,
  parameter bit          SPARSE = 1'b0
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N:0]   y
);
  if (!SPARSE) begin : g_dense
    // Column c of the prefix arrays stands for bit c-1 (column 0 is the carry-in).
    localparam int unsigned COLS   = N + 1;
    localparam int unsigned LEVELS = $clog2(COLS);

    logic [N-1:0] p_bit;
    logic [COLS-1:0] g_lvl [LEVELS+1];
    logic [COLS-1:0] p_lvl [LEVELS+1];

    // Pre-computation
    assign p_bit = a ^ b;
    assign g_lvl[0] = {a & b, cin};
    assign p_lvl[0] = {p_bit, 1'b0};

    // Prefix stage
    for (genvar l = 0; l < LEVELS; l++) begin : g_level
      localparam int unsigned D = 1 << l;
      for (genvar c = 0; c < COLS; c++) begin : g_col
        if (c < D) begin : g_pass
          // Group already complete down to the carry-in column.
          assign g_lvl[l+1][c] = g_lvl[l][c];
          assign p_lvl[l+1][c] = p_lvl[l][c];
        end else if (c < 2 * D) begin : g_gray
          // Lower group is complete, so this group becomes complete too.
          pp_gray_cell u_gc (
            .g_hi(g_lvl[l][c]), .p_hi(p_lvl[l][c]), .g_lo(g_lvl[l][c-D]),
            .g_o (g_lvl[l+1][c])
          );
          assign p_lvl[l+1][c] = 1'b0;
        end else begin : g_black
          pp_black_cell u_bc (
            .g_hi(g_lvl[l][c]),   .p_hi(p_lvl[l][c]),
            .g_lo(g_lvl[l][c-D]), .p_lo(p_lvl[l][c-D]),
            .g_o (g_lvl[l+1][c]), .p_o (p_lvl[l+1][c])
          );
        end
      end
    end

    // Final computation: carry into bit i is G_{i-1:-1} = column i.
    assign y[N-1:0] = p_bit ^ g_lvl[LEVELS][N-1:0];
    assign y[N]     = g_lvl[LEVELS][N];
  end else begin : g_sparse
    // Column c of the block arrays stands for block c-1 (column 0 is the
    // carry-in), block k covering bits 4k+3..4k.
    localparam int unsigned NB     = N / 4;
    localparam int unsigned BCOLS  = NB + 1;
    localparam int unsigned BLEVELS = $clog2(BCOLS);

    logic [N-1:0]     g_bit, p_bit;
    logic [2*NB-1:0]  g_pair, p_pair;
    logic [BCOLS-1:0] g_blk [BLEVELS+1];
    logic [BCOLS-1:0] p_blk [BLEVELS+1];
    logic [N:0]       c;

    // Pre-computation
    assign g_bit = a & b;
    assign p_bit = a ^ b;

    // Reduce each 4-bit block to one group: pairs, then the whole block.
    for (genvar k = 0; k < 2 * NB; k++) begin : g_pairs
      pp_black_cell u_bc (
        .g_hi(g_bit[2*k+1]), .p_hi(p_bit[2*k+1]), .g_lo(g_bit[2*k]), .p_lo(p_bit[2*k]),
        .g_o (g_pair[k]),    .p_o (p_pair[k])
      );
    end
    assign g_blk[0][0] = cin;
    assign p_blk[0][0] = 1'b0;
    for (genvar k = 0; k < NB; k++) begin : g_blocks
      pp_black_cell u_bc (
        .g_hi(g_pair[2*k+1]),  .p_hi(p_pair[2*k+1]), .g_lo(g_pair[2*k]), .p_lo(p_pair[2*k]),
        .g_o (g_blk[0][k+1]),  .p_o (p_blk[0][k+1])
      );
    end

    // Prefix stage over the blocks
    for (genvar l = 0; l < BLEVELS; l++) begin : g_level
      localparam int unsigned D = 1 << l;
      for (genvar cc = 0; cc < BCOLS; cc++) begin : g_col
        if (cc < D) begin : g_pass
          assign g_blk[l+1][cc] = g_blk[l][cc];
          assign p_blk[l+1][cc] = p_blk[l][cc];
        end else if (cc < 2 * D) begin : g_gray
          pp_gray_cell u_gc (
            .g_hi(g_blk[l][cc]), .p_hi(p_blk[l][cc]), .g_lo(g_blk[l][cc-D]),
            .g_o (g_blk[l+1][cc])
          );
          assign p_blk[l+1][cc] = 1'b0;
        end else begin : g_black
          pp_black_cell u_bc (
            .g_hi(g_blk[l][cc]),   .p_hi(p_blk[l][cc]),
            .g_lo(g_blk[l][cc-D]), .p_lo(p_blk[l][cc-D]),
            .g_o (g_blk[l+1][cc]), .p_o (p_blk[l+1][cc])
          );
        end
      end
    end

    // Final computation: 4-bit ripple-carry blocks started by the tree's carries.
    for (genvar k = 0; k < NB; k++) begin : g_rca
      assign c[4*k] = g_blk[BLEVELS][k];
      for (genvar j = 0; j < 4; j++) begin : g_fa
        logic co;  // a block's own carry-out is unused except in the top block: the next block starts from the tree's carry
        pp_full_adder u_fa (
          .a(a[4*k+j]), .b(b[4*k+j]), .ci(c[4*k+j]), .s(y[4*k+j]), .co(co)
        );
        if (j < 3) begin : g_link
          assign c[4*k+j+1] = co;
        end else if (k == NB - 1) begin : g_out
          assign c[N] = co;
        end
      end
    end
    assign y[N] = c[N];
  end

  initial assert (!SPARSE || (N % 4 == 0)) else $error("adder_256: SPARSE needs N divisible by 4");
endmodule
