// approx_mult8: 8x8 unsigned approximate multiplier built on altered partial
// products.
//
// How it works. The 64 AND partial products a(m,n) = alpha[m] & beta[n] are
// formed first. In columns 3 to 11 every pair a(m,n), a(n,m) (m > n) is
// replaced by a propagate p(m,n) = a(m,n) | a(n,m) and a generate
// g(m,n) = a(m,n) & a(n,m). As a(m,n) + a(n,m) = p(m,n) + g(m,n) exactly,
// this step is lossless. The
// generate bits are rarely 1 (probability 1/16), so each column's generates
// are merged with a single OR gate (G3..G11, at most four inputs per gate):
// this is the first approximation. The remaining bits are reduced in two
// stages with approximate half-adders, full-adders and 4-2 compressors, which
// leaves two rows x and y; an exact ripple-carry adder adds them.
//
// Stage 1 (columns 4..12): 3 half-adders, 3 full-adders, 3 compressors.
// Stage 2 (columns 2..13): 1 half-adder, 11 full-adders. Carries are named
// after the column that produced them (C12 comes from column 12 and lands in
// column 13). The partial-product placement, the cell count and the cell type
// at each position follow the published reduction diagram. Which bit feeds
// which cell input is not published: the bits are taken in the order the
// diagram lists them, top to bottom, as x1, x2, x3, x4. The diagram shows
// neither a(7,7) nor the carry out of column 13; here they form the two bits
// of column 14 that enter the final adder.
//
// Interface: prod = approximately alpha * beta. Purely combinational.
module approx_mult8 (
  input  logic [7:0]  alpha,
  input  logic [7:0]  beta,
  output logic [15:0] prod
);
  // a[m][n] = alpha[m] & beta[n], weight 2^(m+n)
  logic [7:0] a [8];
  // altered partial products, valid for m > n and 3 <= m+n <= 11
  logic [7:0] p [8];
  logic [7:0] g [8];

  always_comb begin
    for (int m = 0; m < 8; m++) begin
      for (int n = 0; n < 8; n++) begin
        a[m][n] = alpha[m] & beta[n];
        p[m][n] = a[m][n] | a[n][m];
        g[m][n] = a[m][n] & a[n][m];
      end
    end
  end

  // column-wise OR of the generate bits
  logic [11:3] G;
  always_comb begin
    G[3]  = g[3][0] | g[2][1];
    G[4]  = g[4][0] | g[3][1];
    G[5]  = g[5][0] | g[4][1] | g[3][2];
    G[6]  = g[6][0] | g[5][1] | g[4][2];
    G[7]  = g[7][0] | g[6][1] | g[5][2] | g[4][3];
    G[8]  = g[7][1] | g[6][2] | g[5][3];
    G[9]  = g[7][2] | g[6][3] | g[5][4];
    G[10] = g[7][3] | g[6][4];
    G[11] = g[7][4] | g[6][5];
  end

  // ---------------- stage 1 ----------------
  logic [12:4] S, C;

  approx_ha     u_s1_c12 (.x1(a[7][5]), .x2(a[5][7]), .sum(S[12]), .carry(C[12]));
  approx_ha     u_s1_c11 (.x1(p[7][4]), .x2(p[6][5]), .sum(S[11]), .carry(C[11]));
  approx_fa     u_s1_c10 (.x1(p[7][3]), .x2(p[6][4]), .x3(a[5][5]),
                          .sum(S[10]), .carry(C[10]));
  approx_fa     u_s1_c9  (.x1(p[7][2]), .x2(p[6][3]), .x3(p[5][4]),
                          .sum(S[9]), .carry(C[9]));
  approx_comp42 u_s1_c8  (.x1(p[7][1]), .x2(p[6][2]), .x3(p[5][3]), .x4(a[4][4]),
                          .sum(S[8]), .carry(C[8]));
  approx_comp42 u_s1_c7  (.x1(p[7][0]), .x2(p[6][1]), .x3(p[5][2]), .x4(p[4][3]),
                          .sum(S[7]), .carry(C[7]));
  approx_comp42 u_s1_c6  (.x1(p[6][0]), .x2(p[5][1]), .x3(p[4][2]), .x4(a[3][3]),
                          .sum(S[6]), .carry(C[6]));
  approx_fa     u_s1_c5  (.x1(p[5][0]), .x2(p[4][1]), .x3(p[3][2]),
                          .sum(S[5]), .carry(C[5]));
  approx_ha     u_s1_c4  (.x1(p[4][0]), .x2(p[3][1]), .sum(S[4]), .carry(C[4]));

  // ---------------- stage 2 ----------------
  // x: sums staying in their column, y: carries moved one column up
  logic [14:0] x, y;

  approx_ha u_s2_c2  (.x1(a[2][0]), .x2(a[0][2]), .sum(x[2]), .carry(y[3]));
  approx_fa u_s2_c3  (.x1(p[3][0]), .x2(p[2][1]), .x3(G[3]),  .sum(x[3]),  .carry(y[4]));
  approx_fa u_s2_c4  (.x1(S[4]),    .x2(a[2][2]), .x3(G[4]),  .sum(x[4]),  .carry(y[5]));
  approx_fa u_s2_c5  (.x1(S[5]),    .x2(G[5]),    .x3(C[4]),  .sum(x[5]),  .carry(y[6]));
  approx_fa u_s2_c6  (.x1(S[6]),    .x2(G[6]),    .x3(C[5]),  .sum(x[6]),  .carry(y[7]));
  approx_fa u_s2_c7  (.x1(S[7]),    .x2(G[7]),    .x3(C[6]),  .sum(x[7]),  .carry(y[8]));
  approx_fa u_s2_c8  (.x1(S[8]),    .x2(G[8]),    .x3(C[7]),  .sum(x[8]),  .carry(y[9]));
  approx_fa u_s2_c9  (.x1(S[9]),    .x2(G[9]),    .x3(C[8]),  .sum(x[9]),  .carry(y[10]));
  approx_fa u_s2_c10 (.x1(S[10]),   .x2(G[10]),   .x3(C[9]),  .sum(x[10]), .carry(y[11]));
  approx_fa u_s2_c11 (.x1(S[11]),   .x2(G[11]),   .x3(C[10]), .sum(x[11]), .carry(y[12]));
  approx_fa u_s2_c12 (.x1(S[12]),   .x2(C[11]),   .x3(a[6][6]), .sum(x[12]), .carry(y[13]));
  approx_fa u_s2_c13 (.x1(a[7][6]), .x2(a[6][7]), .x3(C[12]), .sum(x[13]), .carry(y[14]));

  always_comb begin
    x[0]  = a[0][0];
    y[0]  = 1'b0;
    x[1]  = a[1][0];
    y[1]  = a[0][1];
    y[2]  = a[1][1];
    x[14] = a[7][7];
  end

  // ---------------- vector merge ----------------
  rca #(.W(15)) u_rca (.a(x), .b(y), .s(prod));
endmodule
