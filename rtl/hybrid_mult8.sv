// hybrid_mult8 -- 8x8 unsigned hybrid approximate multiplier.
//
// The 64 partial products a[i] & b[j] form columns 0..14 (column k holds the
// products with i + j = k, listed in increasing i). The columns are treated
// in three ways:
//
//   * Columns 0..3 are dropped. Output bits 3..0 are the constant
//     TRUNC_CONST (0110 by default), close to the mean of the dropped bits,
//     and nothing is carried out of them.
//   * Columns 4..7 (named C1..C4) are the approximate part. Level 1 uses the
//     equal-weight compressors of Esposito on the raw partial products:
//       C4 (col 7, 8 dots): two 4-2                   -> P1 P2 | P3 P4
//       C3 (col 6, 7 dots): one 3-2 over one 4-2      -> P1 P2 | P3 P4
//       C2 (col 5, 6 dots): two raw dots over one 4-2 -> P1 P2 | P3 P4
//       C1 (col 4, 5 dots): two raw dots over one 3-2 -> P1 P2 | P3 P4
//     Level 2 compresses each column's four signals with the proposed 4-2
//     compressor (prop_c42): S stays in the column, C moves one column up.
//     The level-1 outputs are more often 1 than raw partial products, which
//     shifts the proposed compressor's errors towards its -1 cases, all of
//     which have P3 = P4 = 1. An AND gate on P3/P4 of the C4 compressor
//     adds a correction term; it enters the exact part as the third input
//     of the column-8 full adder at level 2.
//   * Columns 8..14 are reduced exactly in two levels of exact 4-2
//     compressors (cout chained to the next column's cin), full adders and
//     half adders, to two rows.
//
// Level 3 is two rows over columns 4..14 (one dot in column 4), summed by a
// ripple-carry adder into product bits 15..4. The largest result over all
// inputs is 64214, so 16 bits always hold it.
//
// Exhaustively, the mean relative error distance is 2.59 % and the
// normalised mean error distance 1.15e-3; only columns 0..7 are
// approximated, columns 8..14 are reduced exactly.
//
// Follows the published 8-bit hybrid structure: column grouping, compressor
// kinds, the AND correction and the 0110 constant. The order of partial
// products inside a column, the wiring of W1/W2 onto P-inputs within one
// Esposito pair, and the exact cells inferred from the dot counts are this
// implementation's choices. Purely combinational: no clock, no registers;
// p is valid one combinational delay after a and b.
module hybrid_mult8 #(
    parameter logic [3:0] TRUNC_CONST = 4'b0110
) (
    input  logic [7:0]  a,
    input  logic [7:0]  b,
    output logic [15:0] p
);
    // ---------------------------------------------------------------
    // Partial products, by column: col[k][n] = a[i0+n] & b[k-i0-n]
    // ---------------------------------------------------------------
    logic [7:0] col [15];

    always_comb begin
        for (int k = 0; k < 15; k++) begin
            col[k] = '0;
            for (int n = 0; n < 8; n++) begin
                automatic int i0 = (k > 7) ? k - 7 : 0;
                automatic int i  = i0 + n;
                automatic int j  = k - i;
                if (i <= 7 && j >= 0 && j <= 7) col[k][n] = a[i] & b[j];
            end
        end
    end

    // ---------------------------------------------------------------
    // Approximate part, level 1: Esposito compressors -> P1..P4 of C1..C4
    // ---------------------------------------------------------------
    logic [3:0] pc1, pc2, pc3, pc4;   // inputs of the level-2 compressors

    // C4: column 7, two 4-2
    esposito_c42 u_c4_top (.p(col[7][3:0]), .w1(pc4[1]), .w2(pc4[0]));
    esposito_c42 u_c4_bot (.p(col[7][7:4]), .w1(pc4[3]), .w2(pc4[2]));
    // C3: column 6, a 3-2 over a 4-2
    esposito_c32 u_c3_top (.x(col[6][2:0]), .w1(pc3[0]), .w2(pc3[1]));
    esposito_c42 u_c3_bot (.p(col[6][6:3]), .w1(pc3[3]), .w2(pc3[2]));
    // C2: column 5, two raw partial products over a 4-2
    assign pc2[1:0] = col[5][1:0];
    esposito_c42 u_c2_bot (.p(col[5][5:2]), .w1(pc2[3]), .w2(pc2[2]));
    // C1: column 4, two raw partial products over a 3-2
    assign pc1[1:0] = col[4][1:0];
    esposito_c32 u_c1_bot (.x(col[4][4:2]), .w1(pc1[2]), .w2(pc1[3]));

    // ---------------------------------------------------------------
    // Approximate part, level 2: proposed compressors and AND correction
    // ---------------------------------------------------------------
    logic s_c1, s_c2, s_c3, s_c4;
    logic c_c1, c_c2, c_c3, c_c4;
    logic corr;

    prop_c42 u_pc1 (.p(pc1), .s(s_c1), .c(c_c1));
    prop_c42 u_pc2 (.p(pc2), .s(s_c2), .c(c_c2));
    prop_c42 u_pc3 (.p(pc3), .s(s_c3), .c(c_c3));
    prop_c42 u_pc4 (.p(pc4), .s(s_c4), .c(c_c4));

    assign corr = pc4[2] & pc4[3];   // set in every -1 case of the C4 compressor

    // ---------------------------------------------------------------
    // Exact part, level 1 (columns 8..14)
    // ---------------------------------------------------------------
    logic l1_s8, l1_c8, l1_co8, fa8_s, fa8_c;
    logic l1_s9, l1_c9, l1_co9, ha9_s, ha9_c;
    logic l1_s10, l1_c10, l1_co10;
    logic fa11_s, fa11_c;

    exact_c42  u_l1_x8  (.x(col[8][3:0]),  .cin(1'b0),   .sum(l1_s8),  .carry(l1_c8),  .cout(l1_co8));
    full_adder u_l1_f8  (.a(col[8][4]), .b(col[8][5]), .ci(col[8][6]), .s(fa8_s), .co(fa8_c));
    exact_c42  u_l1_x9  (.x(col[9][3:0]),  .cin(l1_co8), .sum(l1_s9),  .carry(l1_c9),  .cout(l1_co9));
    half_adder u_l1_h9  (.a(col[9][4]), .b(col[9][5]), .s(ha9_s), .co(ha9_c));
    exact_c42  u_l1_x10 (.x(col[10][3:0]), .cin(l1_co9), .sum(l1_s10), .carry(l1_c10), .cout(l1_co10));
    full_adder u_l1_f11 (.a(col[11][0]), .b(col[11][1]), .ci(l1_co10), .s(fa11_s), .co(fa11_c));

    // ---------------------------------------------------------------
    // Exact part, level 2
    // ---------------------------------------------------------------
    logic l2_s8, l2_c8;
    logic l2_s9, l2_c9, l2_co9;
    logic l2_s10, l2_c10, l2_co10;
    logic l2_s11, l2_c11, l2_co11;
    logic l2_s12, l2_c12, l2_co12;
    logic l2_s13, l2_c13;

    full_adder u_l2_f8  (.a(l1_s8), .b(fa8_s), .ci(corr), .s(l2_s8), .co(l2_c8));
    exact_c42  u_l2_x9  (.x({ha9_s, l1_s9, fa8_c, l1_c8}),
                         .cin(1'b0),    .sum(l2_s9),  .carry(l2_c9),  .cout(l2_co9));
    exact_c42  u_l2_x10 (.x({col[10][4], l1_s10, ha9_c, l1_c9}),
                         .cin(l2_co9),  .sum(l2_s10), .carry(l2_c10), .cout(l2_co10));
    exact_c42  u_l2_x11 (.x({col[11][3], col[11][2], fa11_s, l1_c10}),
                         .cin(l2_co10), .sum(l2_s11), .carry(l2_c11), .cout(l2_co11));
    exact_c42  u_l2_x12 (.x({col[12][2:0], fa11_c}),
                         .cin(l2_co11), .sum(l2_s12), .carry(l2_c12), .cout(l2_co12));
    full_adder u_l2_f13 (.a(col[13][0]), .b(col[13][1]), .ci(l2_co12), .s(l2_s13), .co(l2_c13));

    // ---------------------------------------------------------------
    // Level 3: two rows over columns 4..14, final ripple-carry addition
    // ---------------------------------------------------------------
    logic [10:0] row0, row1;
    logic [11:0] hi;

    assign row0 = {col[14][0], l2_s13, l2_s12, l2_s11, l2_s10, l2_s9, l2_s8,
                   s_c4, s_c3, s_c2, s_c1};
    assign row1 = {l2_c13, l2_c12, l2_c11, l2_c10, l2_c9, l2_c8,
                   c_c4, c_c3, c_c2, c_c1, 1'b0};

    rca #(.WIDTH(11)) u_rca (.a(row0), .b(row1), .sum(hi));

    assign p = {hi, TRUNC_CONST};
endmodule
