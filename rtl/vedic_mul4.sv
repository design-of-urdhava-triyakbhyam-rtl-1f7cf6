// 4x4-bit unsigned Urdhva Tiryakbhyam ("vertically and crosswise") multiplier.
//
// The sixteen partial products pp[i][j] = U[i] & V[j] are grouped into the
// seven columns of the vertical-and-crosswise scheme, column k holding every
// pair with i + j = k:
//   T0 = U0V0
//   T1 = U1V0 + U0V1
//   T2 = U2V0 + U1V1 + U0V2
//   T3 = U3V0 + U2V1 + U1V2 + U0V3
//   T4 = U3V1 + U2V2 + U1V3
//   T5 = U3V2 + U2V3
//   T6 = U3V3
// Each column sum keeps its least significant bit as the product bit and
// passes its carries to the next columns. The columns are reduced with
// exactly 7 full adders, 2 half adders and 1 special (four-input) adder:
// a first row adds each column's partial products (the special adder takes
// the four of column 3, its C1 carry of weight 4 going to column 5), and a
// second row adds each first-row sum to the carries from the column below,
// giving T2..T6 and the final carry T7.
//
// The column equations, the adder count and which partial products enter
// which first-row adder follow the published architecture; the exact routing
// of carries into the second row is this design's own choice, made to use
// that adder count. Operands are unsigned. Purely combinational: the product
// is valid one adder-chain delay after u and v settle.
module vedic_mul4
  import fir_pkg::*;
(
  input  sample_t u,   // U3..U0
  input  coef_t   v,   // V3..V0
  output prod_t   t    // T7..T0
);
  logic [3:0][3:0] pp;  // pp[i][j] = U[i] & V[j]

  always_comb
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        pp[i][j] = u[i] & v[j];

  // Column 1
  logic k1;                       // carry of column 1 into column 2
  // Column 2
  logic s2, a2, b2;               // first-row sum, first- and second-row carries
  // Column 3
  logic s3, sa_c0, sa_c1, a3;     // special-adder sum and carries, second-row carry
  // Column 4
  logic s4, a4, b4;
  // Column 5
  logic s5, a5, b5;

  // T0: vertical product of the least significant digits
  assign t[0] = pp[0][0];

  // T1 = U1V0 + U0V1
  half_adder ha_c1 (.a(pp[1][0]), .b(pp[0][1]), .s(t[1]), .c(k1));

  // T2 = U2V0 + U1V1 + U0V2 + carry(col 1)
  full_adder fa_c2 (.a(pp[2][0]), .b(pp[1][1]), .ci(pp[0][2]), .s(s2), .co(a2));
  half_adder ha_t2 (.a(s2), .b(k1), .s(t[2]), .c(b2));

  // T3 = U3V0 + U2V1 + U1V2 + U0V3 + carries(col 2)
  special_adder sa_c3 (.a(pp[0][3]), .b(pp[1][2]), .c(pp[2][1]), .d(pp[3][0]),
                       .sum(s3), .c0(sa_c0), .c1(sa_c1));
  full_adder fa_t3 (.a(s3), .b(a2), .ci(b2), .s(t[3]), .co(a3));

  // T4 = U3V1 + U2V2 + U1V3 + C0(special adder) + carry(col 3)
  full_adder fa_c4 (.a(pp[1][3]), .b(pp[2][2]), .ci(pp[3][1]), .s(s4), .co(a4));
  full_adder fa_t4 (.a(s4), .b(sa_c0), .ci(a3), .s(t[4]), .co(b4));

  // T5 = U3V2 + U2V3 + C1(special adder) + carries(col 4)
  full_adder fa_c5 (.a(pp[2][3]), .b(pp[3][2]), .ci(sa_c1), .s(s5), .co(a5));
  full_adder fa_t5 (.a(s5), .b(a4), .ci(b4), .s(t[5]), .co(b5));

  // T6 = U3V3 + carries(col 5); its carry is T7
  full_adder fa_t6 (.a(pp[3][3]), .b(a5), .ci(b5), .s(t[6]), .co(t[7]));
endmodule
