// csa_4_2: W-bit 4:2 carry-save compressor row.
//
// W one-bit 4:2 compressors side by side, bit i compressing x0[i], x1[i],
// x2[i] and x3[i]. The carry-out co of bit i feeds the carry-in ci of bit
// i+1; because co does not depend on ci this is not a ripple chain, and the
// row's delay is that of one compressor whatever W is. The four operands are
// reduced to two vectors in carry-save form:
//     x0 + x1 + x2 + x3 + ci = s + 2 * c + 2^W * co
// s[i] has weight 2^i; c[i] has weight 2^(i+1), so the caller shifts c left
// by one bit before using it as an operand. ci enters bit 0 and co leaves
// bit W-1, the C1 and C0 of the one-bit symbol. Combinational, no clock.
// Chaining the compressors through ci/co follows the design; the default
// width of 32 bits is the product width of the 16 x 16 multiplier.
module csa_4_2 #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x0,
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] x3,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic [W-1:0] c,
  output logic         co
);
  logic [W:0] k;  // k[i] is the carry into bit i from bit i-1

  assign k[0] = ci;

  for (genvar i = 0; i < W; i++) begin : g_bit
    compressor_4_2 u_cmp (
      .x ({x3[i], x2[i], x1[i], x0[i]}),
      .ci(k[i]),
      .s (s[i]),
      .c (c[i]),
      .co(k[i+1])
    );
  end

  assign co = k[W];
endmodule
