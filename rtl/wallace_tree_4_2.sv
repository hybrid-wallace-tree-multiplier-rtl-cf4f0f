// wallace_tree_4_2: sixteen-operand Wallace tree of 4:2 compressor rows.
//
// Reduces sixteen W-bit operands to two, a sum vector and a carry vector,
// with seven csa_4_2 rows in three levels:
//   level 1: four rows, each taking four operands (16 -> 8 vectors)
//   level 2: two rows, each taking the two output pairs of two level-1 rows
//            (8 -> 4 vectors)
//   level 3: one row taking the outputs of both level-2 rows (4 -> 2)
// Each row's carry vector is shifted left one bit before it moves on, so
// every vector passed between levels is aligned to its weight; the result
// satisfies  sum + carry = op[0] + ... + op[15]  (mod 2^W). Bits carried
// past bit W-1 are dropped, which loses nothing when the true total fits in
// W bits, as it does for the multiplier's partial products. Every row's
// carry-in is 0. Combinational, no clock; the delay is three compressor
// delays, independent of W.
// The 4-2-1 arrangement of seven compressors follows the tree drawing of
// the design; the operand count is fixed at sixteen by that drawing.
module wallace_tree_4_2 #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] op [16],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  // Level 1: op[4j .. 4j+3] -> l1_s[j], l1_c[j]
  logic [W-1:0] l1_s [4];
  logic [W-1:0] l1_c [4];
  logic [W-1:0] l1_cs[4];  // l1_c shifted to its weight
  logic         unused_l1_co[4];  // carry past bit W-1, dropped

  for (genvar j = 0; j < 4; j++) begin : g_l1
    csa_4_2 #(.W(W)) u_csa (
      .x0(op[4*j]),
      .x1(op[4*j+1]),
      .x2(op[4*j+2]),
      .x3(op[4*j+3]),
      .ci(1'b0),
      .s (l1_s[j]),
      .c (l1_c[j]),
      .co(unused_l1_co[j])
    );
    assign l1_cs[j] = l1_c[j] << 1;
  end

  // Level 2: outputs of level-1 rows 2k and 2k+1 -> l2_s[k], l2_c[k]
  logic [W-1:0] l2_s [2];
  logic [W-1:0] l2_c [2];
  logic [W-1:0] l2_cs[2];
  logic         unused_l2_co[2];

  for (genvar k = 0; k < 2; k++) begin : g_l2
    csa_4_2 #(.W(W)) u_csa (
      .x0(l1_s[2*k]),
      .x1(l1_cs[2*k]),
      .x2(l1_s[2*k+1]),
      .x3(l1_cs[2*k+1]),
      .ci(1'b0),
      .s (l2_s[k]),
      .c (l2_c[k]),
      .co(unused_l2_co[k])
    );
    assign l2_cs[k] = l2_c[k] << 1;
  end

  // Level 3: outputs of both level-2 rows -> final sum and carry
  logic [W-1:0] l3_c;
  logic         unused_l3_co;

  csa_4_2 #(.W(W)) u_csa_l3 (
    .x0(l2_s[0]),
    .x1(l2_cs[0]),
    .x2(l2_s[1]),
    .x3(l2_cs[1]),
    .ci(1'b0),
    .s (sum),
    .c (l3_c),
    .co(unused_l3_co)
  );

  assign carry = l3_c << 1;
endmodule
