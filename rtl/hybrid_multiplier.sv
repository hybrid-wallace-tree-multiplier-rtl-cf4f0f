// hybrid_multiplier: N x N unsigned multiplier, 4:2 compressor Wallace tree
// with a ripple carry final adder.
//
// Three stages, all combinational:
//   1. ppg forms N partial products, a AND b[i] shifted by i, 2N bits wide.
//   2. wallace_tree_4_2 reduces them with seven 4:2 compressor rows in three
//      levels to a sum vector and a carry vector (carry-save form). The tree
//      takes sixteen operands; when N < 16 the unused ones are tied to 0.
//   3. rca, a 2N-bit ripple carry adder, adds the two vectors into the
//      product p = a * b.
// Interface: a, b in, p out; no clock, no handshake, p is valid one
// combinational delay after a and b change.
// The three stages, the 4:2 compressor tree and the ripple carry final
// adder are the design's, as is the default N = 16 (32-bit product). N may
// be set from 1 to 16; larger N would need a bigger tree than the
// sixteen-operand one drawn for the design.
module hybrid_multiplier #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned W = 2 * N;

  initial begin
    assert (N >= 1 && N <= 16)
      else $fatal(1, "hybrid_multiplier: N must be 1..16, got %0d", N);
  end

  logic [W-1:0] pp   [N];
  logic [W-1:0] ops  [16];
  logic [W-1:0] t_sum;
  logic [W-1:0] t_carry;
  logic         unused_cout;

  ppg #(.N(N)) u_ppg (
    .a (a),
    .b (b),
    .pp(pp)
  );

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      ops[i] = (i < N) ? pp[i] : '0;
    end
  end

  wallace_tree_4_2 #(.W(W)) u_tree (
    .op   (ops),
    .sum  (t_sum),
    .carry(t_carry)
  );

  // The product fits in W bits, so the final carry-out is always 0.
  rca #(.W(W)) u_rca (
    .a   (t_sum),
    .b   (t_carry),
    .cin (1'b0),
    .s   (p),
    .cout(unused_cout)
  );
endmodule
