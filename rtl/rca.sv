// rca: W-bit ripple carry adder, the final adder of the hybrid multiplier.
//
// A chain of W full adders: stage i adds a[i], b[i] and the carry-out of
// stage i-1; stage 0 takes cin and stage W-1 drives cout. The carry ripples
// through every stage, so the delay grows linearly with W. Combinational,
// no clock. Interface: s + 2^W * cout = a + b + cin.
// The structure follows the ripple carry adder of the design; the default
// width of 32 bits is that of the 16 x 16 multiplier's product.
module rca #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;  // c[i] is the carry into stage i

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_stage
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (s[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];
endmodule
