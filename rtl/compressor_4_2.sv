// compressor_4_2: one-bit 4:2 compressor built from XORs and multiplexers.
//
// Four bits x[0..3] of equal weight and a carry-in ci (from the next lower
// bit) are reduced to a sum bit s of the same weight and two bits of double
// weight, c and co:
//     x[0] + x[1] + x[2] + x[3] + ci = s + 2 * (c + co)
// with
//     s  = x1 ^ x2 ^ x3 ^ x4 ^ ci
//     c  = (x1^x2^x3^x4) ? ci : x4          (multiplexer)
//     co = (x1^x2)       ? x3 : x1          (multiplexer)
// where x1..x4 are x[0]..x[3]. co does not depend on ci, so in a row of
// compressors the carry moves at most one bit position: no carry chain.
// Combinational, no clock; the longest path is three XORs and a mux.
// The sum and c equations and the port set (X0..X3, C1 in, C0 out, C, S)
// are the design's; the co multiplexer chooses x1 when x1 == x2 (the
// majority of x1, x2, x3), which is what makes the identity above hold.
module compressor_4_2 (
  input  logic [3:0] x,
  input  logic       ci,
  output logic       s,
  output logic       c,
  output logic       co
);
  logic x12;   // x1 ^ x2
  logic x1234; // x1 ^ x2 ^ x3 ^ x4

  always_comb begin
    x12   = x[0] ^ x[1];
    x1234 = x12 ^ x[2] ^ x[3];
    s     = x1234 ^ ci;
    c     = x1234 ? ci : x[3];
    co    = x12 ? x[2] : x[0];
  end
endmodule
