// ppg: partial product generator of the N x N unsigned multiplier.
//
// AND array: partial product i is the multiplicand a ANDed with multiplier
// bit b[i], shifted left by i places into a 2N-bit word, so that
//     pp[0] + pp[1] + ... + pp[N-1] = a * b.
// N*N two-input AND gates, combinational, no clock.
// Forming the bit products by AND is the design's; placing them in
// pre-shifted 2N-bit words is this implementation's choice, so that the
// compressor tree can add whole words.
module ppg #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] pp [N]
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      pp[i] = {{N{1'b0}}, a & {N{b[i]}}} << i;
    end
  end
endmodule
