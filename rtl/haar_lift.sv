// haar_lift: integer Haar step on N pairs of 8-bit samples, combinational.
//
// For each pair (a, b): s = floor((a + b) / 2) is the low-pass (average) and
// d = b - a modulo 256 is the high-pass (difference) coefficient, so both stay
// 8-bit and the pair can be rebuilt exactly as a = s - floor(d/2),
// b = s + floor((d+1)/2) when d is read as a signed 9-bit difference. The sum is
// formed with 9 bits before halving. Lane n uses bits 8n+7:8n of every vector.
module haar_lift #(
  parameter int unsigned N = 8
) (
  input  logic [8*N-1:0] a,
  input  logic [8*N-1:0] b,
  output logic [8*N-1:0] s,
  output logic [8*N-1:0] d
);
  always_comb begin
    for (int n = 0; n < int'(N); n++) begin
      logic [8:0] sum;
      sum          = {1'b0, a[8*n +: 8]} + {1'b0, b[8*n +: 8]};
      s[8*n +: 8]  = sum[8:1];
      d[8*n +: 8]  = b[8*n +: 8] - a[8*n +: 8];
    end
  end
endmodule
