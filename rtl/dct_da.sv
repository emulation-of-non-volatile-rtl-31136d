// dct_da: distributed-arithmetic multiply-accumulate for one coefficient of an
// 8-point DCT. Given the eight inputs x[0..7] (signed, W bits) and the output
// index k, it forms the four folded values u[j] = x[j] + x[7-j] (k even) or
// x[j] - x[7-j] (k odd), then, for every bit position b of u, looks up the
// ROM word for the pattern {u[3][b], u[2][b], u[1][b], u[0][b]} and adds it
// shifted left by b; the sign bit's word is subtracted (two's complement).
// The result is X[k] * 2^12 exactly as the scaled ROM constants give it.
// One ROM pair per bit gives one coefficient per cycle; the module is purely
// combinational, its user registers the result. The paper computes the
// products by distributed arithmetic from precomputed ROMs; the bit-parallel
// arrangement is this design's choice.
module dct_da
  import nvl_pkg::*;
#(
  parameter int unsigned W = 10               // input width (signed)
) (
  input  logic signed [N-1:0][W-1:0]     x,
  input  logic [2:0]                      k,
  output logic signed [W+ROMD_W+1:0]      acc
);
  localparam int unsigned UW = W + 1;          // folded value width
  localparam int unsigned AW = W + ROMD_W + 2;

  logic signed [3:0][UW-1:0]     u;
  logic signed [UW-1:0][ROMD_W-1:0] re, ro;

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      if (k[0]) u[j] = UW'(signed'(x[j])) - UW'(signed'(x[7-j]));
      else      u[j] = UW'(signed'(x[j])) + UW'(signed'(x[7-j]));
    end
  end

  for (genvar b = 0; b < UW; b++) begin : g_bit
    dct_rome u_rome (.ksel(k[2:1]), .pat({u[3][b], u[2][b], u[1][b], u[0][b]}), .data(re[b]));
    dct_romo u_romo (.ksel(k[2:1]), .pat({u[3][b], u[2][b], u[1][b], u[0][b]}), .data(ro[b]));
  end

  always_comb begin
    logic signed [AW-1:0] term;
    acc = '0;
    for (int b = 0; b < UW; b++) begin
      term = AW'(signed'(k[0] ? ro[b] : re[b])) <<< b;
      if (b == UW - 1) acc = acc - term;
      else             acc = acc + term;
    end
  end
endmodule
