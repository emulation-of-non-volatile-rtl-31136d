// dct_romo: distributed-arithmetic ROM for the odd rows k = 1, 3, 5, 7 of the 8-point DCT
// matrix C[k][j] = a(k) * cos(pi/8 * (j + 1/2) * k), a(0) = 1/sqrt(8),
// a(k>0) = 1/2, scaled by 2^12 and rounded.
// Because C[k][7-j] = -C[k][j], these rows act on the four
// folded inputs u[j] = x[j] - x[7-j], j = 0..3. For a 4-bit pattern p (bit j of p
// is one bit of u[j]) and a row selector ksel (row k = 2*ksel + 1), the word is
//   data = sum over j with p[j] = 1 of C[k][j].
// Purely combinational lookup (the precomputed partial products that feed
// the multiply-accumulate of dct_da). The paper names the even/odd ROM pair;
// the folding, scaling and contents layout are this design's choice.
module dct_romo
  import nvl_pkg::*;
(
  input  logic [1:0]               ksel,
  input  logic [3:0]               pat,
  output logic signed [ROMD_W-1:0] data
);
  localparam int COEF [4][4] = '{'{2009,  1703,  1138,   400},
      '{1703,  -400, -2009, -1138},
      '{1138, -2009,   400,  1703},
      '{ 400, -1138,  1703, -2009}};

  always_comb begin
    data = '0;
    for (int j = 0; j < 4; j++)
      if (pat[j]) data = data + ROMD_W'(COEF[ksel][j]);
  end
endmodule
