// tb_dct_da: random signed inputs (including the extreme values) for the
// distributed-arithmetic unit at the first-stage width (10 bits); the result
// must equal exactly sum_j Cq[k][j] * x[j], where Cq is the DCT matrix scaled
// by 4096 and rounded, computed here with $cos.
module tb_dct_da;
  localparam int W = 10;
  logic signed [7:0][W-1:0] x;
  logic [2:0] k;
  logic signed [W+17:0] acc;
  int checks = 0, failures = 0;

  dct_da #(.W(W)) dut (.x, .k, .acc);

  function automatic int coef(input int kk, input int j);
    real a, c;
    a = (kk == 0) ? 1.0 / $sqrt(8.0) : 0.5;
    c = 4096.0 * a * $cos(3.14159265358979 / 8.0 * (real'(j) + 0.5) * real'(kk));
    return $rtoi(c >= 0.0 ? c + 0.5 : c - 0.5);
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      longint e;
      for (int j = 0; j < 8; j++) begin
        int v;
        v = int'($urandom % 511) - 256;
        if (t < 8) v = (t % 2) ? -256 : 254;
        x[j] = W'(v);
      end
      k = 3'(t % 8);
      #1;
      e = 0;
      for (int j = 0; j < 8; j++) e += longint'(coef(int'(k), j)) * longint'(signed'(x[j]));
      checks++;
      if (longint'(acc) != e) begin
        failures++; if (failures < 10) $display("k %0d got %0d exp %0d", k, acc, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
