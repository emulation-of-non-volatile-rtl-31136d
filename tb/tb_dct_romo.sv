// tb_dct_romo: exhaustive check of the odd DA ROM: for every row selector and
// bit pattern, the word must equal the sum of the selected DCT constants,
// each computed here as round(4096 * a(k) * cos(pi/8 * (j + 1/2) * k)).
module tb_dct_romo;
  logic [1:0] ksel;
  logic [3:0] pat;
  logic signed [15:0] data;
  int checks = 0, failures = 0;

  dct_romo dut (.ksel, .pat, .data);

  function automatic int coef(input int k, input int j);
    real a, c;
    a = (k == 0) ? 1.0 / $sqrt(8.0) : 0.5;
    c = 4096.0 * a * $cos(3.14159265358979 / 8.0 * (real'(j) + 0.5) * real'(k));
    return $rtoi(c >= 0.0 ? c + 0.5 : c - 0.5);
  endfunction

  initial begin
    for (int s = 0; s < 4; s++)
      for (int p = 0; p < 16; p++) begin
        int e;
        ksel = 2'(s); pat = 4'(p);
        #1;
        e = 0;
        for (int j = 0; j < 4; j++) if (p[j]) e += coef(2 * s + 1, j);
        checks++;
        if (int'(data) != e) begin
          failures++; $display("ksel %0d pat %0d got %0d exp %0d", s, p, data, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
