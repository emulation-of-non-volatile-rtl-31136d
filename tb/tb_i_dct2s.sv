// tb_i_dct2s: feeds the column stage from a testbench model of the two
// buffers, pre-filled with rounded first-stage results (4 * 1D row DCT,
// transposed), and compares every output with the real-arithmetic 2D DCT
// (tolerance 2). Checks that back-to-back blocks leave as 64 consecutive
// outputs per 64 cycles, that halt stops reading at a row boundary and the
// pipeline drains to idle, and that after a reset the saved row index
// resumes the block without a lost or repeated coefficient.
module tb_i_dct2s;
  import nvl_pkg::*;
  import tb_dct_ref_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic run, halt, load, buf_full, rd_done, dout_valid, idle;
  logic [5:0] raddr;
  logic [11:0] rdata, dout;
  dct2s_state_t state_o, state_i;
  logic [11:0] mem [2][64];
  logic [1:0] full;
  logic rsel = 0;
  int checks = 0, failures = 0;
  int unsigned nout = 0, nfill = 0;
  longint cyc = 0, t0 = -1;

  i_dct2s dut (.clk, .rst, .run, .halt, .buf_full, .ram_raddr(raddr), .ram_rdata(rdata), .rd_done,
               .dout, .dout_valid, .idle, .state_o, .state_i, .load);

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  task automatic fill(input int bsel, input int unsigned b);
    for (int k = 0; k < 8; k++)
      for (int r = 0; r < 8; r++) begin
        real e;
        e = 4.0 * ref_row(b, r, k);
        mem[bsel][k*8 + r] = 12'($rtoi(e >= 0.0 ? e + 0.5 : e - 0.5));
      end
    full[bsel] = 1'b1;
  endtask

  assign buf_full = full[rsel];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    rdata <= mem[rsel][raddr];
    if (rd_done) begin
      full[rsel] <= 1'b0;
      rsel <= ~rsel;
    end
  end

  always @(posedge clk) begin
    if (!rst && dout_valid) begin
      int b, n, e;
      b = nout / 64; n = nout % 64;
      e = ref_coef(b, n % 8, n / 8);
      chk((signed'(dout) - e) <= 2 && (e - signed'(dout)) <= 2,
          $sformatf("blk %0d n %0d got %0d exp %0d", b, n, signed'(dout), e));
      if (nout == 0) t0 = cyc;
      if (nout == 127) chk(cyc - t0 == 127, "128 outputs in 128 cycles");
      nout++;
    end
  end

  // keep the free buffer filled with the next block
  always @(negedge clk) begin
    if (nfill < 6 && !full[nfill % 2]) begin
      fill(nfill % 2, nfill);
      nfill++;
    end
  end

  initial begin
    dct2s_state_t saved;
    int n_after;
    full = 0; run = 1; halt = 0; load = 0; state_i = '0;
    repeat (3) @(negedge clk); rst = 0;
    wait (nout == 2 * 64 + 20);
    @(negedge clk);
    halt = 1;
    n_after = 0;
    repeat (30) begin @(negedge clk); if (dout_valid) n_after++; end
    chk(idle, "idle after halt");
    chk((nout % 8) == 0, "stopped at a row boundary");
    chk(n_after <= 19, "drain length");
    saved = state_o;
    chk(saved.rowi == 3'((nout % 64) / 8), "saved row index");
    rst = 1; @(negedge clk); rst = 0; run = 0; halt = 0;
    state_i = saved; load = 1; @(negedge clk); load = 0; run = 1;
    wait (nout == 6 * 64);
    repeat (20) @(negedge clk);
    chk(nout == 6 * 64, "no extra outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
