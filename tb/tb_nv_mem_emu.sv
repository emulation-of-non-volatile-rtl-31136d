// tb_nv_mem_emu: checks that a request is accepted only while not busy, that
// busy lasts exactly DELAY_CYCLES cycles with fire in the last one, and that
// a reset aborts an access (no fire).
module tb_nv_mem_emu;
  localparam int D = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic req, accept, busy, fire;
  int checks = 0, failures = 0;

  nv_mem_emu #(.DELAY_CYCLES(D)) dut (.clk, .rst, .req, .accept, .busy, .fire);

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    req = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 5; n++) begin
      int nb, nf;
      req = 1;
      #1;
      chk(accept == 1, "accept when idle");
      @(negedge clk);
      req = (n % 2);                       // keep requesting on odd runs
      nb = 0; nf = 0;
      while (busy) begin
        #1 chk(!accept, "no accept while busy");
        if (fire) begin
          nf++;
          chk(nb == D - 1, "fire in last busy cycle");
        end
        nb++;
        @(negedge clk);
      end
      chk(nb == D, $sformatf("busy length %0d", nb));
      chk(nf == 1, "one fire");
      req = 0;
      @(negedge clk);
    end
    // reset aborts
    req = 1; @(negedge clk); req = 0;
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    chk(!busy && !fire, "reset clears busy");
    repeat (D + 2) begin chk(!fire, "no fire after abort"); @(negedge clk); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
