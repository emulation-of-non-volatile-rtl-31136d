// tb_nv_mem: writes and reads through the emulated non-volatile memory with
// a model; checks the 5-cycle busy period per access (50 ns at 100 MHz),
// that inputs are latched (changing them during busy has no effect), that
// the contents survive a reset, and that a write cut by a reset is lost.
module tb_nv_mem;
  localparam int D = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic en, we, busy;
  logic [7:0] waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [256];
  int checks = 0, failures = 0;

  nv_mem #(.AW(8), .DW(16), .DELAY_CYCLES(D)) dut (.clk, .rst, .en, .we, .waddr, .wdata, .raddr, .rdata, .busy);

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  task automatic access(input bit w, input logic [7:0] wa, input logic [15:0] wd, input logic [7:0] ra,
                        output logic [15:0] rd);
    int nb;
    en = 1; we = w; waddr = wa; wdata = wd; raddr = ra;
    @(negedge clk);
    en = 0; waddr = ~wa; wdata = ~wd; raddr = ~ra;   // latch must hold the request
    nb = 0;
    while (busy) begin nb++; @(negedge clk); end
    chk(nb == D, $sformatf("busy %0d cycles", nb));
    rd = rdata;
  endtask

  initial begin
    logic [15:0] r;
    for (int i = 0; i < 256; i++) model[i] = '0;
    en = 0; we = 0; waddr = 0; wdata = 0; raddr = 0;
    repeat (3) @(negedge clk); rst = 0;
    for (int t = 0; t < 300; t++) begin
      logic [7:0] wa, ra; logic [15:0] wd; bit w;
      w = $urandom % 2; wa = 8'($urandom % 32); ra = 8'($urandom % 32); wd = 16'($urandom);
      access(w, wa, wd, ra, r);
      chk(r === model[ra], $sformatf("read %h exp %h", r, model[ra]));
      if (w) model[wa] = wd;
      if (t == 150) begin
        rst = 1; repeat (3) @(negedge clk); rst = 0;      // contents must persist
      end
    end
    // a write interrupted by reset is lost
    en = 1; we = 1; waddr = 8'd200; wdata = 16'h1234; raddr = 0;
    @(negedge clk); en = 0; @(negedge clk);
    rst = 1; @(negedge clk); rst = 0;
    access(0, 0, 0, 8'd200, r);
    chk(r === model[200], "torn write lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
