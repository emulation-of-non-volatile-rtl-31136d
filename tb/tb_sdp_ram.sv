// tb_sdp_ram: random writes and reads against an array model; checks the
// one-cycle registered read and read-before-write on an address collision.
module tb_sdp_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [5:0] waddr, raddr;
  logic [11:0] wdata, rdata;
  logic [11:0] model [64];
  logic [11:0] exp_q;
  int checks = 0, failures = 0;

  sdp_ram #(.AW(6), .DW(12)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    for (int i = 0; i < 64; i++) model[i] = '0;
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (t > 0) begin
        checks++;
        if (rdata !== exp_q) begin
          failures++; if (failures < 5) $display("t %0d got %h exp %h", t, rdata, exp_q);
        end
      end
      we    = $urandom % 2;
      waddr = 6'($urandom);
      raddr = (t % 7 == 0) ? waddr : 6'($urandom);
      wdata = 12'($urandom);
      exp_q = model[raddr];               // read-before-write
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
