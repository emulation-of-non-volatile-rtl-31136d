// tb_ram_mux: random port traffic in every system state; checks that the
// write port of buffer wsel (and only it) carries the first stage while the
// core computes, that the transfer block owns the write ports in
// Pull-Checkpoint and the read ports in Push-Checkpoint, that nothing writes
// in the other states, and that returned read data comes from the buffer
// selected one cycle earlier.
module tb_ram_mux;
  import nvl_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  sys_status_t status;
  logic wsel, rsel, s1_we, pb_we;
  logic [5:0] s1_waddr, s2_raddr;
  logic [6:0] pb_waddr, pb_raddr;
  logic [11:0] s1_wdata, pb_wdata, s2_rdata, pb_rdata;
  logic [1:0] ram_we;
  logic [1:0][5:0] ram_waddr, ram_raddr;
  logic [1:0][11:0] ram_wdata, ram_rdata;
  int checks = 0, failures = 0;

  ram_mux dut (.clk, .status, .wsel, .rsel, .s1_we, .s1_waddr, .s1_wdata, .s2_raddr, .s2_rdata,
               .pb_we, .pb_waddr, .pb_wdata, .pb_raddr, .pb_rdata,
               .ram_we, .ram_waddr, .ram_wdata, .ram_raddr, .ram_rdata);

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    int exp_sel;
    exp_sel = -1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      ram_rdata[0] = 12'($urandom); ram_rdata[1] = 12'($urandom);
      #1;
      if (exp_sel >= 0) begin
        chk(s2_rdata == ram_rdata[exp_sel], "s2 read data buffer");
        chk(pb_rdata == ram_rdata[exp_sel], "pb read data buffer");
      end
      status = sys_status_t'($urandom % 6);
      wsel = 1'($urandom); rsel = 1'($urandom);
      s1_we = 1'($urandom); pb_we = 1'($urandom);
      s1_waddr = 6'($urandom); s2_raddr = 6'($urandom);
      pb_waddr = 7'($urandom); pb_raddr = 7'($urandom);
      s1_wdata = 12'($urandom); pb_wdata = 12'($urandom);
      #1;
      for (int i = 0; i < 2; i++) begin
        if (status == ST_RUNNING || status == ST_PRECKPT) begin
          chk(ram_we[i] == (s1_we && wsel == i), "s1 write enable");
          if (ram_we[i]) chk(ram_waddr[i] == s1_waddr && ram_wdata[i] == s1_wdata, "s1 write");
          chk(ram_raddr[i] == s2_raddr, "s2 read addr");
        end else if (status == ST_PULL) begin
          chk(ram_we[i] == (pb_we && pb_waddr[6] == i), "pb write enable");
          if (ram_we[i]) chk(ram_waddr[i] == pb_waddr[5:0] && ram_wdata[i] == pb_wdata, "pb write");
        end else if (status == ST_PUSH) begin
          chk(ram_we[i] == 0, "no write in push");
          chk(ram_raddr[i] == pb_raddr[5:0], "pb read addr");
        end else begin
          chk(ram_we[i] == 0, "no write when idle");
        end
      end
      exp_sel = (status == ST_PUSH) ? int'(pb_raddr[6]) : int'(rsel);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
