// tb_i2ddct: self-checking testbench of the intermittent 2D DCT core, paired
// with the emulated non-volatile memory.
// Phase 1 (continuous power): 3 blocks at full rate; every coefficient is
// compared with a real-arithmetic DCT (tolerance +-2), the latency from the
// first accepted pixel to the first coefficient must be 85 cycles and
// consecutive blocks must leave 64 cycles apart.
// Phase 2 (intermittent): while more blocks stream in, energy_low is raised,
// the core must halt after a checkpoint, the power (rst) is cycled with both
// volatile buffers overwritten by garbage, and after the restore the stream
// must continue with exactly the right coefficients. This is done twice,
// once with input gaps. A watchdog ends the run.
module tb_i2ddct;
  import nvl_pkg::*;
  import tb_dct_ref_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [IP_W-1:0] din;
  logic din_valid, din_ready;
  logic [OP_W-1:0] dout;
  logic dout_valid;
  logic energy_low;
  sys_status_t sys_status;
  logic nv_en, nv_we, nv_busy;
  logic [NVA_W-1:0] nv_waddr, nv_raddr;
  logic [NVD_W-1:0] nv_wdata, nv_rdata;

  int checks = 0, failures = 0;
  int unsigned nblk_in = 0, npix = 0, nout = 0;
  int unsigned total_blocks;
  longint cyc = 0, t_first_in = -1, t_first_out = -1, t_blk1_out = -1;
  bit gaps = 0;
  int n_push = 0, n_restore = 0;

  i2ddct dut (.clk, .rst, .din, .din_valid, .din_ready, .dout, .dout_valid,
              .energy_low, .sys_status,
              .nv_en, .nv_we, .nv_waddr, .nv_wdata, .nv_raddr, .nv_rdata, .nv_busy);

  nv_mem #(.AW(NVA_W), .DW(NVD_W), .DELAY_CYCLES(5)) u_nv (
    .clk, .rst, .en(nv_en), .we(nv_we), .waddr(nv_waddr), .wdata(nv_wdata),
    .raddr(nv_raddr), .rdata(nv_rdata), .busy(nv_busy));

  always @(posedge clk) cyc <= cyc + 1;

  // ---- pixel source ----
  always_comb begin
    din = pix(npix / 64, npix % 64);
  end
  always @(posedge clk) begin
    if (rst) din_valid <= 1'b0;
    else begin
      if (din_valid && din_ready) begin
        if (t_first_in < 0) t_first_in = cyc;
        npix = npix + 1;
      end
      din_valid <= (npix + ((din_valid && din_ready) ? 0 : 0) < total_blocks * 64)
                   && (!gaps || ($urandom % 4 != 0));
    end
  end

  // ---- coefficient checker ----
  always @(posedge clk) begin
    if (!rst && dout_valid) begin
      int b, n, expv;
      b = nout / 64; n = nout % 64;
      expv = ref_coef(b, n % 8, n / 8);
      checks++;
      if ((signed'(dout) - expv) > 2 || (expv - signed'(dout)) > 2) begin
        failures++;
        if (failures < 10) $display("MISMATCH blk %0d n %0d got %0d exp %0d", b, n, signed'(dout), expv);
      end
      if (nout == 0) t_first_out = cyc;
      if (nout == 64) t_blk1_out = cyc;
      nout++;
    end
  end

  always @(posedge clk) if (!rst && sys_status == ST_INIT) n_restore++;

  task automatic scribble_rams();
    for (int i = 0; i < 64; i++) begin
      dut.g_ram[0].u_ram.mem[i] = 12'($urandom);
      dut.g_ram[1].u_ram.mem[i] = 12'($urandom);
    end
  endtask

  task automatic power_cycle(input int at_out);
    wait (nout >= at_out);
    @(negedge clk) energy_low = 1;
    wait (sys_status == ST_PUSH);
    wait (sys_status == ST_HALTED);
    n_push++;
    checks++;
    if (u_nv.u_ram.mem[NV_MARK_ADDR] !== NV_MARK_VALID) begin
      failures++; $display("checkpoint marker not valid");
    end
    repeat (20) @(negedge clk);
    checks++;
    if (dout_valid || din_ready) begin
      failures++; $display("core active while halted");
    end
    rst = 1;
    scribble_rams();
    repeat (10) @(negedge clk);
    rst = 0;
    wait (sys_status == ST_HALTED);
    repeat (5) @(negedge clk);
    energy_low = 0;
  endtask

  initial begin
    energy_low = 0;
    total_blocks = 3;
    repeat (5) @(negedge clk);
    rst = 0;
    wait (nout == 3 * 64);
    repeat (10) @(negedge clk);
    checks++;
    if (t_first_out - t_first_in != 85) begin
      failures++; $display("latency %0d, expected 85", t_first_out - t_first_in);
    end
    checks++;
    if (t_blk1_out - t_first_out != 64) begin
      failures++; $display("block spacing %0d, expected 64", t_blk1_out - t_first_out);
    end
    // intermittent part
    total_blocks = 9;
    power_cycle(3 * 64 + 100);
    gaps = 1;
    power_cycle(6 * 64 + 30);
    wait (nout == total_blocks * 64);
    repeat (50) @(negedge clk);
    checks++;
    if (nout != total_blocks * 64 || npix != total_blocks * 64) begin
      failures++; $display("count out %0d pix %0d", nout, npix);
    end
    checks++;
    if (n_push != 2 || n_restore != 2) begin
      failures++; $display("push %0d restore %0d", n_push, n_restore);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: nout=%0d npix=%0d", nout, npix);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
