// tb_nvl_emu_top: end-to-end testbench of the emulation system at its
// default parameters. The intermittency emulator replays the capacitor
// trace (new sample every 256 cycles, reset threshold 1.5 V, hazard threshold
// 2.8 V) for two trace periods while a pixel source with random gaps streams
// test blocks into the core. Every output coefficient is compared with a
// real-arithmetic DCT (tolerance +-2); at the end every block must have been
// output exactly once. At each emulated power failure both volatile buffers
// are overwritten with garbage, so the result can only be right if the
// checkpoint restores them. The testbench counts, and requires at least once:
// emulated power failures, cold start, hazard halts (Pre-Checkpoint),
// checkpoint pushes, checkpoint pulls with restore, resumes after a halt,
// input back-pressure and NV_MEM busy (access delay) cycles.
module tb_nvl_emu_top;
  import nvl_pkg::*;
  import tb_dct_ref_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [IP_W-1:0] din;
  logic din_valid, din_ready;
  logic [OP_W-1:0] dout;
  logic dout_valid;
  logic [1:0][VOLT_W-1:0] thr;
  logic [VOLT_W-1:0] voltage;
  logic [1:0] below;
  logic reset_emu;
  sys_status_t sys_status, st_q;

  localparam int unsigned TOTAL_BLOCKS = 1000;
  localparam longint      RUN_CYCLES   = 2 * 256 * 256;   // two trace periods

  int checks = 0, failures = 0;
  int unsigned npix = 0, nout = 0;
  longint cyc = 0;
  int n_fail = 0, n_cold = 0, n_pre = 0, n_push = 0, n_restore = 0, n_resume = 0;
  int n_bp = 0, n_busy = 0;
  logic reset_emu_q = 1'b1;

  assign thr[0] = 12'd1500;
  assign thr[1] = 12'd2800;

  nvl_emu_top dut (
    .clk, .rst, .din, .din_valid, .din_ready, .dout, .dout_valid,
    .mode(1'b0), .presc(16'd255), .thr, .rst_sel(1'b0), .haz_sel(1'b1),
    .rnd_rate(8'd0), .rnd_len(8'd0),
    .voltage, .below, .reset_emu, .sys_status);

  always @(posedge clk) cyc <= cyc + 1;

  // ---- pixel source: valid 3 cycles out of 4 on average ----
  assign din = pix(npix / 64, npix % 64);
  always @(posedge clk) begin
    if (rst) din_valid <= 1'b0;
    else begin
      if (din_valid && !din_ready) n_bp++;
      if (din_valid && din_ready) npix = npix + 1;
      if (!(din_valid && !din_ready))
        din_valid <= (npix < TOTAL_BLOCKS * 64) && ($urandom % 4 != 0);
    end
  end

  // ---- checker ----
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
      nout++;
    end
  end

  // ---- mechanism counters ----
  always @(posedge clk) begin
    reset_emu_q <= reset_emu;
    st_q <= sys_status;
    if (!rst) begin
      if (reset_emu && !reset_emu_q) begin
        n_fail++;
        for (int i = 0; i < 64; i++) begin
          dut.u_core.g_ram[0].u_ram.mem[i] = 12'($urandom);
          dut.u_core.g_ram[1].u_ram.mem[i] = 12'($urandom);
        end
      end
      if (!reset_emu && st_q == ST_PULL && sys_status == ST_HALTED) n_cold++;
      if (st_q == ST_RUNNING && sys_status == ST_PRECKPT) n_pre++;
      if (st_q == ST_PUSH && sys_status == ST_HALTED && !reset_emu) n_push++;
      if (st_q == ST_INIT) n_restore++;
      if (st_q == ST_HALTED && sys_status == ST_RUNNING) n_resume++;
      if (dut.u_nv_mem.busy) n_busy++;
    end
  end

  task automatic need(input string what, input int n);
    checks++;
    if (n < 1) begin
      failures++; $display("mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (5) @(negedge clk);
    rst = 0;
    while (cyc < RUN_CYCLES && nout < TOTAL_BLOCKS * 64) @(negedge clk);
    $display("cycles %0d pixels %0d outputs %0d failures(power) %0d cold %0d pre %0d push %0d restore %0d resume %0d backpressure %0d nvbusy %0d",
             cyc, npix, nout, n_fail, n_cold, n_pre, n_push, n_restore, n_resume, n_bp, n_busy);
    checks++;
    if (nout < 64 * 100) begin
      failures++; $display("too little progress: %0d outputs", nout);
    end
    need("power failure", n_fail);
    need("cold start", n_cold);
    need("pre-checkpoint", n_pre);
    need("push-checkpoint", n_push);
    need("pull/init-checkpoint", n_restore);
    need("resume", n_resume);
    need("input back-pressure", n_bp);
    need("NV_MEM busy", n_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (RUN_CYCLES + 20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
