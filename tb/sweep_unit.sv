// sweep_unit: one column of the hazard-threshold sweep. It runs the
// emulation system (trace RC = RC) once per hazard threshold from 2.70 V down
// to 1.90 V in 10 mV steps, with the reset threshold at 1.5 V. Each run
// starts from an erased checkpoint, replays one trace period (256 samples,
// one every 256 cycles) while a pixel source streams test blocks, and
// counts the output coefficients that differ from the real-arithmetic DCT by
// more than 2 (an output stream that restarts after a lost checkpoint is
// counted as errors, as the expected block index keeps running).
// errors[i] holds the count of run i (threshold 2700 - 10*i mV).
module sweep_unit
  import nvl_pkg::*;
  import tb_dct_ref_pkg::*;
#(
  parameter int unsigned RC = 1
) (
  input  logic clk,
  output logic done,
  output int   errors [81],
  output int   outputs [81]
);
  logic rst;
  logic [IP_W-1:0] din;
  logic din_valid, din_ready;
  logic [OP_W-1:0] dout;
  logic dout_valid;
  logic [1:0][VOLT_W-1:0] thr;
  logic [VOLT_W-1:0] voltage;
  logic [1:0] below;
  logic reset_emu, reset_emu_q;
  sys_status_t sys_status;
  int unsigned npix, nout;
  int run_i;

  nvl_emu_top #(.TRACE_RC(RC)) dut (
    .clk, .rst, .din, .din_valid, .din_ready, .dout, .dout_valid,
    .mode(1'b0), .presc(16'd255), .thr, .rst_sel(1'b0), .haz_sel(1'b1),
    .rnd_rate(8'd0), .rnd_len(8'd0),
    .voltage, .below, .reset_emu, .sys_status);

  assign din = pix(npix / 64, npix % 64);
  always @(posedge clk) begin
    if (rst) din_valid <= 1'b0;
    else begin
      if (din_valid && din_ready) npix = npix + 1;
      if (!(din_valid && !din_ready)) din_valid <= ($urandom % 4 != 0);
    end
  end

  always @(posedge clk) begin
    reset_emu_q <= reset_emu;
    if (!rst && dout_valid) begin
      int e, n;
      n = int'(nout % 64);
      e = ref_coef(nout / 64, n % 8, n / 8);
      if ((signed'(dout) - e) > 2 || (e - signed'(dout)) > 2) errors[run_i]++;
      outputs[run_i]++;
      nout++;
    end
    if (!rst && reset_emu && !reset_emu_q)
      for (int i = 0; i < 64; i++) begin
        dut.u_core.g_ram[0].u_ram.mem[i] = 12'($urandom);
        dut.u_core.g_ram[1].u_ram.mem[i] = 12'($urandom);
      end
  end

  initial begin
    done = 0; rst = 1; run_i = 0;
    thr[0] = 12'd1500;
    for (int i = 0; i < 81; i++) begin errors[i] = 0; outputs[i] = 0; end
    for (int i = 0; i < 81; i++) begin
      rst = 1;
      npix = 0; nout = 0; run_i = i;
      thr[1] = VOLT_W'(2700 - 10 * i);
      dut.u_nv_mem.u_ram.mem[NV_MARK_ADDR] = '0;        // erase the checkpoint
      repeat (4) @(negedge clk);
      rst = 0;
      repeat (256 * 256) @(negedge clk);
    end
    rst = 1;
    done = 1;
  end
endmodule
