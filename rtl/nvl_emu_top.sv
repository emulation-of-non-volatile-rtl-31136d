// nvl_emu_top: emulation system for the intermittent 2D DCT. It joins the
// design under test (i2ddct) with the two emulation blocks: the emulated
// non-volatile memory (nv_mem) holding the checkpoints, and the
// intermittency emulator (int_emu) replaying a capacitor voltage trace from
// trace_rom.
// Comparator 0 of int_emu (threshold thr[0], the reset threshold) drives the
// emulated power failure reset_emu when rst_sel = 0; comparator haz_sel
// (thr[1], the hazard threshold) drives the core's energy_low input. The
// core and the control logic of nv_mem are reset by rst or reset_emu; the
// contents of nv_mem, int_emu and trace_rom only by nothing or rst, since
// they stand for non-volatile storage and for the emulation harness.
// Defaults: 100 MHz clock assumed, 50 ns (5-cycle) NV access, two comparators.
// The wiring follows the paper's figure of the core with its emulation
// blocks; the configuration ports are this design's choice.
module nvl_emu_top
  import nvl_pkg::*;
#(
  parameter int unsigned NUM_THR  = 2,
  parameter int unsigned NV_DELAY = 5,     // 50 ns at 100 MHz
  parameter int unsigned TRACE_AW = 8,
  parameter int unsigned TRACE_RC = 1
) (
  input  logic                          clk,
  input  logic                          rst,
  // pixel stream in, coefficient stream out
  input  logic [IP_W-1:0]               din,
  input  logic                          din_valid,
  output logic                          din_ready,
  output logic [OP_W-1:0]               dout,
  output logic                          dout_valid,
  // intermittency emulator configuration
  input  logic                          mode,
  input  logic [15:0]                   presc,
  input  logic [NUM_THR-1:0][VOLT_W-1:0] thr,
  input  logic [$clog2(NUM_THR)-1:0]    rst_sel,
  input  logic [$clog2(NUM_THR)-1:0]    haz_sel,
  input  logic [7:0]                    rnd_rate,
  input  logic [7:0]                    rnd_len,
  // observation
  output logic [VOLT_W-1:0]             voltage,
  output logic [NUM_THR-1:0]            below,
  output logic                          reset_emu,
  output sys_status_t                   sys_status
);
  logic [TRACE_AW-1:0] rom_addr;
  logic [VOLT_W-1:0]   rom_data;
  logic                core_rst;
  logic                nv_en, nv_we, nv_busy;
  logic [NVA_W-1:0]    nv_waddr, nv_raddr;
  logic [NVD_W-1:0]    nv_wdata, nv_rdata;

  trace_rom #(.AW(TRACE_AW), .DW(VOLT_W), .RC(TRACE_RC)) u_trace_rom (
    .clk, .addr(rom_addr), .data(rom_data)
  );

  int_emu #(.NUM_THR(NUM_THR), .ROM_AW(TRACE_AW)) u_int_emu (
    .clk, .rst, .mode, .presc, .thr, .rst_sel, .rnd_rate, .rnd_len,
    .rom_addr, .rom_data, .voltage, .below, .reset_emu
  );

  assign core_rst = rst || reset_emu;

  nv_mem #(.AW(NVA_W), .DW(NVD_W), .DELAY_CYCLES(NV_DELAY)) u_nv_mem (
    .clk, .rst(core_rst), .en(nv_en), .we(nv_we), .waddr(nv_waddr),
    .wdata(nv_wdata), .raddr(nv_raddr), .rdata(nv_rdata), .busy(nv_busy)
  );

  i2ddct u_core (
    .clk, .rst(core_rst), .din, .din_valid, .din_ready, .dout, .dout_valid,
    .energy_low(below[haz_sel]), .sys_status,
    .nv_en, .nv_we, .nv_waddr, .nv_wdata, .nv_raddr, .nv_rdata, .nv_busy
  );
endmodule
