// int_emu: intermittency emulator (INT_EMU). It produces the emulated
// power-failure reset (reset_emu) and energy-level flags for the design
// under test.
//
// Trace mode (mode = 0): a prescaler divides the clock; on every prescaler
// tick the trace ROM address advances (wrapping at the end of the ROM), so a
// new voltage sample is read every presc+1 cycles. The current sample is
// compared with NUM_THR run-time thresholds; below[i] is high while the
// voltage is lower than thr[i]. A multiplexer picks the comparator selected by
// rst_sel as reset_emu; the other comparators serve as energy-level monitors
// (e.g. a hazard flag for the backup policy).
// Random mode (mode = 1): a 16-bit LFSR stepped on each tick starts a power
// failure when its low byte is below rnd_rate; the failure lasts rnd_len
// ticks. The comparators keep following the trace.
// Timing: ROM read, sample register and comparator register give a latency
// of three cycles from an address change to below/reset_emu.
// The prescaler, comparators and reset multiplexer follow the paper; the
// LFSR-based random trigger and all widths are this design's choices.
module int_emu
  import nvl_pkg::*;
#(
  parameter int unsigned NUM_THR = 2,
  parameter int unsigned ROM_AW  = 8,
  parameter int unsigned PRE_W   = 16
) (
  input  logic                       clk,
  input  logic                       rst,        // emulator reset (not emulated)
  input  logic                       mode,       // 0 = trace, 1 = random
  input  logic [PRE_W-1:0]           presc,      // cycles per sample - 1
  input  logic [NUM_THR-1:0][VOLT_W-1:0] thr,    // thresholds in mV
  input  logic [$clog2(NUM_THR)-1:0] rst_sel,    // comparator used as reset
  input  logic [7:0]                 rnd_rate,   // random failure probability /256
  input  logic [7:0]                 rnd_len,    // random failure length in ticks
  output logic [ROM_AW-1:0]          rom_addr,
  input  logic [VOLT_W-1:0]          rom_data,
  output logic [VOLT_W-1:0]          voltage,    // current sample
  output logic [NUM_THR-1:0]         below,      // comparator outputs
  output logic                       reset_emu
);
  logic [PRE_W-1:0] pcnt;
  logic             tick;
  logic [15:0]      lfsr;
  logic [7:0]       rcnt;   // remaining ticks of a random failure
  logic             rnd_fail;

  assign tick = (pcnt == presc);

  always_ff @(posedge clk) begin
    if (rst) begin
      pcnt     <= '0;
      rom_addr <= '0;
      lfsr     <= 16'hACE1;
      rcnt     <= '0;
    end else begin
      pcnt <= tick ? '0 : pcnt + 1'b1;
      if (tick) begin
        rom_addr <= rom_addr + 1'b1;
        lfsr     <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
        if (rcnt != '0)                        rcnt <= rcnt - 1'b1;
        else if (mode && lfsr[7:0] < rnd_rate) rcnt <= rnd_len;
      end
    end
  end
  assign rnd_fail = (rcnt != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      voltage   <= '0;
      below     <= '0;
      reset_emu <= 1'b1;
    end else begin
      voltage <= rom_data;
      for (int i = 0; i < NUM_THR; i++) below[i] <= (voltage < thr[i]);
      reset_emu <= mode ? rnd_fail : (voltage < thr[rst_sel]);
    end
  end
endmodule
