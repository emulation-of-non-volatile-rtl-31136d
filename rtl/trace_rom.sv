// trace_rom: read-only memory holding the voltage trace replayed by the
// intermittency emulator (TRACE_ROM). One word per sample, in millivolts.
//
// The trace models a storage capacitor in three zones: N_FLAT samples at the
// nominal voltage, N_DIS samples of exponential discharge, then exponential
// recharge towards the nominal voltage for the rest of the ROM. The contents
// are computed when the ROM is built, by integer recurrences:
//   discharge: v[n+1] = v[n] - v[n] / (DIS_DIV * RC)
//   recharge:  v[n+1] = v[n] + (V_NOM - v[n]) / CHG_DIV
// A larger RC gives a slower discharge, as in the paper's RC sweep. The
// three-zone shape follows the paper; the sample counts, rates and the
// millivolt encoding are this design's choices.
// Read: addr at a rising edge, data valid after it (one cycle latency).
module trace_rom #(
  parameter int unsigned AW      = 8,
  parameter int unsigned DW      = 12,
  parameter int unsigned V_NOM   = 3300,
  parameter int unsigned RC      = 1,
  parameter int unsigned N_FLAT  = 32,
  parameter int unsigned N_DIS   = 32,
  parameter int unsigned DIS_DIV = 8,
  parameter int unsigned CHG_DIV = 32
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data
);
  logic [DW-1:0] rom [2**AW];

  initial begin
    int unsigned v;
    v = V_NOM;
    for (int unsigned i = 0; i < 2**AW; i++) begin
      rom[i] = DW'(v);
      if (i + 1 < N_FLAT)              v = V_NOM;
      else if (i + 1 < N_FLAT + N_DIS) v = v - v / (DIS_DIV * RC);
      else                             v = v + (V_NOM - v) / CHG_DIV;
    end
  end

  always_ff @(posedge clk) data <= rom[addr];
endmodule
