// nv_mem_emu: access-delay emulation of a fast non-volatile memory (FeRAM,
// ReRAM). A request (req high while busy is low) is accepted at a rising edge;
// busy then stays high for DELAY_CYCLES cycles, the time the emulated memory
// is unavailable. In the last busy cycle, fire pulses for one cycle: the
// memory wrapper performs the latched read/write at that edge, so the result
// is visible when busy falls. A reset aborts a pending access (fire never
// comes), which models a write torn by a power failure.
// DELAY_CYCLES = 5 is a 50 ns access at a 100 MHz clock, the figures of the
// case study; the counter structure is this design's choice.
module nv_mem_emu #(
  parameter int unsigned DELAY_CYCLES = 5
) (
  input  logic clk,
  input  logic rst,      // synchronous, active high
  input  logic req,      // request presented
  output logic accept,   // request accepted this cycle (req && !busy)
  output logic busy,     // access in progress
  output logic fire      // perform the access at this edge (last busy cycle)
);
  localparam int unsigned CW = (DELAY_CYCLES > 1) ? $clog2(DELAY_CYCLES) : 1;
  logic [CW-1:0] cnt;

  assign accept = req && !busy;
  assign fire   = busy && (cnt == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (accept) begin
      busy <= 1'b1;
      cnt  <= CW'(DELAY_CYCLES - 1);
    end else if (busy) begin
      if (cnt == '0) busy <= 1'b0;
      else           cnt  <= cnt - 1'b1;
    end
  end

  initial assert (DELAY_CYCLES >= 1) else $error("DELAY_CYCLES must be >= 1");
endmodule
