// sdp_ram: simple dual-port RAM, one write port and one read port, both
// synchronous to clk. Used for the two ping-pong buffers (RAM1, RAM2) of the
// DCT core and as the storage array of the emulated non-volatile memory.
//
// Write: when we is high at a rising edge, mem[waddr] <= wdata.
// Read: rdata is registered; it shows mem[raddr] one cycle after raddr
// (read-before-write when both ports hit the same word).
// The array has no reset, like an FPGA block RAM; the initial block models the
// all-zero contents of a freshly configured FPGA.
module sdp_ram #(
  parameter int unsigned AW = 6,
  parameter int unsigned DW = 12
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
