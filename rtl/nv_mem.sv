// nv_mem: emulated non-volatile memory (NV_MEM). It wraps a simple dual-port
// RAM with an input latch and the access-delay block nv_mem_emu.
//
// When en is high and busy is low, the request (write enable, write address,
// write data, read address) is latched at the rising edge; a request may read
// and write at once. busy is then high for DELAY_CYCLES cycles and the
// latched inputs are held. At the last busy edge the write is committed to the
// array and the read word is loaded into rdata, so rdata is valid from the
// cycle busy falls until the next read completes.
// Persistence: rst only clears the latch and the delay timer; the array is
// never cleared, so its contents survive emulated power failures. The paper
// describes the latch + RAM + delay-block structure; committing the write at
// the end of the access (so a reset during the access loses it) is this
// design's choice.
module nv_mem #(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 16,
  parameter int unsigned DELAY_CYCLES = 5
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata,
  output logic          busy
);
  logic          accept, fire;
  logic          l_we;
  logic [AW-1:0] l_waddr, l_raddr;
  logic [DW-1:0] l_wdata;
  logic [DW-1:0] ram_q;

  nv_mem_emu #(.DELAY_CYCLES(DELAY_CYCLES)) u_emu (
    .clk, .rst, .req(en), .accept, .busy, .fire
  );

  // input latch
  always_ff @(posedge clk) begin
    if (rst) begin
      l_we    <= 1'b0;
      l_waddr <= '0;
      l_raddr <= '0;
      l_wdata <= '0;
    end else if (accept) begin
      l_we    <= we;
      l_waddr <= waddr;
      l_raddr <= raddr;
      l_wdata <= wdata;
    end
  end

  // the memory primitive: the read port is addressed with the new request at
  // acceptance and with the latch afterwards, so ram_q holds mem[l_raddr]
  // from the first busy cycle on; it is captured into rdata at fire.
  sdp_ram #(.AW(AW), .DW(DW)) u_ram (
    .clk, .we(fire && l_we), .waddr(l_waddr), .wdata(l_wdata),
    .raddr(accept ? raddr : l_raddr), .rdata(ram_q)
  );

  // rdata: register loaded at fire from the RAM's read port
  logic [DW-1:0] rdata_q;
  always_ff @(posedge clk) begin
    if (rst)       rdata_q <= '0;
    else if (fire) rdata_q <= ram_q;
  end
  assign rdata = rdata_q;

  // an access ends one cycle after fire
  a_fire_ends: assert property (@(posedge clk) disable iff (rst) fire |=> !busy)
    else $error("nv_mem: busy after fire");
endmodule
