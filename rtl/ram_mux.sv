// ram_mux: port multiplexers of the two DCT buffers (RAM_MUX).
//
// While the core computes (sys_status Running or Pre-Checkpoint) the write
// port of buffer wsel belongs to the first stage and the read ports to the
// second stage (data taken from buffer rsel). During Push-Checkpoint the read
// ports belong to the checkpoint transfer block, during Pull-Checkpoint the
// write ports do; its 7-bit address carries the buffer in bit 6. In every
// other state no port is driven, so accesses never overlap. Read data
// returns one cycle after the address, so the buffer choice for the returned
// word is registered (rd_sel_q). The control inputs (sys_status and the
// double-buffer selects) follow the paper; the rest is this design's choice.
module ram_mux
  import nvl_pkg::*;
(
  input  logic                  clk,
  input  sys_status_t           status,
  input  logic                  wsel,
  input  logic                  rsel,
  // first stage write
  input  logic                  s1_we,
  input  logic [RAMA_W-1:0]     s1_waddr,
  input  logic [RAMD_W-1:0]     s1_wdata,
  // second stage read
  input  logic [RAMA_W-1:0]     s2_raddr,
  output logic [RAMD_W-1:0]     s2_rdata,
  // checkpoint transfer (RAM_PB)
  input  logic                  pb_we,
  input  logic [RAMA_W:0]       pb_waddr,
  input  logic [RAMD_W-1:0]     pb_wdata,
  input  logic [RAMA_W:0]       pb_raddr,
  output logic [RAMD_W-1:0]     pb_rdata,
  // the two RAMs
  output logic [1:0]                 ram_we,
  output logic [1:0][RAMA_W-1:0]     ram_waddr,
  output logic [1:0][RAMD_W-1:0]     ram_wdata,
  output logic [1:0][RAMA_W-1:0]     ram_raddr,
  input  logic [1:0][RAMD_W-1:0]     ram_rdata
);
  logic compute, rd_sel_q;
  assign compute = (status == ST_RUNNING) || (status == ST_PRECKPT);

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      ram_we[i]    = 1'b0;
      ram_waddr[i] = '0;
      ram_wdata[i] = '0;
      ram_raddr[i] = '0;
      if (compute) begin
        ram_we[i]    = s1_we && (wsel == i[0]);
        ram_waddr[i] = s1_waddr;
        ram_wdata[i] = s1_wdata;
        ram_raddr[i] = s2_raddr;
      end else if (status == ST_PULL) begin
        ram_we[i]    = pb_we && (pb_waddr[RAMA_W] == i[0]);
        ram_waddr[i] = pb_waddr[RAMA_W-1:0];
        ram_wdata[i] = pb_wdata;
      end else if (status == ST_PUSH) begin
        ram_raddr[i] = pb_raddr[RAMA_W-1:0];
      end
    end
  end

  always_ff @(posedge clk)
    rd_sel_q <= (status == ST_PUSH) ? pb_raddr[RAMA_W] : rsel;

  assign s2_rdata = ram_rdata[rd_sel_q];
  assign pb_rdata = ram_rdata[rd_sel_q];
endmodule
