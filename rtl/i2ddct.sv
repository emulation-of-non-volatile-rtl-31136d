// i2ddct: intermittent 8x8 two-dimensional DCT core (i-2DDCT).
//
// Datapath: pixels (8-bit, row-major, one per cycle over din_valid/din_ready)
// enter the row stage i_dct1s, whose 1D results are written transposed into
// one of two 64-word buffers (RAM1, RAM2); the column stage i_dct2s reads the
// other buffer and emits the 2D coefficients (12-bit signed, one per cycle on
// dout/dout_valid) in column order: coefficient Y[l][k] is output number
// k*8 + l of its block. i_dbufctl switches the buffers (ping-pong), ram_mux
// routes the RAM ports. A block takes 64 cycles at full rate; the first
// coefficient is valid 85 cycles after the edge that accepts the first pixel,
// the latency of the published core.
// Intermittency: i2ddct_ctrl runs the system FSM (sys_status). When
// energy_low rises while running, the stages finish their work in flight, and
// the state registers plus both buffers are pushed to the external
// non-volatile memory (nv_* ports) with the help of ram_pb; the core then
// halts until energy_low falls. rst is the power of the core: after it the
// controller pulls the last valid checkpoint, re-initialises the registers
// from it and resumes where the checkpoint left off, so no pixel is lost and
// no coefficient is produced twice.
// The block structure follows the paper's figure of the core; the internal
// protocols are this design's choices (see the submodules).
module i2ddct
  import nvl_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic [IP_W-1:0]    din,
  input  logic               din_valid,
  output logic               din_ready,
  output logic [OP_W-1:0]    dout,
  output logic               dout_valid,
  input  logic               energy_low,
  output sys_status_t        sys_status,
  // non-volatile memory
  output logic               nv_en,
  output logic               nv_we,
  output logic [NVA_W-1:0]   nv_waddr,
  output logic [NVD_W-1:0]   nv_wdata,
  output logic [NVA_W-1:0]   nv_raddr,
  input  logic [NVD_W-1:0]   nv_rdata,
  input  logic               nv_busy
);
  logic run, halt, load;
  logic s1_idle, s2_idle;
  ckpt_state_t st_live, st_rest;
  logic wsel, rsel;
  logic [1:0] full;
  logic block_cmplt, rd_done;
  logic s1_we;
  logic [RAMA_W-1:0] s1_waddr, s2_raddr;
  logic [RAMD_W-1:0] s1_wdata, s2_rdata;
  logic pb_we, pb_start_push, pb_start_pull, pb_tx_valid, pb_tx_ready, pb_rx_valid, pb_done;
  logic [RAMA_W:0] pb_waddr, pb_raddr;
  logic [RAMD_W-1:0] pb_wdata, pb_rdata, pb_tx_data, pb_rx_data;
  logic [1:0] ram_we;
  logic [1:0][RAMA_W-1:0] ram_waddr, ram_raddr;
  logic [1:0][RAMD_W-1:0] ram_wdata, ram_rdata;

  assign run  = (sys_status == ST_RUNNING) || (sys_status == ST_PRECKPT);
  assign halt = (sys_status == ST_PRECKPT);

  i2ddct_ctrl u_ctrl (
    .clk, .rst, .energy_low, .status(sys_status),
    .s1_idle, .s2_idle, .state_in(st_live), .state_out(st_rest), .load,
    .pb_start_push, .pb_start_pull, .pb_tx_valid, .pb_tx_data, .pb_tx_ready,
    .pb_rx_valid, .pb_rx_data,
    .nv_en, .nv_we, .nv_waddr, .nv_wdata, .nv_raddr, .nv_rdata, .nv_busy
  );

  i_dct1s u_dct1s (
    .clk, .rst, .run, .halt, .din, .din_valid, .din_ready,
    .wsel, .full, .block_cmplt,
    .ram_we(s1_we), .ram_waddr(s1_waddr), .ram_wdata(s1_wdata),
    .idle(s1_idle), .state_o(st_live.s1), .state_i(st_rest.s1), .load
  );

  i_dct2s u_dct2s (
    .clk, .rst, .run, .halt, .buf_full(full[rsel]),
    .ram_raddr(s2_raddr), .ram_rdata(s2_rdata), .rd_done,
    .dout, .dout_valid,
    .idle(s2_idle), .state_o(st_live.s2), .state_i(st_rest.s2), .load
  );

  i_dbufctl u_dbufctl (
    .clk, .rst, .run, .block_cmplt, .rd_done, .wsel, .rsel, .full,
    .state_o(st_live.db), .state_i(st_rest.db), .load
  );

  ram_pb u_ram_pb (
    .clk, .rst, .start_push(pb_start_push), .start_pull(pb_start_pull),
    .ram_we(pb_we), .ram_waddr(pb_waddr), .ram_wdata(pb_wdata),
    .ram_raddr(pb_raddr), .ram_rdata(pb_rdata),
    .tx_valid(pb_tx_valid), .tx_data(pb_tx_data), .tx_ready(pb_tx_ready),
    .rx_valid(pb_rx_valid), .rx_data(pb_rx_data), .done(pb_done)
  );

  ram_mux u_ram_mux (
    .clk, .status(sys_status), .wsel, .rsel,
    .s1_we, .s1_waddr, .s1_wdata, .s2_raddr, .s2_rdata,
    .pb_we, .pb_waddr, .pb_wdata, .pb_raddr, .pb_rdata,
    .ram_we, .ram_waddr, .ram_wdata, .ram_raddr, .ram_rdata
  );

  for (genvar i = 0; i < 2; i++) begin : g_ram
    sdp_ram #(.AW(RAMA_W), .DW(RAMD_W)) u_ram (
      .clk, .we(ram_we[i]), .waddr(ram_waddr[i]), .wdata(ram_wdata[i]),
      .raddr(ram_raddr[i]), .rdata(ram_rdata[i])
    );
  end

  // the buffer transfer ends exactly when the controller has moved 128 words
  a_pb_done: assert property (@(posedge clk) disable iff (rst)
    pb_done |-> (sys_status == ST_PUSH || sys_status == ST_INIT))
    else $error("i2ddct: buffer transfer ended outside a checkpoint transfer");
endmodule
