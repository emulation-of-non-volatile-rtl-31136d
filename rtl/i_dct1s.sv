// i_dct1s: first (row) stage of the intermittent 2D DCT.
//
// Pixels arrive one per cycle over a valid/ready handshake and are collected
// into an 8-entry row latch. A complete row is moved into the compute
// registers (level-shifted by -128) and, over the next 8 cycles, the 1D DCT
// coefficients k = 0..7 are produced, one per cycle, by dct_da, rounded to
// two fractional bits and written to the current ping-pong buffer at address
// k*8 + row, i.e. transposed. Collecting the next row overlaps with the
// computation, so a row takes 8 cycles. After row 7 of a block, block_cmplt
// pulses for the double-buffer controller. A new block starts only when the
// buffer it will write is not full.
// Intermittent operation: run enables the stage (Running and Pre-Checkpoint);
// halt (Pre-Checkpoint) stops accepting pixels and starting rows, while a row
// already being computed is finished; idle then reports that nothing is in
// flight. state_o exposes the registers a checkpoint must keep (row latch,
// fill count, next row index); load restores them from state_i.
// The paper gives the stage's role and its finish-then-save behaviour; the
// pipeline, widths and handshake are this design's choices.
module i_dct1s
  import nvl_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 run,
  input  logic                 halt,
  // pixel input
  input  logic [IP_W-1:0]      din,
  input  logic                 din_valid,
  output logic                 din_ready,
  // double buffer status
  input  logic                 wsel,
  input  logic [1:0]           full,
  output logic                 block_cmplt,
  // RAM write port (into buffer wsel)
  output logic                 ram_we,
  output logic [RAMA_W-1:0]    ram_waddr,
  output logic [RAMD_W-1:0]    ram_wdata,
  // checkpoint
  output logic                 idle,
  output dct1s_state_t         state_o,
  input  dct1s_state_t         state_i,
  input  logic                 load
);
  localparam int unsigned XW = IP_W + 1;        // level-shifted pixel
  localparam int unsigned SH = COEF_FRAC - 2;   // keep 2 fractional bits

  logic [N-1:0][IP_W-1:0]   rowl;
  logic [3:0]               col;
  logic [2:0]               nrow;   // next row to start
  logic [2:0]               crow;   // row being computed
  logic [2:0]               k;
  logic                     cbusy;
  logic signed [N-1:0][XW-1:0] cx;
  logic signed [XW+ROMD_W+1:0] acc;
  logic                     last_wr, tgt_buf, xfer, accept;

  dct_da #(.W(XW)) u_da (.x(cx), .k(k), .acc(acc));

  assign last_wr  = cbusy && (k == 3'd7);
  // buffer the next row goes to: the other one if this cycle ends a block
  assign tgt_buf  = (last_wr && crow == 3'd7) ? ~wsel : wsel;
  assign xfer     = run && !halt && (col == 4'd8) && (!cbusy || last_wr)
                    && !(nrow == 3'd0 && full[tgt_buf]);
  assign din_ready = run && !halt && ((col < 4'd8) || xfer);
  assign accept   = din_valid && din_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      rowl  <= '0;
      col   <= '0;
      nrow  <= '0;
      crow  <= '0;
      k     <= '0;
      cbusy <= 1'b0;
      cx    <= '0;
    end else if (load) begin
      rowl  <= state_i.row;
      col   <= state_i.col;
      nrow  <= state_i.rowi;
      cbusy <= 1'b0;
      k     <= '0;
    end else if (run) begin
      if (cbusy) begin
        k <= k + 1'b1;
        if (k == 3'd7) cbusy <= 1'b0;
      end
      if (xfer) begin
        for (int j = 0; j < N; j++) cx[j] <= XW'(rowl[j]) - XW'(128);
        crow  <= nrow;
        nrow  <= nrow + 1'b1;
        cbusy <= 1'b1;
        k     <= '0;
      end
      if (accept) begin
        if (xfer) begin
          rowl[0] <= din;
          col     <= 4'd1;
        end else begin
          rowl[col[2:0]] <= din;
          col            <= col + 1'b1;
        end
      end else if (xfer) begin
        col <= '0;
      end
    end
  end

  logic signed [XW+ROMD_W+1:0] rnd;   // acc rounded to 2 fraction bits
  assign rnd       = acc + (1 <<< (SH - 1));
  assign ram_we    = run && cbusy;
  assign ram_waddr = {k, crow};
  assign ram_wdata = rnd[SH +: RAMD_W];
  assign block_cmplt = run && last_wr && (crow == 3'd7);
  assign idle      = !cbusy;
  assign state_o   = '{row: rowl, col: col, rowi: nrow};

  a_col_range: assert property (@(posedge clk) disable iff (rst) col <= 4'd8)
    else $error("i_dct1s: row fill count out of range");
endmodule
