// i_dct2s: second (column) stage of the intermittent 2D DCT.
//
// When the buffer selected for reading holds a complete block (buf_full), the
// stage reads it row by row: row k of the transposed buffer (addresses
// k*8 + 0..7) holds column k of the first-stage results. Reads are issued one
// per cycle; the RAM answers one cycle later. When the eighth word of a row
// arrives, the row is moved into the compute registers and the 8 outputs
// l = 0..7 are produced on the next 8 cycles by dct_da, rounded to integers,
// and leave through a two-register output pipeline (this gives the core the
// published 85-cycle latency).
// Output l of row k is the 2D coefficient Y[l][k], so a block leaves in
// column order. Reading the next row overlaps the computation, so a block
// takes 64 cycles. rd_done pulses with the last read of a block so the
// double-buffer controller can release the buffer.
// Intermittent operation: run enables the stage; halt stops new reads at a
// row boundary while the rows already read are still computed and output;
// idle then reports an empty pipeline. The checkpointed state is the index of
// the next row to read; load restores it.
// The paper gives the stage's role; the pipeline and widths are this
// design's choices.
module i_dct2s
  import nvl_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 run,
  input  logic                 halt,
  input  logic                 buf_full,
  output logic [RAMA_W-1:0]    ram_raddr,
  input  logic [RAMD_W-1:0]    ram_rdata,
  output logic                 rd_done,
  output logic [OP_W-1:0]      dout,
  output logic                 dout_valid,
  output logic                 idle,
  output dct2s_state_t         state_o,
  input  dct2s_state_t         state_i,
  input  logic                 load
);
  localparam int unsigned SH = COEF_FRAC + 2;   // drop 2 input fraction bits

  logic [5:0]                  rd_cnt;
  logic                        issue, rv_q;
  logic [2:0]                  ri_q;
  logic [N-2:0][RAMD_W-1:0]    g;
  logic signed [N-1:0][RAMD_W-1:0] cx;
  logic [2:0]                  k;
  logic                        cbusy;
  logic signed [RAMD_W+ROMD_W+1:0] acc, rnd;
  logic [1:0][OP_W-1:0]        opipe;        // output pipeline, stage 0 first
  logic [1:0]                  opipe_v;

  dct_da #(.W(RAMD_W)) u_da (.x(cx), .k(k), .acc(acc));

  assign issue     = run && buf_full && !(halt && rd_cnt[2:0] == 3'd0);
  assign ram_raddr = rd_cnt;
  assign rd_done   = issue && (rd_cnt == 6'd63);
  assign rnd       = acc + (1 <<< (SH - 1));     // rounded; bits SH.. are the result

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_cnt     <= '0;
      rv_q       <= 1'b0;
      ri_q       <= '0;
      g          <= '0;
      cx         <= '0;
      k          <= '0;
      cbusy      <= 1'b0;
      opipe      <= '0;
      opipe_v    <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else if (load) begin
      rd_cnt     <= {state_i.rowi, 3'd0};
      rv_q       <= 1'b0;
      cbusy      <= 1'b0;
      opipe_v    <= '0;
      dout_valid <= 1'b0;
    end else if (run) begin
      if (issue) rd_cnt <= rd_cnt + 1'b1;
      rv_q <= issue;
      ri_q <= rd_cnt[2:0];
      opipe_v    <= {opipe_v[0], cbusy};
      opipe[1]   <= opipe[0];
      dout_valid <= opipe_v[1];
      dout       <= opipe[1];
      if (cbusy) begin
        opipe[0] <= rnd[SH +: OP_W];
        k    <= k + 1'b1;
        if (k == 3'd7) cbusy <= 1'b0;
      end
      if (rv_q) begin
        if (ri_q == 3'd7) begin
          cx    <= {ram_rdata, g[6], g[5], g[4], g[3], g[2], g[1], g[0]};
          cbusy <= 1'b1;
          k     <= '0;
        end else begin
          g[ri_q] <= ram_rdata;
        end
      end
    end else begin
      dout_valid <= 1'b0;
    end
  end

  assign idle    = !rv_q && !cbusy && (opipe_v == '0) && (rd_cnt[2:0] == 3'd0);
  assign state_o = '{rowi: rd_cnt[5:3]};

  // a new row may only enter the compute registers when they are free
  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
    (run && rv_q && ri_q == 3'd7) |-> (!cbusy || k == 3'd7))
    else $error("i_dct2s: compute registers overrun");
endmodule
