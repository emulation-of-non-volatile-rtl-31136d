// i_dbufctl: double-buffer (ping-pong) controller of the two DCT RAMs.
//
// wsel names the buffer the first stage writes, rsel the one the second stage
// reads, full[i] that buffer i holds a complete block. When the first stage
// completes a block (block_cmplt) that buffer becomes full and wsel switches;
// when the second stage issues the last read of a block (rd_done) the buffer
// is released and rsel switches. So the first stage fills one RAM while the
// second stage reads the other. All updates happen at the rising edge while
// run is high. The three registers are part of the checkpoint (state_o,
// restored by load). The paper gives the role and the block_cmplt event; the
// full flags are this design's choice.
module i_dbufctl
  import nvl_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        run,
  input  logic        block_cmplt,
  input  logic        rd_done,
  output logic        wsel,
  output logic        rsel,
  output logic [1:0]  full,
  output dbuf_state_t state_o,
  input  dbuf_state_t state_i,
  input  logic        load
);
  always_ff @(posedge clk) begin
    if (rst) begin
      wsel <= 1'b0;
      rsel <= 1'b0;
      full <= '0;
    end else if (load) begin
      wsel <= state_i.wsel;
      rsel <= state_i.rsel;
      full <= state_i.full;
    end else if (run) begin
      if (block_cmplt) begin
        full[wsel] <= 1'b1;
        wsel       <= ~wsel;
      end
      if (rd_done) begin
        full[rsel] <= 1'b0;
        rsel       <= ~rsel;
      end
    end
  end

  assign state_o = '{wsel: wsel, rsel: rsel, full: full};

  a_write_free: assert property (@(posedge clk) disable iff (rst)
    (run && block_cmplt) |-> !full[wsel]) else $error("i_dbufctl: wrote a full buffer");
  a_read_full: assert property (@(posedge clk) disable iff (rst)
    (run && rd_done) |-> full[rsel]) else $error("i_dbufctl: read an empty buffer");
endmodule
