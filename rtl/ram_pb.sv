// ram_pb: checkpoint transfer of the DCT buffers (RAM_PB).
//
// It walks the 128 words of the two buffers (index bit 6 = buffer) in order.
// Push (TX, volatile to non-volatile): after start_push it reads word i,
// offers it on tx_data with tx_valid until the controller takes it
// (tx_ready), then moves to the next word. Pull (RX, non-volatile to
// volatile): after start_pull every rx_valid writes rx_data into word i and
// moves on. done pulses when the last word has gone; the controller places
// the words in NV_MEM. The TX/RX lines follow the paper; the handshake is
// this design's choice. The RAM read has one cycle of latency.
module ram_pb
  import nvl_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               start_push,
  input  logic               start_pull,
  // RAM side (through ram_mux)
  output logic               ram_we,
  output logic [RAMA_W:0]    ram_waddr,
  output logic [RAMD_W-1:0]  ram_wdata,
  output logic [RAMA_W:0]    ram_raddr,
  input  logic [RAMD_W-1:0]  ram_rdata,
  // TX line
  output logic               tx_valid,
  output logic [RAMD_W-1:0]  tx_data,
  input  logic               tx_ready,
  // RX line
  input  logic               rx_valid,
  input  logic [RAMD_W-1:0]  rx_data,
  output logic               done
);
  typedef enum logic [2:0] {PB_IDLE, PB_RD, PB_CAP, PB_TX, PB_PULL} pb_state_t;
  pb_state_t    st;
  logic [RAMA_W:0] idx;
  logic         last;

  assign last = (idx == '1);

  always_ff @(posedge clk) begin
    if (rst) begin
      st      <= PB_IDLE;
      idx     <= '0;
      tx_data <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        PB_IDLE: begin
          idx <= '0;
          if (start_push)      st <= PB_RD;
          else if (start_pull) st <= PB_PULL;
        end
        PB_RD:  st <= PB_CAP;                 // address presented
        PB_CAP: begin                          // data returned
          tx_data <= ram_rdata;
          st      <= PB_TX;
        end
        PB_TX: if (tx_ready) begin
          idx <= idx + 1'b1;
          if (last) begin
            st   <= PB_IDLE;
            done <= 1'b1;
          end else st <= PB_RD;
        end
        PB_PULL: if (rx_valid) begin
          idx <= idx + 1'b1;
          if (last) begin
            st   <= PB_IDLE;
            done <= 1'b1;
          end
        end
        default: st <= PB_IDLE;
      endcase
    end
  end

  assign ram_raddr = idx;
  assign ram_waddr = idx;
  assign ram_wdata = rx_data;
  assign ram_we    = (st == PB_PULL) && rx_valid;
  assign tx_valid  = (st == PB_TX);
endmodule
