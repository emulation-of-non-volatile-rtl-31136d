// i2ddct_ctrl: intermittency controller of the 2D DCT core (i-2DDCT_CTRL).
//
// Main state machine (reported on sys_status):
//   Pull-Checkpoint  entered only after a reset (power-up). Reads the marker
//                    word of NV_MEM; if it is valid, reads the state words
//                    and then the 128 buffer words, which are handed to the
//                    buffer transfer block over the RX line. Without a valid
//                    marker the core starts from its reset state (Halted).
//   Init-Checkpoint  one cycle: load pulses so the stages and the
//                    double-buffer controller take their registers from the
//                    restored state words; then Halted.
//   Halted           nothing runs; leaves for Running when energy_low is low.
//   Running          normal execution; energy_low high leads to
//                    Pre-Checkpoint (the backup policy: save only when the
//                    energy falls below the hazard threshold).
//   Pre-Checkpoint   the stages finish what is in flight and accept nothing
//                    new; when both report idle, Push-Checkpoint.
//   Push-Checkpoint  clears the marker, writes the state words, moves the 128
//                    buffer words from the TX line into NV_MEM, writes the
//                    marker valid last, then Halted.
// A checkpoint is thus only taken as valid once it is complete: a power
// failure during a push leaves no valid marker and the next power-up starts
// afresh.
// NV_MEM layout (fixed locations): marker at NV_MARK_ADDR, CKPT_WORDS state
// words from NV_STATE_ADDR, buffer words from NV_RAM_ADDR (RAM1 then RAM2).
// Each NV access is issued with nv_en while nv_busy is low and is complete
// when nv_busy falls again; that wait is how the memory delay reaches the core.
// The states, the backup policy and the fixed placement follow the paper; the
// marker, the word layout and the access sequencing are this design's
// choices.
module i2ddct_ctrl
  import nvl_pkg::*;
(
  input  logic               clk,
  input  logic               rst,          // power-on / emulated power failure
  input  logic               energy_low,   // hazard comparator (sys_energy)
  output sys_status_t        status,
  // stages
  input  logic               s1_idle,
  input  logic               s2_idle,
  input  ckpt_state_t        state_in,     // live registers of the stages
  output ckpt_state_t        state_out,    // restored registers
  output logic               load,
  // buffer transfer block
  output logic               pb_start_push,
  output logic               pb_start_pull,
  input  logic               pb_tx_valid,
  input  logic [RAMD_W-1:0]  pb_tx_data,
  output logic               pb_tx_ready,
  output logic               pb_rx_valid,
  output logic [RAMD_W-1:0]  pb_rx_data,
  // NV_MEM
  output logic               nv_en,
  output logic               nv_we,
  output logic [NVA_W-1:0]   nv_waddr,
  output logic [NVD_W-1:0]   nv_wdata,
  output logic [NVA_W-1:0]   nv_raddr,
  input  logic [NVD_W-1:0]   nv_rdata,
  input  logic               nv_busy
);
  typedef enum logic [1:0] {PH_MARK, PH_STATE, PH_RAM, PH_END} phase_t;

  localparam int unsigned SBW = CKPT_WORDS * NVD_W;

  phase_t           ph;
  logic             waiting;          // an NV access is in progress
  logic [7:0]       idx;
  logic [SBW-1:0]   stbuf;            // state words read back
  logic [SBW-1:0]   stlive;
  logic             nv_done, accept;

  assign stlive  = SBW'(state_in);
  assign accept  = nv_en && !nv_busy;
  assign nv_done = waiting && !nv_busy;

  // NV request generation
  always_comb begin
    nv_en    = 1'b0;
    nv_we    = 1'b0;
    nv_waddr = '0;
    nv_wdata = '0;
    nv_raddr = '0;
    if (status == ST_PULL && !waiting) begin
      nv_en = 1'b1;
      unique case (ph)
        PH_MARK:  nv_raddr = NV_MARK_ADDR;
        PH_STATE: nv_raddr = NV_STATE_ADDR + idx;
        default:  nv_raddr = NV_RAM_ADDR + idx;
      endcase
    end else if (status == ST_PUSH && !waiting) begin
      nv_we = 1'b1;
      unique case (ph)
        PH_MARK: begin
          nv_en    = 1'b1;
          nv_waddr = NV_MARK_ADDR;
          nv_wdata = '0;
        end
        PH_STATE: begin
          nv_en    = 1'b1;
          nv_waddr = NV_STATE_ADDR + idx;
          nv_wdata = stlive[idx*NVD_W +: NVD_W];
        end
        PH_RAM: begin
          nv_en    = pb_tx_valid;
          nv_waddr = NV_RAM_ADDR + idx;
          nv_wdata = NVD_W'(pb_tx_data);
        end
        default: begin
          nv_en    = 1'b1;
          nv_waddr = NV_MARK_ADDR;
          nv_wdata = NV_MARK_VALID;
        end
      endcase
    end
  end

  assign pb_tx_ready = (status == ST_PUSH) && (ph == PH_RAM) && accept;
  assign pb_rx_valid = (status == ST_PULL) && (ph == PH_RAM) && nv_done;
  assign pb_rx_data  = nv_rdata[RAMD_W-1:0];
  assign load        = (status == ST_INIT);
  assign state_out   = ckpt_state_t'(stbuf[CKPT_W-1:0]);

  always_ff @(posedge clk) begin
    if (rst) begin
      status        <= ST_PULL;
      ph            <= PH_MARK;
      waiting       <= 1'b0;
      idx           <= '0;
      stbuf         <= '0;
      pb_start_push <= 1'b0;
      pb_start_pull <= 1'b0;
    end else begin
      pb_start_push <= 1'b0;
      pb_start_pull <= 1'b0;
      if (accept)  waiting <= 1'b1;
      if (nv_done) waiting <= 1'b0;
      unique case (status)
        ST_PULL: if (nv_done) begin
          unique case (ph)
            PH_MARK: if (nv_rdata == NV_MARK_VALID) begin
              ph  <= PH_STATE;
              idx <= '0;
            end else begin
              status <= ST_HALTED;          // no checkpoint: cold start
            end
            PH_STATE: begin
              stbuf[idx*NVD_W +: NVD_W] <= nv_rdata;
              idx <= idx + 1'b1;
              if (idx == 8'(CKPT_WORDS - 1)) begin
                ph            <= PH_RAM;
                idx           <= '0;
                pb_start_pull <= 1'b1;
              end
            end
            default: begin
              idx <= idx + 1'b1;
              if (idx == 8'd127) status <= ST_INIT;
            end
          endcase
        end
        ST_INIT:    status <= ST_HALTED;
        ST_HALTED:  if (!energy_low) status <= ST_RUNNING;
        ST_RUNNING: if (energy_low)  status <= ST_PRECKPT;
        ST_PRECKPT: if (s1_idle && s2_idle) begin
          status <= ST_PUSH;
          ph     <= PH_MARK;
          idx    <= '0;
        end
        ST_PUSH: if (nv_done) begin
          unique case (ph)
            PH_MARK: begin
              ph  <= PH_STATE;
              idx <= '0;
            end
            PH_STATE: begin
              idx <= idx + 1'b1;
              if (idx == 8'(CKPT_WORDS - 1)) begin
                ph            <= PH_RAM;
                idx           <= '0;
                pb_start_push <= 1'b1;
              end
            end
            PH_RAM: begin
              idx <= idx + 1'b1;
              if (idx == 8'd127) ph <= PH_END;
            end
            default: status <= ST_HALTED;
          endcase
        end
        default: status <= ST_HALTED;
      endcase
    end
  end

  a_one_access: assert property (@(posedge clk) disable iff (rst) waiting |-> !accept)
    else $error("i2ddct_ctrl: second NV request while one is pending");
endmodule
