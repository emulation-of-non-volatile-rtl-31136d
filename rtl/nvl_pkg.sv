// nvl_pkg: types and constants shared by the intermittent 2D DCT core and its
// emulation blocks.
//
// The core computes an 8x8 two-dimensional DCT by the row/column method. Its
// number formats are this design's choice: 8-bit unsigned pixels (level-shifted
// by -128 inside the first stage), 12-bit signed intermediate values with two
// fractional bits between the stages, and 12-bit signed integer output
// coefficients. The checkpoint state of the stages and of the double-buffer
// controller is gathered in the packed struct ckpt_state_t so that the
// intermittency controller can move it to and from the non-volatile memory as
// a sequence of NV words.
package nvl_pkg;

  // ---- DCT number formats ----
  localparam int unsigned N        = 8;   // transform size (8x8 blocks)
  localparam int unsigned IP_W     = 8;   // input pixel width (unsigned)
  localparam int unsigned RAMD_W   = 12;  // 1D result width, 2 fractional bits
  localparam int unsigned OP_W     = 12;  // 2D output coefficient width
  localparam int unsigned COEF_FRAC = 12; // cosine constants scaled by 2^12
  localparam int unsigned ROMD_W   = 16;  // width of a DA ROM word (signed)
  localparam int unsigned RAMA_W   = 6;   // address of one 64-word buffer

  // ---- emulation formats ----
  localparam int unsigned VOLT_W   = 12;  // trace voltage in millivolts
  localparam int unsigned NVD_W    = 16;  // NV_MEM word width
  localparam int unsigned NVA_W    = 8;   // NV_MEM address width (256 words)

  // ---- system status of the i-2DDCT (sys_status) ----
  typedef enum logic [2:0] {
    ST_PULL    = 3'd0,  // Pull-Checkpoint (only after power-up)
    ST_INIT    = 3'd1,  // Init-Checkpoint: load state registers
    ST_HALTED  = 3'd2,  // Halted: nothing active
    ST_RUNNING = 3'd3,  // Running: normal execution
    ST_PRECKPT = 3'd4,  // Pre-Checkpoint: stages finish their work
    ST_PUSH    = 3'd5   // Push-Checkpoint: state to NV_MEM
  } sys_status_t;

  // ---- checkpointed state of each volatile block ----
  typedef struct packed {
    logic [N-1:0][IP_W-1:0] row;   // pixels collected for the next row
    logic [3:0]             col;   // number of pixels collected (0..8)
    logic [2:0]             rowi;  // row of the current block to compute next
  } dct1s_state_t;

  typedef struct packed {
    logic [2:0] rowi;              // row of the transposed buffer to read next
  } dct2s_state_t;

  typedef struct packed {
    logic       wsel;              // buffer written by stage 1
    logic       rsel;              // buffer read by stage 2
    logic [1:0] full;              // buffer holds a complete block
  } dbuf_state_t;

  typedef struct packed {
    dct1s_state_t s1;
    dct2s_state_t s2;
    dbuf_state_t  db;
  } ckpt_state_t;

  localparam int unsigned CKPT_W     = $bits(ckpt_state_t);
  localparam int unsigned CKPT_WORDS = (CKPT_W + NVD_W - 1) / NVD_W;

  // ---- checkpoint layout inside NV_MEM ----
  localparam logic [NVA_W-1:0] NV_MARK_ADDR  = 8'h00;  // validity marker
  localparam logic [NVA_W-1:0] NV_STATE_ADDR = 8'h01;  // CKPT_WORDS state words
  localparam logic [NVA_W-1:0] NV_RAM_ADDR   = 8'h10;  // 128 RAM words (RAM1, RAM2)
  localparam logic [NVD_W-1:0] NV_MARK_VALID = 16'hA5C3;

endpackage
