// vipic_pkg: constants and types shared by the VIPIC1 digital tier.
// The numbers here (64x64 pixels in 16 groups of 4 rows x 64 columns, 5-bit
// counters, 8-bit in-group addresses, the 010 START symbol, 3-bit feedback
// and 7-bit threshold trim codes) are those of the chip. The split of the
// 12-bit analog configuration word into fields beyond the two trim codes
// (differential-mode select, test-injection enable) is this design's choice.
package vipic_pkg;

  localparam int unsigned CNT_W        = 5;   // in-pixel event counter width
  localparam int unsigned ADDR_W       = 8;   // pixel address inside a group
  localparam int unsigned START_W      = 3;   // width of the START symbol
  localparam logic [2:0]  START_SYM    = 3'b010;
  localparam int unsigned GROUPS       = 16;
  localparam int unsigned GROUP_ROWS   = 4;
  localparam int unsigned COLS         = 64;

  // Record lengths on the serial line, in bits (= Serial_Clk cycles)
  localparam int unsigned REC_SPARSE   = START_W + CNT_W + ADDR_W;  // 16
  localparam int unsigned REC_IMAGING  = START_W + CNT_W;           // 8

  // Analog configuration of one pixel, 12 bits, sent to the analog tier
  typedef struct packed {
    logic [2:0] fb_trim;   // CSA feedback time-constant trim DAC
    logic [6:0] thr_trim;  // discriminator threshold trim DAC
    logic       diff_en;   // 1: differential front end (replica CSA as reference)
    logic       inj_en;    // 1: test charge injection connected
  } pix_acfg_t;

  localparam int unsigned ACFG_W = $bits(pix_acfg_t);   // 12

  // Full per-pixel configuration word held in the serial chain
  typedef struct packed {
    logic      set_pix;    // force the pixel into the readout queue every frame
    logic      reset_pix;  // remove the pixel from the readout queue
    pix_acfg_t acfg;
  } pix_cfg_t;

  localparam int unsigned CFG_W = $bits(pix_cfg_t);      // 14

endpackage
