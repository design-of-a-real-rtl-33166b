// imgboard_pkg: types and constants shared by the flexible image processing board.
//
// A pixel is one 8-bit colour plane sample; an RGB bus carries the three planes of
// one pixel side by side, as on the 24-bit video busses between the A/D-D/A board,
// the frame buffers and the crossbar ASICs. The VME bank codes are the values of
// address bits A[15:9] for the three banks of the board's address map (read-back
// drivers at 0xFA00, write latches at 0xFC00, crossbar chips at 0xFE00, chips spaced
// 0x40 apart, selected by A[8:6]). The control-word layout of the three-channel
// crossbar is this design's own choice; the document does not print it.
package imgboard_pkg;

  typedef logic [7:0] pixel_t;

  typedef struct packed {
    pixel_t r;
    pixel_t g;
    pixel_t b;
  } rgb_t;

  // Source selected for one output plane of the three-channel crossbar.
  // Level 2 picks red or green (bit 0), level 3 picks that or blue (bit 1).
  typedef enum logic [1:0] {
    SRC_R   = 2'b00,
    SRC_G   = 2'b01,
    SRC_B   = 2'b10,
    SRC_B_1 = 2'b11
  } plane_src_e;

  // Control word of the three-channel crossbar, as written on D[11:0].
  typedef struct packed {
    plane_src_e b_src;    // D[11:10] source of B2SDI
    plane_src_e g_src;    // D[9:8]   source of G2SDI
    plane_src_e r_src;    // D[7:6]   source of R2SDI
    logic [2:0] lane_sel; // D[5:3]   per plane (B,G,R): 1 = X3SDII, 0 = registered X1SDI
    logic [2:0] oe;       // D[2:0]   per plane (B,G,R): 1 = drive X3SDI
  } mux3_ctrl_t;

  localparam int unsigned N_MUX3  = 4;  // MUXFB1, MUXFB2, MUXVP1, MUXVP2
  localparam int unsigned N_MUX   = 5;  // plus MUXPI, the one-channel chip
  localparam int unsigned N_WREG  = 7;  // 74LS374 host control latches
  localparam int unsigned N_RDRV  = 4;  // 74LS244 read-back drivers

  // A[15:9] of each bank (Table of the board address map).
  localparam logic [6:0] BANK_RDRV = 7'h7D;  // 0xFA00..0xFAC0
  localparam logic [6:0] BANK_WREG = 7'h7E;  // 0xFC00..0xFD80
  localparam logic [6:0] BANK_MUX  = 7'h7F;  // 0xFE00..0xFF00

  // Chip index A[8:6] of each crossbar inside the crossbar bank.
  localparam logic [2:0] CHIP_MUXFB1 = 3'd0;
  localparam logic [2:0] CHIP_MUXFB2 = 3'd1;
  localparam logic [2:0] CHIP_MUXVP1 = 3'd2;
  localparam logic [2:0] CHIP_MUXVP2 = 3'd3;
  localparam logic [2:0] CHIP_MUXPI  = 3'd4;

endpackage
