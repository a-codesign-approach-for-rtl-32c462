// vd_pkg: constants and types shared by the vehicle detector.
//
// The surveyed window is 128 rows x 256 columns of 8-bit luminance, and the
// binarisation threshold h (80) and the minimum detection area (1000 pixels)
// are the detector's published operating values. The SRAM map (frame at
// address 0, reference image right after it), the local-bus register map and
// the fixed-point constants are choices of this implementation.
package vd_pkg;

  localparam int unsigned PIX_W      = 8;      // k = 256 gray levels
  localparam int unsigned IMG_ROWS   = 128;    // surveyed window height
  localparam int unsigned IMG_COLS   = 256;    // surveyed window width
  localparam int unsigned SRAM_AW    = 19;     // 512 kB board SRAM, byte wide
  localparam int unsigned IDX_W      = 16;     // detection index width (max 126*254 = 32004)
  localparam int unsigned CNT_W      = 16;     // vehicle counter width

  localparam logic [PIX_W-1:0] H_DEFAULT    = 8'd80;    // threshold h of eq. (3)
  localparam logic [IDX_W-1:0] AREA_DEFAULT = 16'd1000; // d_i >= 10^3 is an event

  typedef logic [PIX_W-1:0] pix_t;

  // Local-bus register map (byte registers).
  typedef enum logic [3:0] {
    REG_CTRL    = 4'h0,  // W: bit0 start frame, bit1 clear history/count, bit2 ack irq
    REG_MODE    = 4'h1,  // R/W: bit0 rgb_mode (data port takes R,G,B triplets)
    REG_STATUS  = 4'h2,  // R: bit0 busy, bit1 irq, bit2 present, bit3 peak
    REG_PTR0    = 4'h3,  // R/W: SRAM write pointer bits 7:0
    REG_PTR1    = 4'h4,  // R/W: bits 15:8
    REG_PTR2    = 4'h5,  // R/W: bits 18:16
    REG_DATA    = 4'h6,  // W: pixel byte to SRAM[ptr], ptr auto-increments
    REG_THRESH  = 4'h7,  // R/W: threshold h
    REG_AREA0   = 4'h8,  // R/W: minimum area, low byte
    REG_AREA1   = 4'h9,  // R/W: minimum area, high byte
    REG_DIDX0   = 4'hA,  // R: last detection index, low byte
    REG_DIDX1   = 4'hB,  // R: high byte
    REG_COUNT0  = 4'hC,  // R: vehicle count, low byte
    REG_COUNT1  = 4'hD,  // R: high byte
    REG_PEAKD0  = 4'hE,  // R: detection index of the last peak, low byte
    REG_PEAKD1  = 4'hF   // R: high byte
  } reg_addr_e;

endpackage
