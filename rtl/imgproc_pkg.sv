// imgproc_pkg: types and constants shared by the image processor.
//
// The seven cosine basis values a..g are cos(k*pi/16)/2 for k = 1..7 (d = c4
// also serves as the DC weight), quantised to 8-bit fixed point with 7
// fractional bits (value = integer / 128). The integers follow the printed
// binary/CSD digits of the cosine basis table:
//   a = 0100 000-1 = 63,  b = 0100 -1011 = 59, c = 0011 0101 = 53,
//   d = 0010 1101 = 45,   e = 0010 0100 = 36,  f = 0001 1000 = 24,
//   g = 0000 1100 = 12.
// The processing modes and the Avalon register map are this design's own.
package imgproc_pkg;

  localparam int unsigned PIX_W  = 8;   // 8 bits per pixel
  localparam int unsigned COEF_FRAC = 7; // fractional bits of the cosine basis

  typedef logic [PIX_W-1:0] pixel_t;

  // Cosine basis as 8-bit integers (real value * 128).
  localparam int COS_A = 63;  // cos(1pi/16)/2 = 0.4904
  localparam int COS_B = 59;  // cos(2pi/16)/2 = 0.4619
  localparam int COS_C = 53;  // cos(3pi/16)/2 = 0.4157
  localparam int COS_D = 45;  // cos(4pi/16)/2 = 0.3536
  localparam int COS_E = 36;  // cos(5pi/16)/2 = 0.2778
  localparam int COS_F = 24;  // cos(6pi/16)/2 = 0.1913
  localparam int COS_G = 12;  // cos(7pi/16)/2 = 0.0975

  // Index of each basis value in a csd_precompute product vector.
  typedef enum logic [2:0] {
    K_A = 3'd0, K_B = 3'd1, K_C = 3'd2, K_D = 3'd3,
    K_E = 3'd4, K_F = 3'd5, K_G = 3'd6
  } coef_idx_e;

  // Application selected for the reconfigurable processing module.
  typedef enum logic [1:0] {
    MODE_MEDIAN = 2'd0,  // 3x3 median, salt-and-pepper noise removal
    MODE_SOBEL  = 2'd1,  // 3x3 Sobel edge magnitude
    MODE_DCT    = 2'd2   // 8x8 2-D DCT followed by 2-D IDCT (reconstruction)
  } mode_e;

  // Avalon-MM register word addresses.
  localparam logic [1:0] REG_CTRL   = 2'd0;  // [0] start (write 1), [2:1] mode
  localparam logic [1:0] REG_WIDTH  = 2'd1;  // image width in pixels
  localparam logic [1:0] REG_HEIGHT = 2'd2;  // image height in pixels
  localparam logic [1:0] REG_STATUS = 2'd3;  // [0] busy, [1] done, [2] loaded

  // Signed product of a value by a 7-bit-fraction constant, rounded back to
  // integer: (x + 64) >>> 7.
  function automatic int round_q7(input int x);
    return (x + 64) >>> 7;
  endfunction

endpackage
