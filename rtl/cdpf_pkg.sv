// cdpf_pkg -- shared constants and types of the crack-detection accelerators.
//
// The accelerators work on the camera frame of the crack detector: 1280 x 1024
// pixels in YUY2 (YUV 4:2:2, 16 bits per pixel). In a YUY2 stream the bytes of
// two neighbouring pixels are Y0 U0 Y1 V0 in increasing address order, so a
// 16-bit pixel word carries its luma Y in bits [7:0] and one chroma byte (U on
// even pixels, V on odd pixels) in bits [15:8].
//
// The colour-conversion coefficients are the ones of the converter's reference
// formula (R = Y + 1.402525 Cr, G = Y - 0.343730 Cb - 0.714401 Cr,
// B = Y + 1.769905 Cb + 0.000013 Cr), stored here as round(c * 2^16). Using
// 16-bit fixed point instead of floating point is this design's choice.
package cdpf_pkg;

  // Frame geometry of the camera (active pixels).
  localparam int unsigned IMG_WIDTH  = 1280;
  localparam int unsigned IMG_HEIGHT = 1024;

  // Sobel operator centre weight: the common [1 2 1] operator.
  localparam logic [2:0] SOBEL_CENTRE_DEFAULT = 3'd2;

  // Chroma byte of a neutral (grey) pixel; the edge map is sent as grey YUY2.
  localparam logic [7:0] CHROMA_NEUTRAL = 8'h80;

  // Fixed-point colour coefficients, Q16 (value * 65536, rounded).
  localparam int COEF_FRAC = 16;
  localparam logic signed [18:0] COEF_R_CR = 19'sd91916;   // 1.402525
  localparam logic signed [18:0] COEF_G_CB = 19'sd22527;   // 0.343730
  localparam logic signed [18:0] COEF_G_CR = 19'sd46819;   // 0.714401
  localparam logic signed [18:0] COEF_B_CB = 19'sd115992;  // 1.769905
  localparam logic signed [18:0] COEF_B_CR = 19'sd1;       // 0.000013

  // One YUY2 pixel word.
  typedef struct packed {
    logic [7:0] c;  // chroma: U (Cb) on even pixels, V (Cr) on odd pixels
    logic [7:0] y;  // luma
  } yuy2_px_t;

  // One RGB pixel, R in the lowest byte (first byte in memory).
  typedef struct packed {
    logic [7:0] b;
    logic [7:0] g;
    logic [7:0] r;
  } rgb_px_t;

  // Register map of the control block (byte addresses).
  localparam logic [3:0] REG_CTRL       = 4'h0;  // [0] edge filter on, [6:4] centre weight
  localparam logic [3:0] REG_EDGE_FRAMES = 4'h4;  // frames finished by the edge filter
  localparam logic [3:0] REG_RGB_FRAMES  = 4'h8;  // frames finished by the colour converter
  localparam logic [3:0] REG_GEOMETRY   = 4'hC;  // [15:0] width, [31:16] height (read only)

endpackage
