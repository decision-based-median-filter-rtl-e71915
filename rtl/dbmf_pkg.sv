// Shared types and constants of the decision based median filter system.
//
// A pixel is an 8-bit grayscale value. Salt and pepper noise shows up as
// the two extreme values, PIX_MIN (0, pepper) and PIX_MAX (255, salt); any
// value strictly between them is an information (noise free) pixel.
// A 3x3 window is a packed array of nine pixels in raster order:
//   index 0 1 2   top row
//         3 4 5   middle row, 4 is the centre (the pixel being processed)
//         6 7 8   bottom row
// filt_case_e names the decision the filter took for a window; it is
// exported for observation and test only.
package dbmf_pkg;

  typedef logic [7:0] pixel_t;
  typedef pixel_t [8:0] window_t;

  localparam pixel_t PIX_MIN = 8'd0;
  localparam pixel_t PIX_MAX = 8'd255;
  localparam int unsigned WIN_N = 9;
  localparam int unsigned CENTRE = 4;

  typedef enum logic [2:0] {
    FC_CLEAN   = 3'd0,  // centre is an information pixel: kept
    FC_UNIFORM = 3'd1,  // centre is 0/255 and the whole window equals it: kept
    FC_MEAN    = 3'd2,  // every pixel is 0 or 255: mean of the window
    FC_NEAREST = 3'd3,  // more than half the window corrupted: nearest information pixel
    FC_MEDIAN  = 3'd4   // otherwise: median of the information pixels
  } filt_case_e;

  // Host command bytes understood by the controller.
  localparam logic [7:0] CMD_LOAD  = 8'h4C;  // 'L': W*H image bytes follow
  localparam logic [7:0] CMD_START = 8'h53;  // 'S': filter and send back

  function automatic logic is_noise(pixel_t p);
    return (p == PIX_MIN) || (p == PIX_MAX);
  endfunction

endpackage
