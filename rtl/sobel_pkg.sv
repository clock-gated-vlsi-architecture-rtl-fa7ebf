// Shared types and constants of the Sobel edge detector.
//
// Pixels are 8-bit unsigned grey levels. A 3x3 neighbourhood is carried as a
// packed struct whose fields are named after their place in the window. The
// gradient of one 3x3 Sobel mask lies in -1020..+1020 (4 * 255 on each side),
// so a signed 11-bit value holds it exactly; the sum of two absolute gradients
// is at most 2040 and fits an unsigned 11-bit value. The final edge strength is
// limited to PIX_MAX (255) so that it fits an 8-bit output pixel again.
package sobel_pkg;

  localparam int unsigned PIX_W  = 8;
  localparam int unsigned GRAD_W = 11;  // signed gradient of one mask
  localparam int unsigned MAG_W  = 11;  // |Gx| + |Gy|, unsigned

  localparam int unsigned PIX_MAX = (1 << PIX_W) - 1;

  typedef logic [PIX_W-1:0]         pixel_t;
  typedef logic signed [GRAD_W-1:0] grad_t;
  typedef logic [MAG_W-1:0]         mag_t;

  // Mask direction of a gradient unit.
  typedef enum logic {
    GRAD_X = 1'b0,  // horizontal gradient (responds to vertical edges)
    GRAD_Y = 1'b1   // vertical gradient (responds to horizontal edges)
  } grad_dir_e;

  // 3x3 pixel neighbourhood, row by row from the top left corner.
  typedef struct packed {
    pixel_t top_left;
    pixel_t top;
    pixel_t top_right;
    pixel_t left;
    pixel_t center;
    pixel_t right;
    pixel_t bottom_left;
    pixel_t bottom;
    pixel_t bottom_right;
  } window_t;

endpackage
