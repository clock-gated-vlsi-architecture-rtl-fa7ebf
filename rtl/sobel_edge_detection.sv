// Clock-gated Sobel edge detection core: nine window pixels in, one edge pixel
// out.
//
// This is the unit the original design evaluates on its own: a Sobel kernel
// whose output register runs on a clock gated by a flip-flop based clock gate
// (instance f1). The nine pixels of a 3x3 neighbourhood arrive on separate
// ports named after their position; the horizontal and vertical gradients are
// formed in parallel, |Gx| + |Gy| is limited to 255 and registered as
// out_pixel. When enable is low the gated clock stops and out_pixel holds its
// value. The gated clock and the registered enable are also given out so that
// neighbouring stages (window generator, threshold stage) can run on the same
// gated clock.
//
// Interface and timing:
//   enable       gate enable, sampled on the falling edge of clock; set after
//                rising edge k, it lets the core (and gclk) tick at edge k+1.
//   in_valid     qualifies the nine pixels; out_valid is its registered copy.
//   out_pixel    loaded at each gated edge where in_valid is high: one clock
//                of latency from the pixel ports.
//   reset        asynchronous, active high.
// The port names follow the signals of the original waveform; packing the
// nine pixels into sobel_pkg::window_t for the kernel is this design's own.
// The centre pixel has weight 0 in both masks and is unused.
module sobel_edge_detection
  import sobel_pkg::*;
(
  input  logic   clock,
  input  logic   reset,
  input  logic   enable,
  input  logic   in_valid,
  input  pixel_t pixel_top_left,
  input  pixel_t pixel_top,
  input  pixel_t pixel_top_right,
  input  pixel_t pixel_left,
  input  pixel_t pixel_center,
  input  pixel_t pixel_right,
  input  pixel_t pixel_bottom_left,
  input  pixel_t pixel_bottom,
  input  pixel_t pixel_bottom_right,
  output pixel_t out_pixel,
  output logic   out_saturated,
  output logic   out_valid,
  output logic   gclk,
  output logic   gate_on
);

  window_t win;

  assign win = '{
    top_left:    pixel_top_left,    top:    pixel_top,    top_right:    pixel_top_right,
    left:        pixel_left,        center: pixel_center, right:        pixel_right,
    bottom_left: pixel_bottom_left, bottom: pixel_bottom, bottom_right: pixel_bottom_right
  };

  clock_gate f1 (
    .clk (clock), .rst (reset), .en (enable), .en_q (gate_on), .gclk (gclk)
  );

  sobel_kernel u_kernel (
    .clk (gclk), .rst (reset), .in_valid (in_valid), .win (win),
    .out_pixel (out_pixel), .out_saturated (out_saturated), .out_valid (out_valid)
  );

endmodule
