// Clock-gated streaming Sobel edge detector (top level).
//
// A grey-level image enters one pixel per accepted clock in raster order.
// window_gen forms the 3x3 neighbourhood from two line buffers, the core
// sobel_edge_detection (clock gate f1 and sobel_kernel) computes |Gx| + |Gy|
// of the classic Sobel masks limited to 255, and
// threshold_unit compares it with the programmable threshold to give a binary
// edge flag next to the 8-bit edge pixel. One result is produced per interior
// pixel; the one-pixel image border gets none.
//
// Clock gating: all three processing stages run on gclk, made from clk by the
// flip-flop based clock gate f1 inside the core. The gate is enabled while a pixel is
// offered (pix_valid) or a result is still travelling through the pipeline
// (win_valid, kern_valid). When no pixel arrives and the pipeline has drained,
// gclk stops and the datapath registers and line buffers do not switch.
// gate_on shows the registered gate enable: it is high in exactly the cycles
// whose rising edge reaches the datapath.
//
// Interface and timing (all on the rising edge of clk):
//   pix_valid, pix_in  a pixel is taken at every edge where pix_valid is high
//                      (no back-pressure; the detector never stalls input).
//   threshold          edge threshold, 0..255.
//   out_valid          one-cycle strobe: out_pixel and out_edge hold a new
//                      result, for the window centred on the pixel one row
//                      and one column before the pixel that completed it.
//   Latency: if the pixel completing a window is taken at rising edge k, its
//   result is loaded at edge k+2 and out_valid is high in the cycle after
//   edge k+2, whether or not more pixels follow (the gate keeps gclk running
//   until the pipeline is empty).
//   rst: asynchronous, active high; restarts the frame at row 0, column 0.
// The core's saturation flag (sum above 255) is not needed by the stages
// here and is left unused.
module sobel_edge_top
  import sobel_pkg::*;
#(
  parameter int unsigned IMG_WIDTH  = 256,
  parameter int unsigned IMG_HEIGHT = 256
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   pix_valid,
  input  pixel_t pix_in,
  input  pixel_t threshold,
  output pixel_t out_pixel,
  output logic   out_edge,
  output logic   out_valid,
  output logic   gate_on
);

  logic    gclk, gate_en, tick_q;
  window_t win;
  logic    win_valid;
  pixel_t  kern_pixel;
  logic    kern_saturated, kern_valid;
  logic    thr_valid;

  // Clock gating control: run while there is input or work in flight.
  assign gate_en = pix_valid | win_valid | kern_valid;

  window_gen #(.IMG_WIDTH(IMG_WIDTH), .IMG_HEIGHT(IMG_HEIGHT)) u_window (
    .clk (gclk), .rst (rst), .in_valid (pix_valid), .pix_in (pix_in),
    .win (win), .win_valid (win_valid)
  );

  // Gated kernel core; its gate f1 also clocks the window generator and the
  // threshold stage.
  sobel_edge_detection u_core (
    .clock (clk), .reset (rst), .enable (gate_en), .in_valid (win_valid),
    .pixel_top_left    (win.top_left),    .pixel_top    (win.top),
    .pixel_top_right   (win.top_right),   .pixel_left   (win.left),
    .pixel_center      (win.center),      .pixel_right  (win.right),
    .pixel_bottom_left (win.bottom_left), .pixel_bottom (win.bottom),
    .pixel_bottom_right(win.bottom_right),
    .out_pixel (kern_pixel), .out_saturated (kern_saturated),
    .out_valid (kern_valid), .gclk (gclk), .gate_on (gate_on)
  );

  threshold_unit u_threshold (
    .clk (gclk), .rst (rst), .in_valid (kern_valid), .mag (kern_pixel),
    .threshold (threshold), .out_pixel (out_pixel), .out_edge (out_edge),
    .out_valid (thr_valid)
  );

  // tick_q marks the clk cycles that follow a gclk edge, so out_valid is a
  // single-cycle strobe on the free-running clock.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) tick_q <= 1'b0;
    else     tick_q <= gate_on;
  end

  assign out_valid = tick_q & thr_valid;

  // The gate may only stop the datapath clock when no result is in flight.
  always_ff @(posedge clk) begin
    if (!rst && (win_valid || kern_valid))
      a_gate_on_while_busy : assert (gate_on)
        else $error("clock gate off while a result is in flight");
  end

endmodule
