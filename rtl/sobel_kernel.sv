// Sobel edge kernel: one 3x3 window in, one registered edge pixel out.
//
// The horizontal and the vertical gradient units work on the same window in
// parallel; the magnitude unit adds their absolute values and limits the sum
// to 255. The only register is the output pixel, so the path from the window
// pixels to out_pixel is one combinational stage and the latency is one clock.
//
// Interface and timing: in_valid qualifies win. At each rising clk edge
// out_pixel, out_saturated (the sum exceeded 255) and out_valid take the
// result of the window present before the edge. Results are only loaded for
// valid windows; out_valid follows in_valid. rst is asynchronous, active high.
// The single register stage after the arithmetic matches the original's
// timing paths (window pixel to output register); the valid flag and the
// saturation output are this design's additions.
module sobel_kernel
  import sobel_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  input  window_t win,
  output pixel_t  out_pixel,
  output logic    out_saturated,
  output logic    out_valid
);

  grad_t  gx, gy;
  mag_t   mag_raw;
  pixel_t mag;
  logic   saturated;

  sobel_gradient #(.DIR(GRAD_X)) u_gx (.win(win), .grad(gx));
  sobel_gradient #(.DIR(GRAD_Y)) u_gy (.win(win), .grad(gy));

  gradient_magnitude u_mag (
    .gx (gx), .gy (gy), .mag_raw (mag_raw), .mag (mag), .saturated (saturated)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      out_pixel     <= '0;
      out_saturated <= 1'b0;
      out_valid     <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_pixel     <= mag;
        out_saturated <= saturated;
      end
    end
  end

endmodule
