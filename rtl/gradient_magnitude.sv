// Gradient magnitude unit: |gx| + |gy|, limited to 255.
//
// Combinational. The Euclidean magnitude sqrt(gx^2 + gy^2) is approximated by
// the sum of the absolute values, which needs no multiplier or square root.
// The sum (0..2040) is also given unlimited as mag_raw; mag is that sum
// saturated to 255 so that a strong edge gives a full-scale 8-bit pixel, and
// saturated flags when the limit was applied. The sum-of-absolute-values
// approximation and the limit to 255 follow the original design.
module gradient_magnitude
  import sobel_pkg::*;
(
  input  grad_t  gx,
  input  grad_t  gy,
  output mag_t   mag_raw,
  output pixel_t mag,
  output logic   saturated
);

  mag_t abs_gx, abs_gy;

  always_comb begin
    abs_gx    = gx[GRAD_W-1] ? mag_t'(-gx) : mag_t'(gx);
    abs_gy    = gy[GRAD_W-1] ? mag_t'(-gy) : mag_t'(gy);
    mag_raw   = abs_gx + abs_gy;
    saturated = (mag_raw > mag_t'(PIX_MAX));
    mag       = saturated ? pixel_t'(PIX_MAX) : pixel_t'(mag_raw);
  end

endmodule
