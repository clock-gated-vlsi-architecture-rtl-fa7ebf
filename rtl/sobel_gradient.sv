// Sobel gradient (convolution) unit for one mask direction.
//
// Combinational. The 3x3 window is convolved with the 3x3 Sobel mask
//   GRAD_X:  -1  0 +1      GRAD_Y:  -1 -2 -1
//            -2  0 +2                0  0  0
//            -1  0 +1               +1 +2 +1
// The weight 2 is a one-bit left shift, so the unit needs only adders and
// subtractors; the centre pixel carries weight 0 (its window bits are unused).
// The original design speaks of modified masks without giving coefficients;
// the classic Sobel coefficients are used here; they are consistent with the
// original's worked example. The result is the exact signed gradient in
// -1020..+1020.
//
// Interface: win (sobel_pkg::window_t) in, grad (signed GRAD_W bits) out.
module sobel_gradient
  import sobel_pkg::*;
#(
  parameter grad_dir_e DIR = GRAD_X
) (
  input  window_t win,
  output grad_t   grad
);

  grad_t pos_sum, neg_sum;

  always_comb begin
    if (DIR == GRAD_X) begin
      pos_sum = grad_t'(win.top_right)   + (grad_t'(win.right)  << 1) + grad_t'(win.bottom_right);
      neg_sum = grad_t'(win.top_left)    + (grad_t'(win.left)   << 1) + grad_t'(win.bottom_left);
    end else begin
      pos_sum = grad_t'(win.bottom_left) + (grad_t'(win.bottom) << 1) + grad_t'(win.bottom_right);
      neg_sum = grad_t'(win.top_left)    + (grad_t'(win.top)    << 1) + grad_t'(win.top_right);
    end
    grad = pos_sum - neg_sum;
  end

endmodule
