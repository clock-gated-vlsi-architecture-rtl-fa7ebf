// Reference model of the Sobel arithmetic for the testbenches, written with
// plain integers and the textbook convolution sum, independent of the RTL.
package sobel_ref_pkg;
  import sobel_pkg::*;

  // Classic Sobel masks, indexed [row][col] from the top left.
  localparam int MASK_X [3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
  localparam int MASK_Y [3][3] = '{'{-1, -2, -1}, '{0, 0, 0}, '{1, 2, 1}};

  function automatic int win_at(window_t w, int r, int c);
    logic [9*8-1:0] bits;
    bits = w;
    // top_left occupies the most significant byte
    return int'(bits[(8 - (3 * r + c)) * 8 +: 8]);
  endfunction

  function automatic int ref_grad(window_t w, bit dir_y);
    int s = 0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        s += (dir_y ? MASK_Y[r][c] : MASK_X[r][c]) * win_at(w, r, c);
    return s;
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  // Unlimited |Gx| + |Gy|.
  function automatic int ref_sum(window_t w);
    return iabs(ref_grad(w, 1'b0)) + iabs(ref_grad(w, 1'b1));
  endfunction

  function automatic int ref_pixel(window_t w);
    int s = ref_sum(w);
    return (s > 255) ? 255 : s;
  endfunction

  function automatic window_t rand_window();
    logic [95:0] r;
    r = {$urandom, $urandom, $urandom};
    return r[$bits(window_t)-1:0];
  endfunction

endpackage
