// Self-checking testbench for sobel_gradient.
//
// Both mask directions are instantiated. Directed windows (flat, the largest
// positive and negative steps in each direction) and random windows are
// applied; each gradient is compared with the integer convolution of the
// window with the textbook Sobel mask.
module tb_sobel_gradient;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  logic    clk = 1'b0;
  window_t win;
  grad_t   gx, gy;
  int      checks = 0, failures = 0;

  sobel_gradient #(.DIR(GRAD_X)) dut_x (.win(win), .grad(gx));
  sobel_gradient #(.DIR(GRAD_Y)) dut_y (.win(win), .grad(gy));

  always #5 clk = ~clk;

  task automatic apply(input window_t w);
    win = w;
    #1;
    checks += 2;
    if (int'(gx) != ref_grad(w, 1'b0)) begin
      failures++;
      $display("FAIL gx win=%h got %0d expected %0d", w, gx, ref_grad(w, 1'b0));
    end
    if (int'(gy) != ref_grad(w, 1'b1)) begin
      failures++;
      $display("FAIL gy win=%h got %0d expected %0d", w, gy, ref_grad(w, 1'b1));
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0);
    apply('1);
    apply('{top_left: 0, left: 0, bottom_left: 0, top_right: 255, right: 255,
            bottom_right: 255, default: 8'd77});
    apply('{top_left: 255, left: 255, bottom_left: 255, top_right: 0, right: 0,
            bottom_right: 0, default: 8'd3});
    apply('{top_left: 0, top: 0, top_right: 0, bottom_left: 255, bottom: 255,
            bottom_right: 255, default: 8'd200});
    apply('{top_left: 255, top: 255, top_right: 255, bottom_left: 0, bottom: 0,
            bottom_right: 0, default: 8'd9});
    for (int i = 0; i < 3000; i++) apply(rand_window());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
