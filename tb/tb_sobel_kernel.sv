// Self-checking testbench for sobel_kernel.
//
// First the 3x3 neighbourhood of the waveform example (88 98 0 / 88 98 0 /
// 0 0 0, a strong edge) must give 255. Then random, flat and low-contrast
// windows follow with random valid flags. Each result must appear exactly one
// clock after its window and equal min(|Gx| + |Gy|, 255) from the integer
// reference; out_saturated must flag sums above 255, and invalid cycles must
// leave the output pixel unchanged.
module tb_sobel_kernel;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  logic    clk = 1'b0;
  logic    rst, in_valid, out_valid, out_saturated;
  window_t win;
  pixel_t  out_pixel;
  int      exp_pixel;
  logic    exp_sat, exp_valid;
  int      checks = 0, failures = 0, n_sat = 0, n_unsat = 0;

  sobel_kernel dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .win(win),
    .out_pixel(out_pixel), .out_saturated(out_saturated), .out_valid(out_valid)
  );

  always #5 clk = ~clk;

  task automatic step(input window_t w, input logic v);
    win = w;
    in_valid = v;
    if (v) begin
      exp_pixel = ref_pixel(w);
      exp_sat   = ref_sum(w) > 255;
      if (exp_sat) n_sat++; else n_unsat++;
    end
    exp_valid = v;
    @(posedge clk);
    #1;
    checks += 3;
    if (out_valid !== exp_valid)          begin failures++; $display("FAIL valid win=%h", w); end
    if (int'(out_pixel) != exp_pixel)     begin failures++; $display("FAIL pixel win=%h got %0d expected %0d", w, out_pixel, exp_pixel); end
    if (out_saturated !== exp_sat)        begin failures++; $display("FAIL saturated win=%h", w); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    window_t w;
    rst = 1'b0;
    #1 rst = 1'b1;
    in_valid = 1'b0;
    win = '0;
    exp_pixel = 0;
    exp_sat = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    // Waveform example: expected |Gx| + |Gy| = 264 + 284 = 548, limited to 255.
    step('{top_left: 88, top: 98, top_right: 0, left: 88, center: 98, right: 0,
           bottom_left: 0, bottom: 0, bottom_right: 0}, 1'b1);
    checks++;
    if (out_pixel !== 8'd255) failures++;
    for (int i = 0; i < 3000; i++) begin
      w = rand_window();
      if (i % 3 == 1) begin
        // low-contrast window: small deviations around one level
        logic [7:0] base;
        base = 8'($urandom % 200);
        w = {9{base}};
        for (int k = 0; k < 9; k++) w[k*8 +: 8] = base + 8'($urandom % 40);
      end
      step(w, ($urandom % 4) != 0);
    end
    checks++;
    if (n_sat == 0 || n_unsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
