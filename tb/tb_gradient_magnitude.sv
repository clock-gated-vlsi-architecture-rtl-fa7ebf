// Self-checking testbench for gradient_magnitude.
//
// Gradient pairs covering the corners of the range (+-1020), values around
// the 255 limit and random values are applied; the unlimited sum, the 8-bit
// result and the saturation flag are compared with |gx| + |gy| worked out with
// integers.
module tb_gradient_magnitude;
  import sobel_pkg::*;

  logic   clk = 1'b0;
  grad_t  gx, gy;
  mag_t   mag_raw;
  pixel_t mag;
  logic   saturated;
  int     checks = 0, failures = 0, n_sat = 0;

  gradient_magnitude dut (.gx(gx), .gy(gy), .mag_raw(mag_raw), .mag(mag), .saturated(saturated));

  always #5 clk = ~clk;

  task automatic apply(input int a, input int b);
    int s, lim;
    gx = grad_t'(a);
    gy = grad_t'(b);
    #1;
    s   = (a < 0 ? -a : a) + (b < 0 ? -b : b);
    lim = (s > 255) ? 255 : s;
    checks += 3;
    if (int'(mag_raw) != s)     begin failures++; $display("FAIL raw %0d %0d: %0d", a, b, mag_raw); end
    if (int'(mag) != lim)       begin failures++; $display("FAIL mag %0d %0d: %0d", a, b, mag); end
    if (saturated != (s > 255)) begin failures++; $display("FAIL sat %0d %0d", a, b); end
    if (s > 255) n_sat++;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(0, 0);
    apply(1020, 1020);
    apply(-1020, -1020);
    apply(-1020, 1020);
    apply(255, 0);
    apply(0, -256);
    apply(-128, 127);
    apply(-128, 128);
    apply(-264, -284);  // the 3x3 example of the waveform figure
    for (int i = 0; i < 3000; i++)
      apply(int'($urandom % 2041) - 1020, int'($urandom % 2041) - 1020);
    for (int i = 0; i < 1000; i++)
      apply(int'($urandom % 301) - 150, int'($urandom % 301) - 150);
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
