// Self-checking testbench for sobel_edge_detection (kernel behind clock gate).
//
// The waveform example 88 98 0 / 88 98 0 / 0 0 0 must give 255 one clock
// after it is applied with the gate enabled. Then random windows, valid flags
// and gate enables are applied one time unit after each rising edge. At the
// next edge the core may only change its outputs if the enable was high:
// with the enable low, out_pixel and out_valid must hold whatever the inputs
// do; with it high they must take min(|Gx| + |Gy|, 255) of the window (when
// valid) and the valid flag. gclk edges are counted against enabled cycles.
module tb_sobel_edge_detection;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  logic    clock = 1'b0;
  logic    reset, enable, in_valid;
  window_t w;
  pixel_t  out_pixel;
  logic    out_saturated, out_valid, gclk, gate_on;
  int      exp_pixel;
  logic    exp_sat, exp_valid;
  int      checks = 0, failures = 0, n_hold = 0, n_load = 0;
  int      gedges = 0, n_enabled = 0;

  sobel_edge_detection dut (
    .clock(clock), .reset(reset), .enable(enable), .in_valid(in_valid),
    .pixel_top_left(w.top_left), .pixel_top(w.top), .pixel_top_right(w.top_right),
    .pixel_left(w.left), .pixel_center(w.center), .pixel_right(w.right),
    .pixel_bottom_left(w.bottom_left), .pixel_bottom(w.bottom),
    .pixel_bottom_right(w.bottom_right),
    .out_pixel(out_pixel), .out_saturated(out_saturated), .out_valid(out_valid),
    .gclk(gclk), .gate_on(gate_on)
  );

  always #5 clock = ~clock;
  always @(posedge gclk) gedges++;

  task automatic step(input window_t win, input logic v, input logic en);
    w = win;
    in_valid = v;
    enable = en;
    if (en) begin
      n_enabled++;
      exp_valid = v;
      if (v) begin
        exp_pixel = ref_pixel(win);
        exp_sat   = ref_sum(win) > 255;
        n_load++;
      end
    end else begin
      n_hold++;
    end
    @(posedge clock);
    #1;
    checks += 4;
    if (out_valid !== exp_valid)      begin failures++; $display("FAIL valid at %0t", $time); end
    if (int'(out_pixel) != exp_pixel) begin failures++; $display("FAIL pixel %0d expected %0d at %0t", out_pixel, exp_pixel, $time); end
    if (out_saturated !== exp_sat)    begin failures++; $display("FAIL saturated at %0t", $time); end
    if (gate_on !== en)               begin failures++; $display("FAIL gate_on at %0t", $time); end
  endtask

  initial begin
    repeat (10000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b0;
    #1 reset = 1'b1;
    enable = 1'b0;
    in_valid = 1'b0;
    w = '0;
    exp_pixel = 0;
    exp_sat = 1'b0;
    exp_valid = 1'b0;
    repeat (2) @(posedge clock);
    #1 reset = 1'b0;
    step('{top_left: 88, top: 98, top_right: 0, left: 88, center: 98, right: 0,
           bottom_left: 0, bottom: 0, bottom_right: 0}, 1'b1, 1'b1);
    checks++;
    if (out_pixel !== 8'd255) failures++;
    for (int i = 0; i < 3000; i++)
      step(rand_window(), ($urandom % 4) != 0, (i % 40 < 20) || ($urandom % 2 == 0));
    checks++;
    if (gedges != n_enabled) begin
      failures++;
      $display("FAIL: %0d gated clock edges for %0d enabled cycles", gedges, n_enabled);
    end
    checks++;
    if (n_hold == 0 || n_load == 0) failures++;
    $display("enabled cycles %0d, gated-off cycles %0d", n_enabled, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
