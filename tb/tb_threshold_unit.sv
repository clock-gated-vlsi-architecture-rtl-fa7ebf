// Self-checking testbench for threshold_unit.
//
// Random magnitudes, thresholds and valid flags are applied one time unit after
// each rising edge; one clock later the registered edge flag must be
// (mag >= threshold), the pixel must be the input magnitude and out_valid the
// input valid. Outputs must hold through invalid cycles. The values equal to
// the threshold and the extremes 0 and 255 are applied on purpose.
module tb_threshold_unit;
  import sobel_pkg::*;

  logic   clk = 1'b0;
  logic   rst, in_valid, out_edge, out_valid;
  pixel_t mag, threshold, out_pixel;
  pixel_t exp_pixel;
  logic   exp_edge, exp_valid;
  int     checks = 0, failures = 0, n_edge = 0, n_flat = 0;

  threshold_unit dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .mag(mag), .threshold(threshold),
    .out_pixel(out_pixel), .out_edge(out_edge), .out_valid(out_valid)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b0;
    #1 rst = 1'b1;
    in_valid = 1'b0;
    mag = '0;
    threshold = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b0 || out_pixel !== '0 || out_edge !== 1'b0) failures++;
    rst = 1'b0;
    exp_pixel = '0;
    exp_edge  = 1'b0;
    exp_valid = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      in_valid  = ($urandom % 4) != 0;
      threshold = pixel_t'($urandom);
      case ($urandom % 4)
        0:       mag = threshold;
        1:       mag = (($urandom % 2) != 0) ? 8'd0 : 8'd255;
        default: mag = pixel_t'($urandom);
      endcase
      if (in_valid) begin
        exp_pixel = mag;
        exp_edge  = (int'(mag) >= int'(threshold));
        if (exp_edge) n_edge++; else n_flat++;
      end
      exp_valid = in_valid;
      @(posedge clk);
      #1;
      checks += 3;
      if (out_valid !== exp_valid) begin failures++; $display("FAIL valid at %0d", i); end
      if (out_pixel !== exp_pixel) begin failures++; $display("FAIL pixel at %0d", i); end
      if (out_edge !== exp_edge)   begin failures++; $display("FAIL edge at %0d", i); end
    end
    checks++;
    if (n_edge == 0 || n_flat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
