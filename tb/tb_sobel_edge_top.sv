// End-to-end testbench for sobel_edge_top at its default size (256 x 256).
//
// Two synthetic frames are streamed back to back: flat blocks of random grey
// levels with a little noise, so that the image holds flat areas (weak
// responses), block boundaries (responses limited to 255) and mid-range
// values around the threshold. Pixels are offered with random gaps, a few long
// idle stretches and one stretch where the input stops mid-row. Between the
// frames the input sleeps for 100 cycles, during which the gated clock must
// stay off once the last results have drained.
//
// For every interior pixel the testbench computes min(|Gx| + |Gy|, 255) and
// the edge flag from its own copy of the frame and queues it with the clock
// cycle in which it is due. out_valid must deliver the results in raster
// order, each exactly two clocks after the edge that took the pixel
// completing its window (or the count of results is wrong), with no result for
// border pixels.
//
// Mechanisms counted, each of which must occur: cycles with the gated clock
// stopped, clock ticks spent draining the pipeline without new input, results
// limited to 255, edge and non-edge results, a threshold change, and the wrap
// from one frame into the next.
module tb_sobel_edge_top;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  localparam int W = 256;
  localparam int H = 256;
  localparam int FRAMES = 2;

  typedef struct {
    int   due;
    int   pixel;
    logic edge_flag;
  } result_t;

  logic   clk = 1'b0;
  logic   rst, pix_valid, out_edge, out_valid, gate_on;
  pixel_t pix_in, threshold, out_pixel;
  int     checks = 0, failures = 0;
  int     cyc = 0;
  pixel_t img [FRAMES][H][W];
  pixel_t thr_of_frame [FRAMES];
  result_t exp_q[$];

  int n_gated_off = 0, n_drain = 0, n_sat = 0, n_edge = 0, n_flat = 0;
  int n_results = 0, n_thr_change = 0, n_frame_wrap = 0;

  sobel_edge_top dut (
    .clk(clk), .rst(rst), .pix_valid(pix_valid), .pix_in(pix_in),
    .threshold(threshold), .out_pixel(out_pixel), .out_edge(out_edge),
    .out_valid(out_valid), .gate_on(gate_on)
  );

  always #5 clk = ~clk;

  task automatic fail(input string what);
    failures++;
    if (failures < 20) $display("FAIL cycle %0d: %s", cyc, what);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output side: compare every strobe with the head of the expected queue.
  task automatic check_outputs(input logic prev_valid);
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) fail("unexpected result");
      else begin
        result_t e = exp_q.pop_front();
        if (e.due != cyc || int'(out_pixel) != e.pixel || out_edge !== e.edge_flag)
          fail($sformatf("got pixel %0d edge %b, expected %0d %b due in cycle %0d",
                         out_pixel, out_edge, e.pixel, e.edge_flag, e.due));
        n_results++;
      end
    end
    if (exp_q.size() > 0 && exp_q[0].due < cyc) begin
      checks++;
      fail("result missing");
      void'(exp_q.pop_front());
    end
    if (!gate_on) n_gated_off++;
    else if (!prev_valid) n_drain++;
  endtask

  initial begin
    logic    prev_valid;
    window_t w;
    int      awake;
    int      level [8][8];
    // Synthetic frames: 32 x 32 blocks of random level plus noise 0..5.
    for (int f = 0; f < FRAMES; f++) begin
      foreach (level[i, j]) level[i][j] = int'($urandom % 250);
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++)
          img[f][r][c] = pixel_t'(level[r / 32][c / 32] + int'($urandom % 6));
    end
    thr_of_frame[0] = 8'd40;
    thr_of_frame[1] = 8'd128;

    rst = 1'b0;
    #1 rst = 1'b1;
    pix_valid = 1'b0;
    pix_in = '0;
    threshold = thr_of_frame[0];
    prev_valid = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    for (int f = 0; f < FRAMES; f++) begin
      if (threshold != thr_of_frame[f]) begin
        // Sleep between frames: once the last results have drained, the
        // gated clock must stay off. Then change the threshold.
        awake = 0;
        for (int k = 0; k < 100; k++) begin
          @(posedge clk); cyc++; #1;
          check_outputs(prev_valid);
          if (k >= 3 && gate_on) awake++;
          pix_valid = 1'b0;
          prev_valid = 1'b0;
        end
        checks++;
        if (awake != 0) fail($sformatf("gate on in %0d idle cycles", awake));
        threshold = thr_of_frame[f];
        n_thr_change++;
      end
      for (int r = 0; r < H; r++) begin
        for (int c = 0; c < W; c++) begin
          // Idle cycles before this pixel.
          int gap;
          gap = ($urandom % 5 == 0) ? 1 : 0;
          if (r == 10 && c == 100) gap = 20;       // input stops mid-row
          if (c == 0 && r % 64 == 0) gap = 8;      // longer pauses
          for (int g = 0; g < gap; g++) begin
            @(posedge clk); cyc++; #1;
            check_outputs(prev_valid);
            pix_valid = 1'b0;
            prev_valid = 1'b0;
          end
          @(posedge clk); cyc++; #1;
          check_outputs(prev_valid);
          pix_valid = 1'b1;
          pix_in = img[f][r][c];
          prev_valid = 1'b1;
          if (f > 0 && r == 0 && c == 0) n_frame_wrap++;
          if (r >= 2 && c >= 2) begin
            result_t e;
            w = '{img[f][r-2][c-2], img[f][r-2][c-1], img[f][r-2][c],
                  img[f][r-1][c-2], img[f][r-1][c-1], img[f][r-1][c],
                  img[f][r][c-2],   img[f][r][c-1],   img[f][r][c]};
            // Pixel taken at edge cyc+1, result visible after edge cyc+3.
            e.due = cyc + 3;
            e.pixel = ref_pixel(w);
            e.edge_flag = (e.pixel >= int'(thr_of_frame[f]));
            if (ref_sum(w) > 255) n_sat++;
            if (e.edge_flag) n_edge++; else n_flat++;
            exp_q.push_back(e);
          end
        end
      end
    end
    repeat (10) begin
      @(posedge clk); cyc++; #1;
      check_outputs(prev_valid);
      pix_valid = 1'b0;
      prev_valid = 1'b0;
    end

    checks++;
    if (exp_q.size() != 0) fail($sformatf("%0d results never delivered", exp_q.size()));
    checks++;
    if (n_results != FRAMES * (W - 2) * (H - 2)) fail("wrong number of results");
    // Every mechanism must have happened at least once.
    checks += 7;
    if (n_gated_off == 0)  fail("gated clock never stopped");
    if (n_drain == 0)      fail("pipeline never drained without input");
    if (n_sat == 0)        fail("no result limited to 255");
    if (n_edge == 0)       fail("no edge result");
    if (n_flat == 0)       fail("no non-edge result");
    if (n_thr_change == 0) fail("threshold never changed");
    if (n_frame_wrap == 0) fail("no second frame");
    $display("cycles %0d, results %0d, gated-off cycles %0d, drain ticks %0d",
             cyc, n_results, n_gated_off, n_drain);
    $display("limited to 255 %0d, edges %0d, non-edges %0d, threshold changes %0d, frame wraps %0d",
             n_sat, n_edge, n_flat, n_thr_change, n_frame_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
