// Self-checking testbench for window_gen.
//
// Two random 7x5 frames are streamed back to back with random idle cycles.
// After every accepted pixel at (r, c) the window must be valid exactly when
// r >= 2 and c >= 2, and then hold rows r-2..r, columns c-2..c of the frame;
// after an idle cycle win_valid must be low. Window and flag appear one clock
// after the accepting edge.
module tb_window_gen;
  import sobel_pkg::*;

  localparam int unsigned W = 7;
  localparam int unsigned H = 5;
  localparam int unsigned FRAMES = 3;

  logic    clk = 1'b0;
  logic    rst, in_valid, win_valid;
  pixel_t  pix_in;
  window_t win, exp_win;
  logic    exp_valid;
  int      checks = 0, failures = 0, n_valid = 0;
  pixel_t  img [FRAMES][H][W];

  window_gen #(.IMG_WIDTH(W), .IMG_HEIGHT(H)) dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .pix_in(pix_in),
    .win(win), .win_valid(win_valid)
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
    int f, r, c;
    foreach (img[i, j, k]) img[i][j][k] = pixel_t'($urandom);
    rst = 1'b0;
    #1 rst = 1'b1;
    in_valid = 1'b0;
    pix_in = '0;
    exp_valid = 1'b0;
    exp_win = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    f = 0; r = 0; c = 0;
    while (f < FRAMES) begin
      @(posedge clk);
      #1;
      checks++;
      if (win_valid !== exp_valid || (exp_valid && win !== exp_win)) begin
        failures++;
        $display("FAIL frame %0d r %0d c %0d: valid=%b win=%h expected %b %h",
                 f, r, c, win_valid, win, exp_valid, exp_win);
      end
      if (win_valid) n_valid++;
      in_valid = ($urandom % 4) != 0;
      if (in_valid) begin
        pix_in = img[f][r][c];
        exp_valid = (r >= 2) && (c >= 2);
        if (exp_valid)
          exp_win = '{img[f][r-2][c-2], img[f][r-2][c-1], img[f][r-2][c],
                      img[f][r-1][c-2], img[f][r-1][c-1], img[f][r-1][c],
                      img[f][r][c-2],   img[f][r][c-1],   img[f][r][c]};
        c++;
        if (c == W) begin c = 0; r++; end
        if (r == H) begin r = 0; f++; end
      end else begin
        exp_valid = 1'b0;
      end
    end
    @(posedge clk);
    #1;
    checks++;
    if (win_valid !== exp_valid || (exp_valid && win !== exp_win)) failures++;
    if (win_valid) n_valid++;
    checks++;
    if (n_valid != FRAMES * (W - 2) * (H - 2)) begin
      failures++;
      $display("FAIL: %0d valid windows, expected %0d", n_valid, FRAMES * (W - 2) * (H - 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
