// Self-checking testbench for line_buffer.
//
// A DEPTH of 5 keeps the run short. Random pixels are pushed with a random
// enable; whenever at least DEPTH pixels have been pushed, dout must equal the
// pixel pushed DEPTH pushes earlier, whatever idle cycles lay between.
module tb_line_buffer;
  import sobel_pkg::*;

  localparam int unsigned DEPTH = 5;

  logic   clk = 1'b0;
  logic   rst, en;
  pixel_t din, dout;
  int     checks = 0, failures = 0;
  pixel_t hist[$];

  line_buffer #(.DEPTH(DEPTH)) dut (.clk(clk), .rst(rst), .en(en), .din(din), .dout(dout));

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
    en  = 1'b0;
    din = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      en  = ($urandom % 3) != 0;
      din = pixel_t'($urandom);
      #1;
      if (en && hist.size() >= DEPTH) begin
        checks++;
        if (dout !== hist[hist.size() - DEPTH]) begin
          failures++;
          $display("FAIL push %0d: dout=%0d expected %0d", hist.size(), dout,
                   hist[hist.size() - DEPTH]);
        end
      end
      if (en) hist.push_back(din);
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
