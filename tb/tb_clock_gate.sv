// Self-checking testbench for clock_gate.
//
// A random enable is applied one time unit after each rising clock edge. The
// testbench counts rising edges of the gated clock and checks that
//   - an enable applied after rising edge k gives exactly one gclk edge at
//     rising edge k+1, and none when it is low;
//   - every gclk rising edge coincides with a clk rising edge (no shortened
//     or late pulse) and gclk is low whenever clk is low;
//   - en_q follows the enable and reset holds the gated clock off.
module tb_clock_gate;

  logic clk = 1'b0;
  logic rst, en, en_q, gclk;
  int   checks = 0, failures = 0;
  int   gedges = 0, bad_edges = 0;
  int   last_edges;
  logic exp_tick;

  clock_gate dut (.clk(clk), .rst(rst), .en(en), .en_q(en_q), .gclk(gclk));

  always #5 clk = ~clk;

  // Rising clk edges fall on times 5, 15, 25, ...
  always @(posedge gclk) begin
    gedges++;
    if ($time % 10 != 5) bad_edges++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b0;
    #1 rst = 1'b1;
    en  = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    check(gedges == 0, "gated clock runs during reset");
    check(en_q == 1'b0, "en_q not cleared by reset");
    rst = 1'b0;
    en  = 1'b0;
    exp_tick   = 1'b0;
    last_edges = gedges;
    for (int i = 0; i < 1000; i++) begin
      @(posedge clk);
      #1;
      check((gedges - last_edges) == int'(exp_tick), "gclk edge count at this clk edge");
      check(gclk == exp_tick, "gclk level in the high phase");
      check(en_q == exp_tick, "en_q does not hold the sampled enable");
      last_edges = gedges;
      // Mostly long runs, with some single-cycle toggles.
      en       = (i % 50 < 25) ? 1'b1 : (i % 50 < 40) ? 1'b0 : 1'($urandom);
      exp_tick = en;
      #5;
      check(gclk == 1'b0, "gclk high while clk is low");
    end
    check(bad_edges == 0, "gclk edge away from a clk rising edge");
    $display("gated clock edges: %0d of 1000 cycles", gedges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
