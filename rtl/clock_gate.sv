// Flip-flop based clock gate.
//
// The enable is held in a D flip-flop and the flip-flop output is ANDed with
// the clock to form the gated clock: gclk = clk & en_q. While en_q is low the
// gated clock stays at zero, so every register on it keeps its value and does
// not switch (the "sleep" state).
//
// The enable flip-flop is clocked on the falling edge of clk. It therefore
// changes only while clk is low, when the AND output is zero anyway, and the
// gated clock can only rise together with clk and fall together with clk: no
// shortened pulse and no glitch. Sampling the enable on the rising edge, with
// the same AND gate, would let en_q rise while clk is still high and produce a
// late, truncated clock pulse in that cycle; the falling-edge flip-flop is the
// choice made here to keep the gate glitch-free.
//
// Interface and timing:
//   en   sampled at the falling edge of clk; an enable set up after rising
//        edge k (by logic on clk or on gclk) lets gclk pulse at rising edge
//        k+1.
//   en_q the registered enable; high during exactly those clock cycles whose
//        rising edge appears on gclk.
//   rst  asynchronous, active high; clears en_q, so the gated clock is off
//        during and right after reset.
module clock_gate (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic en_q,
  output logic gclk
);

  always_ff @(negedge clk or posedge rst) begin
    if (rst) en_q <= 1'b0;
    else     en_q <= en;
  end

  assign gclk = clk & en_q;

endmodule
