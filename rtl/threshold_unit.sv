// Threshold and output register stage.
//
// The edge strength is compared with a programmable threshold: a pixel whose
// strength is at or above the threshold is an edge (1), any weaker response is
// treated as noise (0). The binary edge flag and the edge strength are
// registered together, so the stage gives both the binary edge map and the
// grey-level edge image.
//
// Interface and timing: in_valid qualifies mag; threshold may change at any
// time and is used at the next rising edge. out_edge, out_pixel and out_valid
// are registered, one clock after the input. rst is asynchronous, active high.
// The programmable threshold and the binary edge map follow the original
// design; comparing the 8-bit limited strength with >= is this design's choice.
module threshold_unit
  import sobel_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  pixel_t mag,
  input  pixel_t threshold,
  output pixel_t out_pixel,
  output logic   out_edge,
  output logic   out_valid
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      out_pixel <= '0;
      out_edge  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_pixel <= mag;
        out_edge  <= (mag >= threshold);
      end
    end
  end

endmodule
