// One-row line buffer: delays a pixel stream by DEPTH accepted pixels.
//
// A circular array of DEPTH pixels with a single pointer. In a cycle with
// en high the pixel stored DEPTH accepted pixels ago is presented on dout
// (combinational read at the pointer), din overwrites it, and the pointer
// advances, wrapping at DEPTH. With DEPTH equal to the image width, dout is
// the pixel directly above din in a raster-ordered image. The array is not
// reset: for the first DEPTH pixels after reset dout is meaningless, and the
// window generator marks those windows invalid.
//
// Interface: clk, active-high asynchronous rst (clears the pointer only),
// en, din, dout. dout is valid in the same cycle as din (no added latency).
// Line buffers are part of the original input buffering; their organisation
// (one circular array, combinational read) is this design's own choice.
module line_buffer
  import sobel_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   en,
  input  pixel_t din,
  output pixel_t dout
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  pixel_t           mem [DEPTH];
  logic [PTR_W-1:0] ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                            ptr <= '0;
    else if (en && ptr == PTR_W'(DEPTH - 1)) ptr <= '0;
    else if (en)                        ptr <= ptr + 1'b1;
  end

endmodule
