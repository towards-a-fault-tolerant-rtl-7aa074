// line_fifo - one image line of pixel delay (FIFO Buffer 1 / FIFO Buffer 2).
//
// A circular buffer of DEPTH pixels with one pointer: on every push the pixel
// stored DEPTH pushes ago is presented on dout and overwritten by din, then
// the pointer advances. dout is read combinationally from the current
// pointer, so a window register that loads dout on the same push as the
// FIFO loads din sees exactly the pixel one line older than din. Between
// pushes nothing moves, so the stream may have idle cycles.
//
// The storage is an array without reset (a shift-register or LUT memory on
// an FPGA); only the pointer is reset. Its first DEPTH outputs after reset are
// whatever the array held. DEPTH is the line-buffer length, one image row.
// Only the role (a one-line FIFO) is given by the original design; the
// single-pointer circular buffer is the simplest structure that fills it.
module line_fifo
  import star_tracker_pkg::*;
#(
  parameter int unsigned DEPTH = IMG_WIDTH
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   push,
  input  pixel_t din,
  output pixel_t dout
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  pixel_t        mem [DEPTH];
  logic [AW-1:0] ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    if (push) mem[ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    ptr <= '0;
    else if (push) ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
  end
endmodule
