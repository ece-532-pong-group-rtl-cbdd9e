// line_buffer: one video line of RGB pixels, the "3x BRAM" line buffer of the
// video capture path (one 8-bit BRAM per colour, here kept as one 24-bit wide
// array).
//
// It is a simple dual-port RAM with two clocks: pixels are written in the
// video clock domain (13.5 MHz after 4:2:2 to 4:4:4 conversion) and read in
// the 100 MHz bus clock domain. The read port is synchronous: `rdata` shows
// the word at `raddr` one `rclk` cycle after the address is presented. The
// depth of one 640-pixel line follows the design; the registered read port is
// this design's choice (it maps onto a block RAM).
module line_buffer #(
  parameter int unsigned DEPTH = 640,
  parameter int unsigned WIDTH = 24,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rclk,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk)
    if (we && (waddr < AW'(DEPTH))) mem[waddr] <= wdata;

  always_ff @(posedge rclk)
    rdata <= mem[raddr];

endmodule
