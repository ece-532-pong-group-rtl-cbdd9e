// pong_pkg: types and constants shared by the Pong video, paddle-detection,
// ball-physics and audio blocks.
//
// The PLB (Processor Local Bus) master/slave bundles are a reduced form of the
// PLB v4.6 fixed-length burst protocol: the master holds request, direction,
// address and burst length until the slave acknowledges the address, then the
// slave acknowledges each data word (wr_dack / rd_dack) and marks the last one
// with wr_comp / rd_comp. Data words are 32 bits; one pixel is one word.
// The screen geometry (640 x 480) and the ball radius (10) follow the design
// description; the coordinate and velocity widths are this design's choice.
package pong_pkg;

  localparam int unsigned COORD_W = 10;   // paddle coordinates are [9:0]
  localparam int unsigned VEL_W   = 8;    // signed velocity width

  typedef logic [COORD_W-1:0]        coord_t;
  typedef logic signed [VEL_W-1:0]   vel_t;

  // One point on the screen.
  typedef struct packed {
    coord_t x;
    coord_t y;
  } point_t;

  // One paddle: endpoint 1 (End Colour 1) and endpoint 2 (End Colour 2).
  typedef struct packed {
    point_t p1;
    point_t p2;
  } paddle_t;

  // Velocity of one point, per axis.
  typedef struct packed {
    vel_t x;
    vel_t y;
  } vel2_t;

  typedef struct packed {
    vel2_t p1;
    vel2_t p2;
  } paddle_vel_t;

  // Master to slave.
  typedef struct packed {
    logic        request;
    logic        rnw;       // 1 = read, 0 = write
    logic [31:0] addr;      // byte address of the first word
    logic [4:0]  len;       // burst length in words, 1..16
    logic [31:0] wr_data;   // write data, valid during the data phase
  } plb_m2s_t;

  // Slave to master.
  typedef struct packed {
    logic        addr_ack;
    logic        wr_dack;
    logic        wr_comp;
    logic        rd_dack;
    logic        rd_comp;
    logic [31:0] rd_data;
  } plb_s2m_t;

  localparam int unsigned PLB_MAX_BURST = 16;

  // Pixel word in memory: {8'h00, R, G, B}.
  function automatic logic [31:0] pack_rgb(input logic [7:0] r, input logic [7:0] g,
                                           input logic [7:0] b);
    return {8'h00, r, g, b};
  endfunction

endpackage
