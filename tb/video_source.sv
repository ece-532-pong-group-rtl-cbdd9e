// video_source: testbench stand-in for the camera, video decoder and the
// video conversion cores. It produces an endless stream of RGB frames at the
// video clock: each line has H_ACTIVE pixels with the line sync low, then
// H_BLANK clocks with it high; V_ACTIVE active lines are followed by
// V_BLANK blanking lines (line count V_ACTIVE + n). The scene is a grey
// background with, for each paddle, a red pixel at endpoint 1, a green pixel
// at endpoint 2 and white pixels on the straight line between them. The
// endpoints are sampled at the start of every frame; `frame_count` counts
// completed frames.
module video_source
  import pong_pkg::*;
#(
  parameter int H_ACTIVE = 640,
  parameter int V_ACTIVE = 480,
  parameter int H_BLANK  = 218,
  parameter int V_BLANK  = 45
) (
  input  logic        vclk,
  input  logic        run,
  input  paddle_t     scene1,
  input  paddle_t     scene2,
  output logic [23:0] vid_rgb,
  output logic        vid_line,
  output logic [9:0]  vid_line_count,
  output int          frame_count
);

  paddle_t s1, s2;

  function automatic logic on_segment(input point_t a, input point_t b, input int x, input int y);
    int dx1, dy1, dx2, dy2;
    dx1 = int'(b.x) - int'(a.x); dy1 = int'(b.y) - int'(a.y);
    dx2 = x - int'(a.x);         dy2 = y - int'(a.y);
    if (dy2 * dx1 != dy1 * dx2) return 1'b0;
    return ((x >= int'(a.x) && x <= int'(b.x)) || (x <= int'(a.x) && x >= int'(b.x))) &&
           ((y >= int'(a.y) && y <= int'(b.y)) || (y <= int'(a.y) && y >= int'(b.y)));
  endfunction

  function automatic logic [23:0] colour(input int x, input int y);
    if ((x == int'(s1.p1.x) && y == int'(s1.p1.y)) || (x == int'(s2.p1.x) && y == int'(s2.p1.y)))
      return 24'hd02020;
    if ((x == int'(s1.p2.x) && y == int'(s1.p2.y)) || (x == int'(s2.p2.x) && y == int'(s2.p2.y)))
      return 24'h20d020;
    if (on_segment(s1.p1, s1.p2, x, y) || on_segment(s2.p1, s2.p2, x, y))
      return 24'hf0f0f0;
    return 24'h404040;
  endfunction

  initial begin
    vid_rgb = '0;
    vid_line = 1'b1;
    vid_line_count = '0;
    frame_count = 0;
    wait (run);
    forever begin
      s1 = scene1;
      s2 = scene2;
      for (int l = 0; l < V_ACTIVE + V_BLANK; l++)
        for (int c = 0; c < H_ACTIVE + H_BLANK; c++) begin
          @(negedge vclk);
          vid_line_count = 10'(l);
          if (c < H_ACTIVE && l < V_ACTIVE) begin
            vid_line = 1'b0;
            vid_rgb  = colour(c, l);
          end else if (c < H_ACTIVE) begin
            vid_line = 1'b0;
            vid_rgb  = 24'h000000;
          end else begin
            vid_line = 1'b1;
            vid_rgb  = 24'h000000;
          end
        end
      frame_count++;
    end
  end

endmodule
