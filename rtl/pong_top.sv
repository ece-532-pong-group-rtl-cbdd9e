// pong_top: the custom hardware of a two-player Pong game played with real
// paddles in front of a camera.
//
// Data flow. The camera's video, already decoded, converted to 4:4:4 and to
// RGB by the video path in front of this block, enters at 13.5 MHz and is
// written line by line into the frame area of DDR memory (video_to_ram, its
// own PLB master). The paddle detector reads the frame back through a second
// PLB master, looks for the two end colours of each paddle and outputs the
// four paddle endpoints. Ball control turns them into paddle velocities,
// moves the ball, detects ball/paddle contacts and wall bounces and keeps the
// score. The audio tone logic plays a beep on a collision, a double beep on a
// point and tunes at game start and game end.
//
// Everything outside the custom cores is a port: the two PLB master ports go
// to the multi-ported memory controller (which also holds the 12 colour
// bounds written by the processor and receives the 8 paddle coordinates), the
// paddle endpoints, ball location and scores go to the processor's GPIO, the
// start/end game signals come from it, and the audio square wave and sample
// go to the AC'97 codec interface, whose frame strobe advances the tone
// counter. A point for either player sounds the point tune (the two point
// signals are ORed).
//
// Clocks: `clk` is the 100 MHz system clock, `vclk` the 13.5 MHz video clock;
// `rst` is synchronous to `clk` and is re-synchronised for the video domain.
module pong_top
  import pong_pkg::*;
#(
  parameter int unsigned H_ACTIVE       = 640,
  parameter int unsigned V_ACTIVE       = 480,
  parameter int unsigned SPLIT_X        = 240,
  parameter logic [31:0] FRAME_BASE     = 32'h0000_0000,
  parameter logic [31:0] BOUNDS_ADDR    = 32'h0013_0000,
  parameter logic [31:0] PADDLE_ADDR    = 32'h0013_0040,
  parameter int unsigned RADIUS         = 10,
  parameter int unsigned SAMPLE_RATE    = 1_000_000,
  parameter int unsigned MAX_PADDLE_VEL = 3,
  parameter int unsigned COLL_WAIT      = 100_000,
  parameter int unsigned BALL_WAIT      = 50_000,
  parameter int unsigned VMAX           = 3,
  parameter int unsigned TONE_CYCLES    = 10_000_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        mpmc_done_init,
  // video in (13.5 MHz domain)
  input  logic        vclk,
  input  logic [23:0] vid_rgb,
  input  logic        vid_line,
  input  logic [9:0]  vid_line_count,
  // PLB master ports to the memory controller
  output plb_m2s_t    v2r_plb_o,
  input  plb_s2m_t    v2r_plb_i,
  output plb_m2s_t    pd_plb_o,
  input  plb_s2m_t    pd_plb_i,
  // processor GPIO
  output paddle_t     paddle1,
  output paddle_t     paddle2,
  output point_t      ball_loc,
  output logic [7:0]  score1,
  output logic [7:0]  score2,
  input  logic        start_game,
  input  logic        end_game,
  // AC'97 codec interface
  input  logic        audio_tick,
  output logic        audio_speaker,
  output logic [15:0] audio_sample,
  // status
  output logic        line_done,
  output logic        v2r_overrun,
  output logic        frame_done
);

  vel2_t ball_vel;
  logic  point1, point2, collision, paddle_hit, audio_busy;

  video_to_ram #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE), .FRAME_BASE(FRAME_BASE)) u_v2r (
    .clk, .rst, .mpmc_done_init, .vclk, .vid_rgb, .vid_line, .vid_line_count,
    .plb_o(v2r_plb_o), .plb_i(v2r_plb_i), .line_done, .overrun(v2r_overrun)
  );

  paddle_detector #(
    .H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE), .SPLIT_X(SPLIT_X),
    .FRAME_BASE(FRAME_BASE), .BOUNDS_ADDR(BOUNDS_ADDR), .PADDLE_ADDR(PADDLE_ADDR)
  ) u_pd (
    .clk, .rst, .mpmc_done_init, .plb_o(pd_plb_o), .plb_i(pd_plb_i),
    .paddle1, .paddle2, .frame_done
  );

  ball_control #(
    .H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE), .RADIUS(RADIUS), .SAMPLE_RATE(SAMPLE_RATE),
    .MAX_PADDLE_VEL(MAX_PADDLE_VEL), .COLL_WAIT(COLL_WAIT), .BALL_WAIT(BALL_WAIT), .VMAX(VMAX)
  ) u_ball (
    .clk, .rst, .start(start_game), .paddle1, .paddle2, .ball_loc, .ball_vel,
    .score1, .score2, .point1, .point2, .collision, .paddle_hit
  );

  audio_tone_fsm #(.TONE_CYCLES(TONE_CYCLES)) u_audio (
    .clk, .rst, .tick(audio_tick),
    .collision_occured(collision),
    .point_scored(point1 || point2),
    .start_game, .end_game,
    .speaker(audio_speaker), .sample(audio_sample), .busy(audio_busy)
  );

endmodule
