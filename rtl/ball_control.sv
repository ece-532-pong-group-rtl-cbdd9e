// ball_control: the Ball and Score Control core, the game's physics.
//
// It joins three units: velocity_calc turns the detected paddle endpoints
// into paddle velocities; collision_outcome tests the ball against both
// paddles and, on contact, computes the ball's new velocity; ball_registry
// moves the ball, bounces it off the screen edges and keeps the scores.
//
// Interface: paddle endpoints in, `start` from the processor; ball location
// and scores out (to the processor's GPIO), and the one-cycle sound events for
// the audio logic: `point1`, `point2`, and `collision`, which is raised for a
// ball/paddle contact as well as for a bounce off the top or bottom wall.
// The structure and connections follow the design; merging the paddle and
// wall events into one collision signal is this design's choice (the sound
// description asks for a beep on a ball/paddle collision, the ball registry
// description for a sound on wall collisions).
module ball_control
  import pong_pkg::*;
#(
  parameter int unsigned H_ACTIVE       = 640,
  parameter int unsigned V_ACTIVE       = 480,
  parameter int unsigned RADIUS         = 10,
  parameter int unsigned SAMPLE_RATE    = 1_000_000,
  parameter int unsigned MAX_PADDLE_VEL = 3,
  parameter int unsigned COLL_WAIT      = 100_000,
  parameter int unsigned BALL_WAIT      = 50_000,
  parameter int unsigned VMAX           = 3
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  paddle_t    paddle1,
  input  paddle_t    paddle2,
  output point_t     ball_loc,
  output vel2_t      ball_vel,
  output logic [7:0] score1,
  output logic [7:0] score2,
  output logic       point1,
  output logic       point2,
  output logic       collision,
  output logic       paddle_hit
);

  paddle_vel_t pvel1, pvel2;
  vel2_t       new_vel;
  logic        update_vel, wall_hit, sample, touching;

  velocity_calc #(.SAMPLE_RATE(SAMPLE_RATE), .MAX_VEL(MAX_PADDLE_VEL)) u_vel (
    .clk, .rst, .paddle1, .paddle2, .vel1(pvel1), .vel2(pvel2), .sample
  );

  collision_outcome #(.WAITCYCLES(COLL_WAIT)) u_coll (
    .clk, .rst, .paddle1, .paddle2, .pvel1, .pvel2,
    .ball_loc, .ball_vel, .new_vel, .update_vel, .touching
  );

  ball_registry #(
    .H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE), .RADIUS(RADIUS),
    .WAITCYCLES(BALL_WAIT), .VMAX(VMAX)
  ) u_reg (
    .clk, .rst, .start, .new_vel, .update_vel,
    .ball_loc, .ball_vel, .score1, .score2, .point1, .point2, .collision(wall_hit)
  );

  assign paddle_hit = update_vel;
  assign collision  = wall_hit || update_vel;

endmodule
