// tb_ball_control: the three physics units together on a 64x48 screen. Two
// vertical paddles at x = 15 and x = 48 cover the whole height: the ball must
// stay between them, each contact must reverse the ball's X direction (a
// stationary paddle, so the "all other cases" rule), and top/bottom bounces
// must sound. Then paddle 1 moves down step by step (non-zero paddle
// velocity) until it leaves the ball's reach, and the ball must score for
// player 2 at the left edge.
module tb_ball_control;
  import pong_pkg::*;
  localparam int H = 64, V = 48, R = 10;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic       start, point1, point2, collision, paddle_hit;
  paddle_t    paddle1, paddle2;
  point_t     ball_loc;
  vel2_t      ball_vel;
  logic [7:0] score1, score2;
  int checks = 0, failures = 0;
  int n_hit = 0, n_wall = 0, n_p2 = 0, n_movvel = 0;
  bit guarded;

  ball_control #(.H_ACTIVE(H), .V_ACTIVE(V), .RADIUS(R), .SAMPLE_RATE(200), .MAX_PADDLE_VEL(3),
                 .COLL_WAIT(30), .BALL_WAIT(8), .VMAX(3)) dut (
    .clk, .rst, .start, .paddle1, .paddle2, .ball_loc, .ball_vel, .score1, .score2,
    .point1, .point2, .collision, .paddle_hit);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  vel2_t vel_before;
  always @(negedge clk) if (!rst) begin
    if (paddle_hit) begin
      n_hit++;
      vel_before = ball_vel;
    end
    if (collision && !paddle_hit) n_wall++;
    if (point2) n_p2++;
    if (dut.u_vel.sample && dut.pvel1.p1.y != 0) n_movvel++;
    if (guarded)
      check(ball_loc.x >= 15 && ball_loc.x <= 48, $sformatf("ball passed a paddle at x=%0d", ball_loc.x));
  end

  // each contact reverses X (and Y) while the paddles stand still
  always @(negedge clk) if (!rst && guarded && dut.u_coll.update_vel) begin
    @(negedge clk);
    repeat (4) @(negedge clk);
    check(ball_vel.x == -vel_before.x, $sformatf("X velocity %0d after contact, before %0d", ball_vel.x, vel_before.x));
  end

  initial begin
    int hits0;
    start = 0; guarded = 0;
    paddle1 = '{p1: '{15, 0}, p2: '{15, 60}};
    paddle2 = '{p1: '{48, 0}, p2: '{48, 60}};
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (300) @(negedge clk);
    check(score1 == 0 && score2 == 0, "scores after reset");
    guarded = 1;
    start = 1;
    @(negedge clk);
    start = 0;
    repeat (60000) @(negedge clk);
    check(n_hit >= 6, $sformatf("only %0d paddle contacts", n_hit));
    check(n_wall >= 2, $sformatf("only %0d wall bounces", n_wall));
    check(score1 == 0 && score2 == 0, "a point was scored behind a paddle");
    guarded = 0;
    // paddle 1 slides down out of reach, 2 pixels per sampling period
    for (int y = 0; y < 40; y += 2) begin
      paddle1 = '{p1: '{15, 10'(y + 40)}, p2: '{15, 10'(y + 60)}};
      repeat (201) @(negedge clk);
    end
    check(n_movvel > 0, "moving paddle produced no velocity");
    repeat (40000) @(negedge clk);
    check(n_p2 > 0 && score2 == 8'(n_p2), $sformatf("player 2 points %0d score %0d", n_p2, score2));
    check(score1 == 0, "player 1 scored");
    $display("paddle contacts %0d, wall bounces %0d, points for player 2 %0d", n_hit, n_wall, n_p2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
