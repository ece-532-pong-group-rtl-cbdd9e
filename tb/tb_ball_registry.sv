// tb_ball_registry: on a 64x48 screen with a short base period it checks that
// the ball waits in the centre until start, then moves one pixel per step in
// the direction of its velocity with a step interval of
// WAIT * (VMAX + 1 - |v|) + 2 cycles per axis, never lets its centre come
// nearer than RADIUS to an edge, bounces at all four edges, pulses collision
// on top/bottom and the right player's point (with the score) on left/right,
// and takes externally supplied velocities, limited to +/-VMAX.
module tb_ball_registry;
  import pong_pkg::*;
  localparam int H = 64, V = 48, R = 10, W = 4, VM = 3;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic       start, update_vel, point1, point2, collision;
  vel2_t      new_vel, ball_vel;
  point_t     ball_loc, prev_loc;
  logic [7:0] score1, score2;
  int checks = 0, failures = 0;
  int n_top = 0, n_bot = 0, n_left = 0, n_right = 0, n_upd = 0, n_period = 0;
  int s1 = 0, s2 = 0;

  ball_registry #(.H_ACTIVE(H), .V_ACTIVE(V), .RADIUS(R), .WAITCYCLES(W), .VMAX(VM)) dut (
    .clk, .rst, .start, .new_vel, .update_vel, .ball_loc, .ball_vel,
    .score1, .score2, .point1, .point2, .collision);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int absv(input int v);
    return v < 0 ? -v : v;
  endfunction

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // step interval per axis; reset whenever the velocity is replaced
  int last_x = -1, last_y = -1, cyc = 0, upd_cyc = -1000;
  vel2_t vel_prev;
  always @(negedge clk) if (!rst && start) begin
    cyc++;
    // one pixel at most, in the direction of the velocity in force
    check(absv(int'(ball_loc.x) - int'(prev_loc.x)) <= 1 && absv(int'(ball_loc.y) - int'(prev_loc.y)) <= 1,
          "ball jumped");
    if (ball_loc.x != prev_loc.x) begin
      check((int'(ball_loc.x) - int'(prev_loc.x)) == (vel_prev.x > 0 ? 1 : -1), "x step against velocity");
      if (last_x >= 0 && cyc - upd_cyc > 40 && last_x > upd_cyc) begin
        check(cyc - last_x == W * (VM + 1 - absv(int'(ball_vel.x))) + 2,
              $sformatf("x step interval %0d for |v|=%0d", cyc - last_x, absv(int'(ball_vel.x))));
        n_period++;
      end
      last_x = cyc;
    end
    if (ball_loc.y != prev_loc.y) begin
      check((int'(ball_loc.y) - int'(prev_loc.y)) == (vel_prev.y > 0 ? 1 : -1), "y step against velocity");
      if (last_y >= 0 && cyc - upd_cyc > 40 && last_y > upd_cyc)
        check(cyc - last_y == W * (VM + 1 - absv(int'(ball_vel.y))) + 2, "y step interval");
      last_y = cyc;
    end
    check(ball_loc.x >= R && ball_loc.x <= H - 1 - R && ball_loc.y >= R && ball_loc.y <= V - 1 - R,
          $sformatf("ball centre out of bounds (%0d,%0d)", ball_loc.x, ball_loc.y));
    check(absv(int'(ball_vel.x)) <= VM && absv(int'(ball_vel.y)) <= VM, "velocity above VMAX");
    if (collision) begin
      if (ball_loc.y == R) n_top++;
      else if (ball_loc.y == V - 1 - R) n_bot++;
      else check(0, "collision away from top/bottom");
    end
    if (point1) begin
      s1++;
      n_right++;
      check(ball_loc.x == H - 1 - R, "point 1 away from the right edge");
    end
    if (point2) begin
      s2++;
      n_left++;
      check(ball_loc.x == R, "point 2 away from the left edge");
    end
    check(score1 == 8'(s1) && score2 == 8'(s2), "score does not match the points");
    prev_loc = ball_loc;
    vel_prev = ball_vel;
  end

  initial begin
    start = 0; update_vel = 0; new_vel = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (100) @(negedge clk);
    check(ball_loc.x == H / 2 && ball_loc.y == V / 2, "ball not in the centre before start");
    check(ball_vel.x != 0 && ball_vel.y != 0 && absv(int'(ball_vel.x)) <= VM && absv(int'(ball_vel.y)) <= VM,
          "start velocity not in 1..VMAX");
    prev_loc = ball_loc;
    vel_prev = ball_vel;
    start = 1;
    @(negedge clk);
    start = 0;
    // keep start high in the monitor's view
    force start = 1'b1;
    for (int k = 0; k < 60; k++) begin
      vel2_t nv;
      repeat ($urandom_range(1500, 300)) @(negedge clk);
      nv = '{vel_t'($urandom_range(10, 0) - 5), vel_t'($urandom_range(10, 0) - 5)};
      if (nv.x == 0) nv.x = 2;
      if (nv.y == 0) nv.y = -1;
      new_vel = nv;
      update_vel = 1;
      upd_cyc = cyc;
      @(negedge clk);
      update_vel = 0;
      repeat (4) @(negedge clk);
      // the velocity in force is the new one, limited, possibly already reversed at an edge
      check(absv(int'(ball_vel.x)) == (absv(int'(nv.x)) > VM ? VM : absv(int'(nv.x))) &&
            absv(int'(ball_vel.y)) == (absv(int'(nv.y)) > VM ? VM : absv(int'(nv.y))),
            $sformatf("velocity %0d,%0d after update to %0d,%0d", ball_vel.x, ball_vel.y, nv.x, nv.y));
      n_upd++;
    end
    check(n_top > 0 && n_bot > 0 && n_left > 0 && n_right > 0 && n_period > 20,
          $sformatf("coverage top %0d bottom %0d left %0d right %0d periods %0d",
                    n_top, n_bot, n_left, n_right, n_period));
    $display("bounces top %0d bottom %0d, points left %0d right %0d, updates %0d",
             n_top, n_bot, n_left, n_right, n_upd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
