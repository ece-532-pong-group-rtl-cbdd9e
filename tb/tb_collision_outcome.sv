// tb_collision_outcome: places paddles along random integer directions and
// puts the ball on a paddle, just beside it, or on the paddle's line beyond
// its end. It checks that a velocity update is issued exactly for the points
// on the paddle, that the new velocity follows the three-case rule per axis
// (worked out here with plain integers), that a ball resting on a paddle
// causes only one update, and that the hold-off of WAITCYCLES is respected.
module tb_collision_outcome;
  import pong_pkg::*;
  localparam int WAIT = 10;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  paddle_t     paddle1, paddle2;
  paddle_vel_t pvel1, pvel2;
  point_t      ball_loc;
  vel2_t       ball_vel, new_vel;
  logic        update_vel, touching;
  int checks = 0, failures = 0, updates = 0;
  int n_hit = 0, n_case1 = 0, n_case2 = 0, n_case3 = 0;

  collision_outcome #(.WAITCYCLES(WAIT)) dut (.clk, .rst, .paddle1, .paddle2, .pvel1, .pvel2,
      .ball_loc, .ball_vel, .new_vel, .update_vel, .touching);

  always_ff @(posedge clk) if (update_vel) updates <= updates + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int rule(input int vb, input int vp);
    if ((vb > 0 && vp > 0) || (vb < 0 && vp < 0)) return vb + vp;
    if ((vb > 0 && vp < 0) || (vb < 0 && vp > 0)) return -vb + vp;
    return -vb;
  endfunction

  function automatic int floor_half(input int s);
    return (s >= 0) ? s / 2 : -((-s + 1) / 2);
  endfunction

  function automatic vel_t rv();
    return vel_t'($urandom_range(6, 0) - 3);
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int u0;
  initial begin
    paddle1 = '{p1: '{5, 5}, p2: '{5, 20}};
    paddle2 = '{p1: '{600, 5}, p2: '{600, 20}};
    pvel1 = '0; pvel2 = '0; ball_vel = '0;
    ball_loc = '{300, 300};
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 600; t++) begin
      int x1, y1, dx, dy, k, j, kind, which, vpx, vpy, want_x, want_y;
      paddle_t p;
      paddle_vel_t pv;
      point_t b;
      bit want_hit;
      // a paddle from (x1,y1) in k steps of (dx,dy)
      dx = $urandom_range(6, 0) - 3;
      dy = $urandom_range(6, 0) - 3;
      if (dx == 0 && dy == 0) dy = 1;
      k  = $urandom_range(12, 3);
      x1 = $urandom_range(500, 60);
      y1 = $urandom_range(400, 60);
      p  = '{p1: '{10'(x1), 10'(y1)}, p2: '{10'(x1 + k * dx), 10'(y1 + k * dy)}};
      kind = $urandom_range(2, 0);
      if (kind == 0) begin
        j = $urandom_range(k, 0);
        b = '{10'(x1 + j * dx), 10'(y1 + j * dy)};
        want_hit = 1;
      end else if (kind == 1) begin
        j = $urandom_range(k, 0);
        // one pixel across the line
        if (dx == 0) b = '{10'(x1 + 1), 10'(y1 + j * dy)};
        else         b = '{10'(x1 + j * dx), 10'(y1 + j * dy + 1)};
        want_hit = 0;
      end else begin
        // on the line but past the second endpoint
        b = '{10'(x1 + (k + 2) * dx), 10'(y1 + (k + 2) * dy)};
        want_hit = 0;
      end
      pv = '{p1: '{rv(), rv()}, p2: '{rv(), rv()}};
      which = $urandom_range(1, 0);
      // the other paddle is parked far away
      if (which == 0) begin
        paddle1 = p; pvel1 = pv; paddle2 = '{p1: '{630, 470}, p2: '{630, 475}}; pvel2 = '0;
      end else begin
        paddle2 = p; pvel2 = pv; paddle1 = '{p1: '{630, 470}, p2: '{630, 475}}; pvel1 = '0;
      end
      ball_vel = '{rv(), rv()};
      // wait out any hold-off, then present the ball
      repeat (WAIT + 4) @(negedge clk);
      u0 = updates;
      ball_loc = b;
      repeat (5) @(negedge clk);
      check((updates - u0) == (want_hit ? 1 : 0),
            $sformatf("trial %0d kind %0d: %0d updates, want hit %0d", t, kind, updates - u0, want_hit));
      if (want_hit) begin
        n_hit++;
        vpx = floor_half(int'(pv.p1.x) + int'(pv.p2.x));
        vpy = floor_half(int'(pv.p1.y) + int'(pv.p2.y));
        want_x = rule(int'(ball_vel.x), vpx);
        want_y = rule(int'(ball_vel.y), vpy);
        if (want_x == -int'(ball_vel.x)) n_case3++;
        else if (want_x == int'(ball_vel.x) + vpx) n_case1++;
        else n_case2++;
        check(new_vel.x == vel_t'(want_x) && new_vel.y == vel_t'(want_y),
              $sformatf("trial %0d new vel %0d,%0d want %0d,%0d", t, new_vel.x, new_vel.y, want_x, want_y));
        // resting on the paddle: no second update
        repeat (3 * WAIT) @(negedge clk);
        check(updates - u0 == 1, "ball resting on the paddle updated twice");
      end
      ball_loc = '{300, 300};
      if (paddle1.p1.x == 10'd300 || paddle2.p1.x == 10'd300) ball_loc = '{2, 470};
    end
    // hold-off: a second contact right after the first one is ignored
    paddle1 = '{p1: '{100, 100}, p2: '{100, 200}}; pvel1 = '0;
    paddle2 = '{p1: '{630, 470}, p2: '{630, 475}};
    ball_vel = '{2, 1};
    repeat (WAIT + 4) @(negedge clk);
    u0 = updates;
    ball_loc = '{100, 150};
    @(negedge clk); @(negedge clk);
    ball_loc = '{300, 300};
    repeat (2) @(negedge clk);
    ball_loc = '{100, 160};
    repeat (WAIT / 2) @(negedge clk);
    check(updates - u0 == 1, "contact during the hold-off was counted");
    repeat (WAIT) @(negedge clk);
    check(updates - u0 == 2, "contact after the hold-off was missed");
    check(n_hit > 50 && n_case1 > 5 && n_case2 > 5 && n_case3 > 5,
          $sformatf("coverage hits %0d cases %0d/%0d/%0d", n_hit, n_case1, n_case2, n_case3));
    $display("hits %0d, x-axis cases same/opposite/other %0d/%0d/%0d", n_hit, n_case1, n_case2, n_case3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
