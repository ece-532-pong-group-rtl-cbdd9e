// ball_registry: ball location, ball velocity and the two players' scores.
//
// How it works. After reset the ball sits in the centre of the screen with a
// random velocity (each axis 1..VMAX pixels per period, random sign, taken
// from a free-running LFSR) and waits for the start signal. Then each axis
// runs its own copy of the update loop, with its own wait counter:
//   normal update  - move the centre one pixel in the direction of the
//                    velocity (not at all for a zero velocity);
//   detect edge    - if the centre is within RADIUS of an edge and moving
//                    outwards, reverse that axis; on the top/bottom edges
//                    this pulses `collision` (a wall sound), on the left/right
//                    edges it pulses the opposing player's `point` and
//                    increments that player's score;
//   wait           - count to the period of the axis velocity,
//                    WAITCYCLES * (VMAX + 1 - |v|), so a faster ball takes
//                    more frequent one-pixel steps;
//   update velocity- entered from normal update or wait when the collision
//                    logic has delivered a new velocity: the axis takes it,
//                    limited to +/-VMAX, and returns to waiting.
// The update request from the collision logic is a one-cycle pulse; each axis
// keeps it pending until it reaches a state that accepts it.
//
// Interface: `start` from the processor; `new_vel`/`update_vel` from the
// collision logic; `ball_loc`, `ball_vel`, `score1`, `score2`, and one-cycle
// `point1`, `point2` and `collision` pulses. Player 1 defends the left edge.
//
// From the design: the state sequence, moving one pixel per velocity-
// dependent period with separate counters per axis, the ball radius of 10,
// bouncing at all four edges, points and scores on the left/right edges and
// the sound on walls, start from the centre with a random velocity. This
// design's own choices: the period formula, VMAX = 3, WAITCYCLES, the LFSR,
// the score width, and which player scores on which edge.
module ball_registry
  import pong_pkg::*;
#(
  parameter int unsigned H_ACTIVE   = 640,
  parameter int unsigned V_ACTIVE   = 480,
  parameter int unsigned RADIUS     = 10,
  parameter int unsigned WAITCYCLES = 50_000,
  parameter int unsigned VMAX       = 3
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  vel2_t      new_vel,
  input  logic       update_vel,
  output point_t     ball_loc,
  output vel2_t      ball_vel,
  output logic [7:0] score1,
  output logic [7:0] score2,
  output logic       point1,
  output logic       point2,
  output logic       collision
);

  typedef enum logic [2:0] {A_NORMAL, A_DETECT, A_WAIT, A_UPDVEL} astate_t;

  logic        running;
  logic [15:0] lfsr;
  astate_t     st [2];              // [0] = X axis, [1] = Y axis
  logic [31:0] cnt [2];
  logic        pend [2];
  vel_t        pend_vel [2];
  logic        edge_lo [2], edge_hi [2];
  logic [31:0] period [2];

  function automatic vel_t limit(input vel_t v);
    if (v > vel_t'(VMAX))       return vel_t'(VMAX);
    else if (v < -vel_t'(VMAX)) return -vel_t'(VMAX);
    else                        return v;
  endfunction

  function automatic logic [31:0] axis_period(input vel_t v);
    int unsigned mag;
    mag = (v < 0) ? int'(-32'(v)) : int'(v);
    if (mag > VMAX) mag = VMAX;
    return 32'(WAITCYCLES * (VMAX + 1 - mag));
  endfunction

  function automatic vel_t rand_vel(input logic [2:0] r);
    logic [1:0] m;
    m = (r[1:0] == 2'd0) ? 2'd1 : r[1:0];
    if (int'(m) > VMAX) m = 2'(VMAX);
    return r[2] ? -vel_t'(m) : vel_t'(m);
  endfunction

  assign edge_lo[0] = ball_loc.x <= COORD_W'(RADIUS);
  assign edge_hi[0] = ball_loc.x >= COORD_W'(H_ACTIVE - 1 - RADIUS);
  assign edge_lo[1] = ball_loc.y <= COORD_W'(RADIUS);
  assign edge_hi[1] = ball_loc.y >= COORD_W'(V_ACTIVE - 1 - RADIUS);
  assign period[0]  = axis_period(ball_vel.x);
  assign period[1]  = axis_period(ball_vel.y);

  // 16-bit maximal-length LFSR, x^16 + x^14 + x^13 + x^11 + 1
  always_ff @(posedge clk) begin
    if (rst) lfsr <= 16'hACE1;
    else     lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      running   <= 1'b0;
      ball_loc  <= '{x: COORD_W'(H_ACTIVE / 2), y: COORD_W'(V_ACTIVE / 2)};
      ball_vel  <= '0;
      score1    <= '0;
      score2    <= '0;
      point1    <= 1'b0;
      point2    <= 1'b0;
      collision <= 1'b0;
      for (int a = 0; a < 2; a++) begin
        st[a]       <= A_NORMAL;
        cnt[a]      <= '0;
        pend[a]     <= 1'b0;
        pend_vel[a] <= '0;
      end
    end else begin
      point1    <= 1'b0;
      point2    <= 1'b0;
      collision <= 1'b0;
      if (!running) begin
        // wait for start: the ball stays in the centre
        ball_loc <= '{x: COORD_W'(H_ACTIVE / 2), y: COORD_W'(V_ACTIVE / 2)};
        ball_vel <= '{x: rand_vel(lfsr[2:0]), y: rand_vel(lfsr[6:4])};
        if (start) running <= 1'b1;
      end else begin
        if (update_vel) begin
          pend[0] <= 1'b1;  pend_vel[0] <= new_vel.x;
          pend[1] <= 1'b1;  pend_vel[1] <= new_vel.y;
        end
        // X axis
        unique case (st[0])
          A_NORMAL:
            if (pend[0]) st[0] <= A_UPDVEL;
            else begin
              cnt[0] <= '0;
              if (ball_vel.x > 0)      ball_loc.x <= ball_loc.x + 1'b1;
              else if (ball_vel.x < 0) ball_loc.x <= ball_loc.x - 1'b1;
              st[0] <= A_DETECT;
            end
          A_DETECT: begin
            if (edge_lo[0] && ball_vel.x < 0) begin
              ball_vel.x <= -ball_vel.x;
              point2     <= 1'b1;
              score2     <= score2 + 1'b1;
            end else if (edge_hi[0] && ball_vel.x > 0) begin
              ball_vel.x <= -ball_vel.x;
              point1     <= 1'b1;
              score1     <= score1 + 1'b1;
            end
            st[0] <= A_WAIT;
          end
          A_WAIT:
            if (pend[0]) st[0] <= A_UPDVEL;
            else begin
              cnt[0] <= cnt[0] + 1;
              if (cnt[0] >= period[0] - 1) st[0] <= A_NORMAL;
            end
          A_UPDVEL: begin
            ball_vel.x <= limit(pend_vel[0]);
            pend[0]    <= update_vel;
            st[0]      <= A_WAIT;
          end
          default: st[0] <= A_NORMAL;
        endcase
        // Y axis
        unique case (st[1])
          A_NORMAL:
            if (pend[1]) st[1] <= A_UPDVEL;
            else begin
              cnt[1] <= '0;
              if (ball_vel.y > 0)      ball_loc.y <= ball_loc.y + 1'b1;
              else if (ball_vel.y < 0) ball_loc.y <= ball_loc.y - 1'b1;
              st[1] <= A_DETECT;
            end
          A_DETECT: begin
            if ((edge_lo[1] && ball_vel.y < 0) || (edge_hi[1] && ball_vel.y > 0)) begin
              ball_vel.y <= -ball_vel.y;
              collision  <= 1'b1;
            end
            st[1] <= A_WAIT;
          end
          A_WAIT:
            if (pend[1]) st[1] <= A_UPDVEL;
            else begin
              cnt[1] <= cnt[1] + 1;
              if (cnt[1] >= period[1] - 1) st[1] <= A_NORMAL;
            end
          A_UPDVEL: begin
            ball_vel.y <= limit(pend_vel[1]);
            pend[1]    <= update_vel;
            st[1]      <= A_WAIT;
          end
          default: st[1] <= A_NORMAL;
        endcase
      end
    end
  end

endmodule
