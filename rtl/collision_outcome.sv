// collision_outcome: detects when the ball meets a paddle and computes the
// ball's new velocity.
//
// How it works. For each paddle, with endpoints (X1,Y1) and (X2,Y2) and the
// ball centre (X3,Y3), the ball intersects the paddle when
//   1. it lies inside the box spanned by the two endpoints, and
//   2. it lies on the paddle's line, tested without a divider as
//      (Y3-Y1)*(X2-X1) == (Y2-Y1)*(X3-X1).
// Paddle 1 is tested first. On an intersection the new velocity is computed
// for X and Y independently from the ball velocity vb and the paddle
// velocity vp (the mean of the paddle's two endpoint velocities):
//   vb and vp both positive or both negative:  vb + vp
//   vb and vp of opposite sign:                -vb + vp
//   otherwise (either is zero):                -vb
// The result saturates at the range of the velocity type.
//
// State machine: check intersection -> update velocity (one cycle,
// `update_vel` high, `new_vel` loaded) -> wait until the intersection drops
// -> wait WAITCYCLES cycles -> check again. The waits keep a single contact
// from being counted twice.
//
// From the design: both intersection conditions and the cross-multiplied
// slope test, the three velocity cases and the state machine. This design's
// own choices: the box test includes its edges (a strict test could never
// match a perfectly vertical or horizontal paddle), the paddle velocity is the
// endpoint mean, `update_vel` is a one-cycle pulse, and the default
// WAITCYCLES.
module collision_outcome
  import pong_pkg::*;
#(
  parameter int unsigned WAITCYCLES = 100_000
) (
  input  logic        clk,
  input  logic        rst,
  input  paddle_t     paddle1,
  input  paddle_t     paddle2,
  input  paddle_vel_t pvel1,
  input  paddle_vel_t pvel2,
  input  point_t      ball_loc,
  input  vel2_t       ball_vel,
  output vel2_t       new_vel,
  output logic        update_vel,
  output logic        touching
);

  localparam int unsigned SW = COORD_W + 1;       // signed difference width
  typedef logic signed [SW-1:0]   sdiff_t;
  typedef logic signed [2*SW-1:0] sprod_t;

  function automatic logic between(input coord_t v, input coord_t a, input coord_t b);
    return ((a <= v) && (v <= b)) || ((b <= v) && (v <= a));
  endfunction

  function automatic logic hits(input paddle_t p, input point_t b);
    sdiff_t dx21, dy21, dx31, dy31;
    sprod_t lhs, rhs;
    dx21 = $signed({1'b0, p.p2.x}) - $signed({1'b0, p.p1.x});
    dy21 = $signed({1'b0, p.p2.y}) - $signed({1'b0, p.p1.y});
    dx31 = $signed({1'b0, b.x})    - $signed({1'b0, p.p1.x});
    dy31 = $signed({1'b0, b.y})    - $signed({1'b0, p.p1.y});
    lhs  = dy31 * dx21;
    rhs  = dy21 * dx31;
    return between(b.x, p.p1.x, p.p2.x) && between(b.y, p.p1.y, p.p2.y) && (lhs == rhs);
  endfunction

  function automatic vel_t sat(input logic signed [VEL_W+1:0] v);
    if (v > $signed((VEL_W+2)'(2**(VEL_W-1) - 1)))   return vel_t'(2**(VEL_W-1) - 1);
    else if (v < -$signed((VEL_W+2)'(2**(VEL_W-1) - 1))) return -vel_t'(2**(VEL_W-1) - 1);
    else                                             return vel_t'(v);
  endfunction

  function automatic vel_t outcome(input vel_t vb, input vel_t vp);
    logic signed [VEL_W+1:0] b, p;
    b = (VEL_W+2)'(vb);
    p = (VEL_W+2)'(vp);
    if ((vb > 0 && vp > 0) || (vb < 0 && vp < 0)) return sat(b + p);
    else if ((vb > 0 && vp < 0) || (vb < 0 && vp > 0)) return sat(-b + p);
    else return sat(-b);
  endfunction

  function automatic vel_t mean(input vel_t a, input vel_t b);
    logic signed [VEL_W:0] s;
    s = (VEL_W+1)'(a) + (VEL_W+1)'(b);
    return vel_t'(s >>> 1);
  endfunction

  logic hit1, hit2;
  vel2_t pv;
  assign hit1      = hits(paddle1, ball_loc);
  assign hit2      = hits(paddle2, ball_loc);
  assign touching = hit1 || hit2;
  always_comb begin
    if (hit1) begin
      pv.x = mean(pvel1.p1.x, pvel1.p2.x);
      pv.y = mean(pvel1.p1.y, pvel1.p2.y);
    end else begin
      pv.x = mean(pvel2.p1.x, pvel2.p2.x);
      pv.y = mean(pvel2.p1.y, pvel2.p2.y);
    end
  end

  typedef enum logic [2:0] {C_RESET, C_CHECK, C_UPDATE, C_DROP, C_WAIT} cstate_t;
  cstate_t     cstate;
  logic [31:0] wait_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cstate     <= C_RESET;
      wait_cnt   <= '0;
      new_vel    <= '0;
      update_vel <= 1'b0;
    end else begin
      update_vel <= 1'b0;
      unique case (cstate)
        C_RESET: begin
          wait_cnt <= '0;
          new_vel  <= '0;
          cstate   <= C_CHECK;
        end
        C_CHECK: begin
          wait_cnt <= '0;
          if (touching) begin
            new_vel.x  <= outcome(ball_vel.x, pv.x);
            new_vel.y  <= outcome(ball_vel.y, pv.y);
            update_vel <= 1'b1;
            cstate     <= C_UPDATE;
          end
        end
        C_UPDATE:
          cstate <= C_DROP;
        C_DROP:
          if (!touching) cstate <= C_WAIT;
        C_WAIT: begin
          wait_cnt <= wait_cnt + 1;
          if (wait_cnt >= WAITCYCLES - 1) cstate <= C_CHECK;
        end
        default: cstate <= C_RESET;
      endcase
    end
  end

endmodule
