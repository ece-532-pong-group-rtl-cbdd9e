// velocity_calc: velocity of the eight paddle endpoint coordinates (two
// paddles, two endpoints, X and Y).
//
// How it works. After reset the current endpoint locations are remembered and
// all velocities are zero. Every SAMPLE_RATE cycles (wait state, then one
// calculate cycle) each velocity becomes the difference between the new and
// the remembered location, limited to +/-MAX_VEL, and the new locations are
// remembered. A velocity is thus in pixels per sampling period.
//
// Interface: `paddle1`/`paddle2` from the paddle detector; `vel1`/`vel2`
// registered outputs in the same layout; `sample` pulses in each calculate
// cycle. Timing: the reset state is followed directly by a calculation (two
// cycles after reset is released), then one every SAMPLE_RATE + 1 cycles.
//
// From the design: the reset/calculate/wait state machine, the sampling
// parameter and the limit to a maximum velocity. This design's own choices:
// the limit applies to both signs, the default sampling period (10 ms at
// 100 MHz) and the default limit of 3 pixels per period.
module velocity_calc
  import pong_pkg::*;
#(
  parameter int unsigned SAMPLE_RATE = 1_000_000,
  parameter int unsigned MAX_VEL     = 3
) (
  input  logic        clk,
  input  logic        rst,
  input  paddle_t     paddle1,
  input  paddle_t     paddle2,
  output paddle_vel_t vel1,
  output paddle_vel_t vel2,
  output logic        sample
);

  typedef enum logic [1:0] {V_RESET, V_CALC, V_WAIT} vstate_t;
  vstate_t     vstate;
  paddle_t     old1, old2;
  logic [31:0] wait_cnt;

  function automatic vel_t clamp_diff(input coord_t now, input coord_t prev);
    logic signed [COORD_W:0] d;
    d = $signed({1'b0, now}) - $signed({1'b0, prev});
    if (d > $signed((COORD_W+1)'(MAX_VEL)))       return vel_t'(MAX_VEL);
    else if (d < -$signed((COORD_W+1)'(MAX_VEL))) return -vel_t'(MAX_VEL);
    else                                          return vel_t'(d);
  endfunction

  function automatic paddle_vel_t diff(input paddle_t now, input paddle_t prev);
    paddle_vel_t v;
    v.p1.x = clamp_diff(now.p1.x, prev.p1.x);
    v.p1.y = clamp_diff(now.p1.y, prev.p1.y);
    v.p2.x = clamp_diff(now.p2.x, prev.p2.x);
    v.p2.y = clamp_diff(now.p2.y, prev.p2.y);
    return v;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      vstate   <= V_RESET;
      wait_cnt <= '0;
      vel1     <= '0;
      vel2     <= '0;
      old1     <= '0;
      old2     <= '0;
      sample   <= 1'b0;
    end else begin
      sample <= 1'b0;
      unique case (vstate)
        V_RESET: begin
          wait_cnt <= '0;
          vel1     <= '0;
          vel2     <= '0;
          old1     <= paddle1;
          old2     <= paddle2;
          vstate   <= V_CALC;
        end
        V_CALC: begin
          wait_cnt <= '0;
          vel1     <= diff(paddle1, old1);
          vel2     <= diff(paddle2, old2);
          old1     <= paddle1;
          old2     <= paddle2;
          sample   <= 1'b1;
          vstate   <= V_WAIT;
        end
        V_WAIT: begin
          wait_cnt <= wait_cnt + 1;
          if (wait_cnt >= SAMPLE_RATE - 1) vstate <= V_CALC;
        end
        default: vstate <= V_RESET;
      endcase
    end
  end

endmodule
