// tb_velocity_calc: moves the eight paddle coordinates by random steps of up
// to +/-6 pixels between samples and checks every sampled velocity against the
// clamped difference, and the sampling period.
module tb_velocity_calc;
  import pong_pkg::*;
  localparam int SR = 20, MV = 3;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  paddle_t     paddle1, paddle2, old1, old2;
  paddle_vel_t vel1, vel2;
  logic        sample;
  int checks = 0, failures = 0;

  velocity_calc #(.SAMPLE_RATE(SR), .MAX_VEL(MV)) dut (.clk, .rst, .paddle1, .paddle2, .vel1, .vel2, .sample);

  function automatic int clampi(input int d);
    return d > MV ? MV : (d < -MV ? -MV : d);
  endfunction

  function automatic bit match(input paddle_vel_t v, input paddle_t n, input paddle_t o);
    return v.p1.x == vel_t'(clampi(int'(n.p1.x) - int'(o.p1.x))) &&
           v.p1.y == vel_t'(clampi(int'(n.p1.y) - int'(o.p1.y))) &&
           v.p2.x == vel_t'(clampi(int'(n.p2.x) - int'(o.p2.x))) &&
           v.p2.y == vel_t'(clampi(int'(n.p2.y) - int'(o.p2.y)));
  endfunction

  function automatic coord_t step(input coord_t c);
    int v;
    v = int'(c) + $urandom_range(12, 0) - 6;
    if (v < 0) v = 0;
    if (v > 639) v = 639;
    return coord_t'(v);
  endfunction

  function automatic paddle_t move(input paddle_t p);
    paddle_t q;
    q.p1.x = step(p.p1.x); q.p1.y = step(p.p1.y);
    q.p2.x = step(p.p2.x); q.p2.y = step(p.p2.y);
    return q;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last, cyc, nclamp;
    paddle1 = '{p1: '{100, 50}, p2: '{110, 200}};
    paddle2 = '{p1: '{500, 60}, p2: '{520, 300}};
    old1 = paddle1; old2 = paddle2;
    repeat (3) @(posedge clk);
    rst = 0;
    cyc = 0; last = -1; nclamp = 0;
    @(negedge clk);
    checks++;
    if (vel1 != '0 || vel2 != '0) begin failures++; $display("FAIL: velocity not zero after reset"); end
    for (int n = 0; n < 300; ) begin
      @(negedge clk);
      cyc++;
      if (sample) begin
        checks += 2;
        if (!match(vel1, paddle1, old1)) begin failures++; $display("FAIL: vel1 %p", vel1); end
        if (!match(vel2, paddle2, old2)) begin failures++; $display("FAIL: vel2 %p", vel2); end
        if (vel1.p1.x == MV || vel1.p1.x == -MV) nclamp++;
        if (last >= 0) begin
          checks++;
          if (cyc - last != SR + 1) begin failures++; $display("FAIL: period %0d", cyc - last); end
        end else begin
          checks++;
          if (cyc > 2) begin failures++; $display("FAIL: first sample after %0d", cyc); end
        end
        last = cyc;
        old1 = paddle1; old2 = paddle2;
        paddle1 = move(paddle1);
        paddle2 = move(paddle2);
        n++;
      end
    end
    checks++;
    if (nclamp == 0) begin failures++; $display("FAIL: limit never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
