// tb_pong_top: end-to-end run of the whole design on an 80x60 frame with
// short timing parameters. A video source shows two vertical paddles (red top
// end, green bottom end) to the capture core; a two-port memory model stands
// for the memory controller and holds the colour bounds. The test checks that
// frames reach memory, that the detector finds and writes back the paddle
// endpoints, that after the start signal the ball bounces between the paddles
// and off the walls, that a moving paddle yields a (limited) velocity, that
// the ball scores once paddle 1 has moved out of its way, and that the start,
// collision, point and end tunes play. It counts how often each of these
// mechanisms occurred and fails for any that never did.
module tb_pong_top;
  import pong_pkg::*;
  localparam int H = 80, V = 60, SPLIT = 40;
  localparam logic [31:0] BOUNDS_ADDR = 32'h0013_0000, PADDLE_ADDR = 32'h0013_0040;

  logic clk = 0, vclk = 0, rst = 1;
  always #5 clk = ~clk;
  always #37 vclk = ~vclk;

  logic        mpmc_done_init, vid_line, start_game, end_game, audio_tick;
  logic [23:0] vid_rgb;
  logic [9:0]  vid_line_count;
  plb_m2s_t    m2s [2];
  plb_s2m_t    s2m [2];
  paddle_t     paddle1, paddle2, scene1, scene2;
  point_t      ball_loc;
  logic [7:0]  score1, score2;
  logic        audio_speaker, line_done, v2r_overrun, frame_done;
  logic [15:0] audio_sample;
  int          frames;
  logic        run;

  pong_top #(
    .H_ACTIVE(H), .V_ACTIVE(V), .SPLIT_X(SPLIT), .SAMPLE_RATE(60000), .COLL_WAIT(1000),
    .BALL_WAIT(150), .TONE_CYCLES(2000)
  ) dut (
    .clk, .rst, .mpmc_done_init, .vclk, .vid_rgb, .vid_line, .vid_line_count,
    .v2r_plb_o(m2s[0]), .v2r_plb_i(s2m[0]), .pd_plb_o(m2s[1]), .pd_plb_i(s2m[1]),
    .paddle1, .paddle2, .ball_loc, .score1, .score2, .start_game, .end_game,
    .audio_tick, .audio_speaker, .audio_sample, .line_done, .v2r_overrun, .frame_done
  );

  plb_mem_model #(.NPORTS(2), .ACK_MAX(10)) mem_i (.clk, .m2s, .s2m);
  video_source #(.H_ACTIVE(H), .V_ACTIVE(V), .H_BLANK(40), .V_BLANK(4)) vsrc (
    .vclk, .run, .scene1, .scene2, .vid_rgb, .vid_line, .vid_line_count, .frame_count(frames));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // audio strobe every 4 cycles
  int tk = 0;
  always_ff @(posedge clk) tk <= tk + 1;
  assign audio_tick = (tk[1:0] == 2'b00);

  // mechanism counters
  int n_lines = 0, n_frames_pd = 0, n_hit = 0, n_wall = 0, n_p1 = 0, n_p2 = 0;
  int n_vel = 0, n_clamp = 0, n_swap = 0, n_beep = 0, n_ptune = 0, n_stune = 0, n_etune = 0;
  bit guarded = 0;
  always @(negedge clk) if (!rst) begin
    if (line_done) n_lines++;
    if (frame_done) n_frames_pd++;
    if (dut.u_v2r.line_ready) n_swap++;
    if (dut.u_ball.paddle_hit) n_hit++;
    if (dut.u_ball.u_reg.collision) n_wall++;
    if (dut.u_ball.point1) n_p1++;
    if (dut.u_ball.point2) n_p2++;
    if (dut.u_ball.u_vel.sample && dut.u_ball.pvel1.p1.y != 0) n_vel++;
    if (dut.u_ball.u_vel.sample && dut.u_ball.pvel1.p1.y == 3) n_clamp++;
    check(!v2r_overrun, "line buffer overrun");
    if (guarded)
      check(ball_loc.x >= 15 && ball_loc.x <= 64, $sformatf("ball passed a paddle at x=%0d", ball_loc.x));
  end
  // tune starts: state codes BEEP = 1, POINT1 = 2, START1 = 4, END1 = 9 (declaration order)
  int unsigned aud_state;
  assign aud_state = 32'(dut.u_audio.state);
  always @(posedge clk) if (!rst && dut.u_audio.dwell == 0) begin
    if (aud_state == 1) n_beep++;
    if (aud_state == 2) n_ptune++;
    if (aud_state == 4) n_stune++;
    if (aud_state == 9) n_etune++;
  end

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_detect(input int max_cycles);
    int c;
    c = 0;
    while ((paddle1 != scene1 || paddle2 != scene2) && c < max_cycles) begin
      @(negedge clk);
      c++;
    end
    check(paddle1 == scene1 && paddle2 == scene2,
          $sformatf("detected %p %p want %p %p", paddle1, paddle2, scene1, scene2));
  endtask

  initial begin
    logic [7:0] bnd [12];
    int audio_toggles;
    logic last_spk;
    bnd = '{8'd150, 8'd250, 8'd0, 8'd60, 8'd0, 8'd60,
            8'd0, 8'd60, 8'd150, 8'd250, 8'd0, 8'd60};
    for (int i = 0; i < 12; i++) mem_i.mem[(BOUNDS_ADDR >> 2) + i] = {24'h0, bnd[i]};
    mpmc_done_init = 0; start_game = 0; end_game = 0; run = 0;
    scene1 = '{p1: '{15, 3}, p2: '{15, 56}};
    scene2 = '{p1: '{64, 3}, p2: '{64, 56}};
    repeat (10) @(posedge vclk);
    rst = 0;
    repeat (10) @(posedge vclk);
    run = 1;
    repeat (300) @(negedge clk);
    mpmc_done_init = 1;
    // the first frame to memory, then a full detector pass over it
    wait_detect(300000);
    check(mem_i.mem[3 * H + 15] == 32'h00d0_2020 && mem_i.mem[56 * H + 64] == 32'h0020_d020 &&
          mem_i.mem[30 * H + 15] == 32'h00f0_f0f0 && mem_i.mem[30 * H + 30] == 32'h0040_4040,
          "frame pixels in memory");
    @(posedge clk iff frame_done);
    @(negedge clk);
    check(mem_i.mem[(PADDLE_ADDR >> 2) + 0] == 15 && mem_i.mem[(PADDLE_ADDR >> 2) + 1] == 3 &&
          mem_i.mem[(PADDLE_ADDR >> 2) + 3] == 56 && mem_i.mem[(PADDLE_ADDR >> 2) + 4] == 64,
          "paddle coordinates written to memory");
    check(ball_loc.x == H / 2 && ball_loc.y == V / 2, "ball waits in the centre");
    // let the paddle velocities settle: the first sample after reset measures
    // the jump from the reset position to the detected one
    repeat (2 * 60000 + 10) @(negedge clk);
    // start the game
    @(negedge clk); start_game = 1;
    @(negedge clk); start_game = 0;
    guarded = 1;
    repeat (400000) @(negedge clk);
    guarded = 0;
    check(score1 == 0 && score2 == 0, "point scored behind a paddle");
    // paddle 1 slides down out of the ball's reach over a few frames
    for (int k = 1; k <= 4; k++) begin
      int f0;
      scene1 = '{p1: '{15, 10'(3 + 12 * k)}, p2: '{15, 10'(55 + k)}};
      f0 = frames;
      wait (frames >= f0 + 2);
      wait_detect(200000);
    end
    scene1 = '{p1: '{15, 52}, p2: '{15, 58}};
    wait_detect(300000);
    wait (n_p2 > 0);
    repeat (5000) @(negedge clk);
    check(score2 == 8'(n_p2) && score1 == 8'(n_p1), "scores match the points");
    // end the game; the end tune must play once the audio logic is idle
    wait (aud_state == 0);
    @(negedge clk); end_game = 1;
    @(negedge clk); end_game = 0;
    audio_toggles = 0;
    last_spk = audio_speaker;
    repeat (12000) begin
      @(negedge clk);
      if (audio_speaker != last_spk) audio_toggles++;
      last_spk = audio_speaker;
    end
    check(audio_toggles > 4, "no sound at game end");
    // every mechanism must have happened
    check(n_lines >= 2 * V, $sformatf("lines written %0d", n_lines));
    check(n_swap >= 2 * V, $sformatf("line buffer swaps %0d", n_swap));
    check(n_frames_pd >= 3, $sformatf("detector frames %0d", n_frames_pd));
    check(mem_i.bursts_wr > 0 && mem_i.bursts_rd > 0, "bursts");
    check(n_hit >= 3, $sformatf("paddle contacts %0d", n_hit));
    check(n_wall >= 1, $sformatf("wall bounces %0d", n_wall));
    check(n_p2 >= 1, $sformatf("points for player 2: %0d", n_p2));
    check(n_vel >= 1, $sformatf("non-zero paddle velocities %0d", n_vel));
    check(n_clamp >= 1, $sformatf("limited paddle velocities %0d", n_clamp));
    check(n_stune == 1 && n_beep >= 1 && n_ptune >= 1 && n_etune == 1,
          $sformatf("tunes: start %0d beep %0d point %0d end %0d", n_stune, n_beep, n_ptune, n_etune));
    $display("lines %0d swaps %0d detector frames %0d bursts wr %0d rd %0d", n_lines, n_swap, n_frames_pd,
             mem_i.bursts_wr, mem_i.bursts_rd);
    $display("paddle contacts %0d wall bounces %0d points p1 %0d p2 %0d velocities %0d limited %0d",
             n_hit, n_wall, n_p1, n_p2, n_vel, n_clamp);
    $display("tunes: start %0d beep %0d point %0d end %0d", n_stune, n_beep, n_ptune, n_etune);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
