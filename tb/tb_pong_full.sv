// tb_pong_full: one complete operation of the design at its default size
// (640x480 frame, 858-clock lines at 13.5 MHz, 100 MHz system clock, default
// timing parameters): a full video frame showing two paddles is captured into
// memory, the detector scans the whole frame and finds the four endpoints and
// writes them back, then the game is started: the start tune must begin and
// the ball must take its first steps away from the centre.
module tb_pong_full;
  import pong_pkg::*;
  localparam int H = 640, V = 480;
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

  pong_top dut (
    .clk, .rst, .mpmc_done_init, .vclk, .vid_rgb, .vid_line, .vid_line_count,
    .v2r_plb_o(m2s[0]), .v2r_plb_i(s2m[0]), .pd_plb_o(m2s[1]), .pd_plb_i(s2m[1]),
    .paddle1, .paddle2, .ball_loc, .score1, .score2, .start_game, .end_game,
    .audio_tick, .audio_speaker, .audio_sample, .line_done, .v2r_overrun, .frame_done
  );

  plb_mem_model #(.NPORTS(2), .ACK_MAX(10)) mem_i (.clk, .m2s, .s2m);
  video_source #(.H_ACTIVE(H), .V_ACTIVE(V), .H_BLANK(218), .V_BLANK(45)) vsrc (
    .vclk, .run, .scene1, .scene2, .vid_rgb, .vid_line, .vid_line_count, .frame_count(frames));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // AC'97 frame strobe: 48 kHz at 100 MHz, about every 2083 cycles
  int tk = 0;
  always_ff @(posedge clk) tk <= (tk == 2082) ? 0 : tk + 1;
  assign audio_tick = (tk == 0);

  int n_lines = 0, n_pd = 0;
  always @(negedge clk) if (!rst) begin
    if (line_done) n_lines++;
    if (frame_done) n_pd++;
    if (v2r_overrun) begin failures++; $display("FAIL: overrun"); end
  end

  initial begin : watchdog
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] bnd [12];
    int c, pd0;
    bnd = '{8'd150, 8'd250, 8'd0, 8'd60, 8'd0, 8'd60,
            8'd0, 8'd60, 8'd150, 8'd250, 8'd0, 8'd60};
    for (int i = 0; i < 12; i++) mem_i.mem[(BOUNDS_ADDR >> 2) + i] = {24'h0, bnd[i]};
    mpmc_done_init = 0; start_game = 0; end_game = 0; run = 0;
    scene1 = '{p1: '{200, 100}, p2: '{180, 380}};
    scene2 = '{p1: '{450, 90}, p2: '{470, 400}};
    repeat (10) @(posedge vclk);
    rst = 0;
    repeat (10) @(posedge vclk);
    run = 1;
    repeat (300) @(negedge clk);
    mpmc_done_init = 1;
    // one whole frame into memory
    wait (frames >= 1);
    check(n_lines == V, $sformatf("%0d lines written in the first frame", n_lines));
    check(mem_i.mem[100 * H + 200] == 32'h00d0_2020 && mem_i.mem[400 * H + 470] == 32'h0020_d020 &&
          mem_i.mem[240 * H + 320] == 32'h0040_4040, "frame pixels in memory");
    // one full detector pass that starts after the frame is complete
    pd0 = n_pd;
    wait (n_pd >= pd0 + 2);
    @(negedge clk);
    check(paddle1 == scene1 && paddle2 == scene2,
          $sformatf("detected %p %p want %p %p", paddle1, paddle2, scene1, scene2));
    check(mem_i.mem[(PADDLE_ADDR >> 2) + 0] == 200 && mem_i.mem[(PADDLE_ADDR >> 2) + 3] == 380 &&
          mem_i.mem[(PADDLE_ADDR >> 2) + 4] == 450 && mem_i.mem[(PADDLE_ADDR >> 2) + 7] == 400,
          "paddle coordinates written to memory");
    check(ball_loc.x == H / 2 && ball_loc.y == V / 2, "ball waits in the centre");
    @(negedge clk); start_game = 1;
    @(negedge clk); start_game = 0;
    c = 0;
    while ((ball_loc.x == H / 2 || ball_loc.y == V / 2) && c < 400000) begin
      @(negedge clk);
      c++;
    end
    check(ball_loc.x != H / 2 && ball_loc.y != V / 2, "ball did not move after start");
    check(dut.u_audio.busy, "start tune not playing");
    $display("frame captured in %0d lines, ball at (%0d,%0d) after %0d cycles", n_lines, ball_loc.x, ball_loc.y, c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
