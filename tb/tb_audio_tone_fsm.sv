// tb_audio_tone_fsm: triggers each of the four game events and compares the
// speaker output cycle by cycle with the expected tone sequence, using its own
// copy of the 11-bit tick counter; checks silence and the idle state after each
// sequence, that events during a sequence are ignored, and the priority of
// simultaneous events.
module tb_audio_tone_fsm;
  localparam int TC = 3000;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        tick, coll, point, startg, endg, speaker, busy;
  logic [15:0] sample;
  logic [10:0] cnt;
  int checks = 0, failures = 0;

  audio_tone_fsm #(.TONE_CYCLES(TC), .AMPLITUDE(16'h1000)) dut (
    .clk, .rst, .tick, .collision_occured(coll), .point_scored(point),
    .start_game(startg), .end_game(endg), .speaker, .sample, .busy);

  // tick on two cycles of three
  int phase;
  always_ff @(posedge clk) begin
    if (rst) begin cnt <= '0; phase <= 0; end
    else begin
      if (tick) cnt <= cnt + 1'b1;
      phase <= (phase == 2) ? 0 : phase + 1;
    end
  end
  assign tick = (phase != 2);

  function automatic logic bitof(input int tone, input logic [10:0] c);
    case (tone)
      1: return c[10];
      2: return c[9];
      3: return c[8];
      4: return c[7];
      default: return 1'b0;
    endcase
  endfunction

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic play(input int ev, input int tones[$], input bit disturb);
    int bad, badsample;
    @(negedge clk);
    coll = (ev == 0); point = (ev == 1); startg = (ev == 2); endg = (ev == 3);
    @(negedge clk);
    coll = 0; point = 0; startg = 0; endg = 0;
    bad = 0; badsample = 0;
    for (int i = 0; i < tones.size(); i++)
      for (int c = 0; c < TC; c++) begin
        if (disturb && c == 100) begin coll = 1; point = 1; startg = 1; end
        if (disturb && c == 101) begin coll = 0; point = 0; startg = 0; end
        if (speaker !== bitof(tones[i], cnt)) bad++;
        if (sample !== (speaker ? 16'h1000 : 16'hf000)) badsample++;
        if (!busy) bad++;
        @(negedge clk);
      end
    checks += 2;
    if (bad != 0) begin failures++; $display("FAIL: event %0d: %0d wrong cycles", ev, bad); end
    if (badsample != 0) begin failures++; $display("FAIL: event %0d: %0d wrong samples", ev, badsample); end
    checks++;
    if (busy || speaker || sample != 0) begin failures++; $display("FAIL: event %0d: not silent after the sequence", ev); end
    repeat (50) @(negedge clk);
  endtask

  initial begin
    coll = 0; point = 0; startg = 0; endg = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (1500) @(negedge clk);
    checks++;
    if (busy || speaker) begin failures++; $display("FAIL: sound without an event"); end
    play(0, '{1}, 0);
    play(1, '{2, 2}, 0);
    play(2, '{1, 2, 3, 2, 3}, 0);
    play(3, '{1, 2, 3, 4, 3, 4}, 1);
    // simultaneous events: end game wins, then start game, then point
    @(negedge clk); coll = 1; point = 1; startg = 1; endg = 1;
    @(negedge clk); coll = 0; point = 0; startg = 0; endg = 0;
    checks++;
    if (speaker !== cnt[10] || !busy) begin failures++; $display("FAIL: priority start"); end
    repeat (TC + 5) @(negedge clk);
    checks++;
    // second tone of end game is tone 2, of start game tone 2 as well; third differs: 3 vs 3, fourth 4 vs 2
    repeat (2 * TC) @(negedge clk);
    if (speaker !== cnt[7]) begin failures++; $display("FAIL: end game did not win"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
