// audio_tone_fsm: custom logic of the audio core. It turns game events into
// four tone sequences played as square waves.
//
// How it works. An 11-bit counter advances on every `tick`; its bits are
// square waves of halving frequency. A Moore state machine idles in STOP
// (silence) and on an event walks through a fixed list of states, each lasting
// TONE_CYCLES clock cycles and selecting one counter bit for the speaker:
//   collision_occured : tone 1                              (single beep)
//   point_scored      : tone 2, tone 2                      (double beep)
//   start_game        : tone 1, 2, 3, 2, 3                  (5 tones)
//   end_game          : tone 1, 2, 3, 4, 3, 4               (6 tones)
// with tone 1 = counter[10], tone 2 = counter[9], tone 3 = counter[8] and
// tone 4 = counter[7]. Events are only accepted in STOP; if several arrive
// together, end_game wins over start_game over point_scored over
// collision_occured.
//
// Interface: the four one-cycle (or longer) event inputs; `tick` is the
// counter's advance strobe (the codec's frame rate in the system); `speaker`
// is the square wave and `sample` the matching 16-bit signed sample,
// +/-AMPLITUDE, for the codec interface's left channel.
//
// From the design: the four sequences and their tones, the 11-bit counter
// and the bit assignment of each tone, the Moore structure. This design's
// own choices: the event priority, the duration of a tone, the tick and the
// sample amplitude.
module audio_tone_fsm #(
  parameter int unsigned TONE_CYCLES = 10_000_000,
  parameter logic [15:0] AMPLITUDE   = 16'h2000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        tick,
  input  logic        collision_occured,
  input  logic        point_scored,
  input  logic        start_game,
  input  logic        end_game,
  output logic        speaker,
  output logic [15:0] sample,
  output logic        busy
);

  typedef enum logic [4:0] {
    STOP,
    BEEP,
    POINT1, POINT2,
    START1, START2, START3, START4, START5,
    END1, END2, END3, END4, END5, END6
  } tstate_t;

  tstate_t     state;
  logic [10:0] counter;
  logic [31:0] dwell;
  logic [2:0]  tone;           // 0 = silent, else tone number 1..4

  always_ff @(posedge clk) begin
    if (rst)       counter <= '0;
    else if (tick) counter <= counter + 1'b1;
  end

  // next state of a sequence once the current tone has played
  function automatic tstate_t after(input tstate_t s);
    unique case (s)
      POINT1: return POINT2;
      START1: return START2;
      START2: return START3;
      START3: return START4;
      START4: return START5;
      END1:   return END2;
      END2:   return END3;
      END3:   return END4;
      END4:   return END5;
      END5:   return END6;
      default: return STOP;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= STOP;
      dwell <= '0;
    end else if (state == STOP) begin
      dwell <= '0;
      if (end_game)               state <= END1;
      else if (start_game)        state <= START1;
      else if (point_scored)      state <= POINT1;
      else if (collision_occured) state <= BEEP;
    end else if (dwell >= TONE_CYCLES - 1) begin
      dwell <= '0;
      state <= after(state);
    end else begin
      dwell <= dwell + 1;
    end
  end

  always_comb begin
    unique case (state)
      BEEP, START1, END1:                        tone = 3'd1;
      POINT1, POINT2, START2, START4, END2:      tone = 3'd2;
      START3, START5, END3, END5:                tone = 3'd3;
      END4, END6:                                tone = 3'd4;
      default:                                   tone = 3'd0;
    endcase
  end

  always_comb begin
    unique case (tone)
      3'd1:    speaker = counter[10];
      3'd2:    speaker = counter[9];
      3'd3:    speaker = counter[8];
      3'd4:    speaker = counter[7];
      default: speaker = 1'b0;
    endcase
  end

  assign sample = (tone == 3'd0) ? 16'h0000 : (speaker ? AMPLITUDE : -AMPLITUDE);
  assign busy   = (state != STOP);

endmodule
