// Major state machine of the game controller: the game's screens.
// INIT (held during reset) -> WAIT until the capture unit is calibrated ->
// LEVEL, where the player picks the difficulty by where they stand (further
// left = harder, four levels across the 128 columns) and confirms with a
// shot -> GAME until the game state machine reports the health at zero ->
// OVER, until the player walks out of the playing area and back in, which
// starts a new GAME at the same level.
//
// In LEVEL and OVER no game runs, so this machine answers the video output's
// frame requests itself by starting the output machine (`out_start`), which
// then shows the gun and, in the score field, the chosen level (LEVEL) or
// the final score (OVER). `new_game` pulses on entry to GAME and clears the
// game state. States and transitions follow the original state diagram; the
// level mapping and the frame service in LEVEL/OVER are this design's own.
module major_fsm (
  input  logic       clk,
  input  logic       rst,
  input  logic       calibrated,
  input  logic [6:0] position,
  input  logic       present,
  input  logic       shot,          // shoot register
  output logic       shot_clr,
  input  logic       game_done,     // game machine reached END
  input  logic       frame_req,     // synchronized video request
  input  logic       out_busy,
  output logic       out_start,
  output logic       new_game,
  output logic [1:0] level,
  output logic       show_level,
  output logic [2:0] state_o
);
  typedef enum logic [2:0] {INIT, WAIT, LEVEL, GAME, OVER} state_e;
  state_e state;
  logic   present_d, seen_absent;

  assign state_o    = state;
  assign show_level = (state == LEVEL);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= INIT;
      level       <= '0;
      shot_clr    <= 1'b0;
      out_start   <= 1'b0;
      new_game    <= 1'b0;
      present_d   <= 1'b0;
      seen_absent <= 1'b0;
    end else begin
      shot_clr  <= 1'b0;
      out_start <= 1'b0;
      new_game  <= 1'b0;
      present_d <= present;
      unique case (state)
        INIT: state <= WAIT;
        WAIT: if (calibrated) state <= LEVEL;
        LEVEL: begin
          level <= 2'(3 - int'(position[6:5]));
          if (frame_req && !out_busy && !out_start) out_start <= 1'b1;
          if (shot) begin
            shot_clr <= 1'b1;
            new_game <= 1'b1;
            state    <= GAME;
          end
        end
        // the game machine still shows END in the cycle new_game is high
        GAME: if (game_done && !new_game) begin
          seen_absent <= 1'b0;
          state       <= OVER;
        end
        OVER: begin
          if (frame_req && !out_busy && !out_start) out_start <= 1'b1;
          if (!present) seen_absent <= 1'b1;
          if (seen_absent && present && !present_d) begin
            shot_clr <= 1'b1;
            new_game <= 1'b1;
            state    <= GAME;
          end
        end
        default: state <= INIT;
      endcase
    end
  end
endmodule
