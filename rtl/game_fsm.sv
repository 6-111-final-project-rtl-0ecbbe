// Game state machine of the game controller: one pass per video frame.
// INIT (reset or new game: health set to START_HEALTH) -> IDLE until `start`
// -> WAIT for the video output's frame request -> OUTPUT (output machine
// sends all sprites) -> UPDATE (update machine creates, moves and removes
// sprites) -> CHECK (check machine finds collisions and ground hits and adds
// up the damage) -> HEALTH, which subtracts the damage and goes back to WAIT,
// or to END when the health is used up. Each minor machine is started with a
// one-clock pulse and answers with a one-clock `done`.
// States and transitions follow the original state diagram; the starting
// health of 10 and the saturating subtraction are this design's choices.
module game_fsm #(
  parameter int START_HEALTH = 10
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       new_game,
  input  logic       start,
  input  logic       frame_req,
  output logic       out_start,
  input  logic       out_done,
  output logic       upd_start,
  input  logic       upd_done,
  output logic       chk_start,
  input  logic       chk_done,
  input  logic [6:0] damage,
  output logic [7:0] health,
  output logic       game_over,
  output logic [2:0] state_o
);
  typedef enum logic [2:0] {INIT, IDLE, WAIT, OUTPUT, UPDATE, CHECK, HEALTH, END} state_e;
  state_e state;

  assign state_o   = state;
  assign game_over = (state == END);

  always_ff @(posedge clk) begin
    if (rst || new_game) begin
      state     <= INIT;
      health    <= 8'(START_HEALTH);
      out_start <= 1'b0;
      upd_start <= 1'b0;
      chk_start <= 1'b0;
    end else begin
      out_start <= 1'b0;
      upd_start <= 1'b0;
      chk_start <= 1'b0;
      unique case (state)
        INIT: begin
          health <= 8'(START_HEALTH);
          state  <= IDLE;
        end
        IDLE: if (start) state <= WAIT;
        WAIT: if (frame_req) begin
          out_start <= 1'b1;
          state     <= OUTPUT;
        end
        OUTPUT: if (out_done) begin
          upd_start <= 1'b1;
          state     <= UPDATE;
        end
        UPDATE: if (upd_done) begin
          chk_start <= 1'b1;
          state     <= CHECK;
        end
        CHECK: if (chk_done) state <= HEALTH;
        HEALTH: begin
          if (8'(damage) >= health) begin
            health <= '0;
            state  <= END;
          end else begin
            health <= health - 8'(damage);
            state  <= WAIT;
          end
        end
        END: state <= END;
        default: state <= INIT;
      endcase
    end
  end
endmodule
