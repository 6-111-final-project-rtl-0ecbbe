// Game control unit: the game engine. It takes the player position and shoot
// level from the capture unit and, once per frame requested by the video
// output, sends the list of sprites to draw, then moves the game on by a
// frame.
//
// Parts: the major machine (screens: wait for calibration, level choice,
// game, game over), the game machine (the per-frame sequence output, update,
// check, health), the three minor machines that do that work, the object RAM
// they share (the game machine's current state decides who drives its one
// port), the shoot register and the random number generator. The video
// request is synchronized here. Partitioning follows the original design.
module gcu
  import para_pkg::*;
#(
  parameter int START_HEALTH = 10,
  parameter int MIN_GAP      = 24
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rng_in,
  // from the capture unit
  input  logic [6:0] position,
  input  logic       shoot,
  input  logic       present,
  input  logic       calibrated,
  // to the video output
  input  logic       out_req,
  output logic       out_ready,
  output logic [7:0] out_bus,
  // status
  output logic [7:0] score,
  output logic [7:0] health,
  output logic [1:0] level,
  output logic [2:0] major_state,
  output logic [2:0] game_state,
  // one-clock event strobes
  output logic       ev_heli_new,
  output logic       ev_drop,
  output logic       ev_remove,
  output logic       ev_hit,
  output logic       ev_ground
);
  localparam logic [2:0] G_UPDATE = 3'd4, G_CHECK = 3'd5, M_GAME = 3'd3;

  logic       req_s;
  logic [7:0] rnd;
  logic       shot, shot_clr_major, shot_clr_upd;
  logic       new_game, game_over, show_level;
  logic       major_out_start, game_out_start, out_done, out_busy;
  logic       upd_start, upd_done, chk_start, chk_done;
  logic [6:0] damage;
  logic [4:0] numheli, numobject;
  bullet_t    bullets [NUM_BULLETS];
  logic [NUM_BULLETS-1:0] kill_mask;

  logic [4:0] o_addr, u_addr, c_addr, ram_addr;
  logic       u_we, c_we, ram_we;
  word_t      u_wdata, c_wdata, ram_wdata, ram_rdata;

  sync2 #(.W(1)) u_req_sync (.clk, .rst, .d(out_req), .q(req_s));

  rng u_rng (.clk, .din(rng_in), .rnd);

  shoot_reg u_shoot (.clk, .rst, .shoot_lvl(shoot), .clr(shot_clr_major | shot_clr_upd),
                     .pending(shot));

  major_fsm u_major (
    .clk, .rst, .calibrated, .position, .present, .shot, .shot_clr(shot_clr_major),
    .game_done(game_over), .frame_req(req_s), .out_busy, .out_start(major_out_start),
    .new_game, .level, .show_level, .state_o(major_state));

  game_fsm #(.START_HEALTH(START_HEALTH)) u_game (
    .clk, .rst, .new_game, .start(major_state == M_GAME), .frame_req(req_s),
    .out_start(game_out_start), .out_done, .upd_start, .upd_done, .chk_start, .chk_done,
    .damage, .health, .game_over, .state_o(game_state));

  output_fsm u_out (
    .clk, .rst, .start(major_out_start | game_out_start), .done(out_done), .busy(out_busy),
    .gun_x(position), .numheli, .numobject, .bullets,
    .number(show_level ? {6'd0, level} : score), .health,
    .ram_addr(o_addr), .ram_rdata, .req(req_s), .ready(out_ready), .bus(out_bus));

  update_fsm #(.MIN_GAP(MIN_GAP)) u_upd (
    .clk, .rst, .new_game, .start(upd_start), .done(upd_done), .level, .rnd,
    .shot, .shot_clr(shot_clr_upd), .gun_x(position),
    .kill_valid(chk_done), .kill_mask, .numheli, .numobject, .bullets,
    .ram_addr(u_addr), .ram_we(u_we), .ram_wdata(u_wdata), .ram_rdata,
    .ev_heli_new, .ev_drop, .ev_remove);

  check_fsm u_chk (
    .clk, .rst, .new_game, .start(chk_start), .done(chk_done), .numheli, .numobject,
    .bullets, .kill_mask, .damage, .score,
    .ram_addr(c_addr), .ram_we(c_we), .ram_wdata(c_wdata), .ram_rdata, .ev_hit, .ev_ground);

  always_comb begin
    if (game_state == G_UPDATE) begin
      ram_addr = u_addr; ram_we = u_we; ram_wdata = u_wdata;
    end else if (game_state == G_CHECK) begin
      ram_addr = c_addr; ram_we = c_we; ram_wdata = c_wdata;
    end else begin
      ram_addr = o_addr; ram_we = 1'b0; ram_wdata = '0;
    end
  end

  object_ram u_ram (.clk, .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata));
endmodule
