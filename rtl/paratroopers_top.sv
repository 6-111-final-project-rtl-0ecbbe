// Paratroopers: the arcade game in which a gun at the bottom of the screen
// shoots down helicopters and the bombs and paratroopers they drop, played
// by moving in front of a camera instead of with a joystick. The player's
// horizontal position aims the gun; raising and lowering an arm fires.
//
// Three units, each of which was a separate board with its own clock in the
// original, here on one clock with synchronizers at every crossing:
//  * vcu: video capture. Samples every fifth line of the camera picture into
//    a 128-pixel one-bit line, calibrates the player's shoot heights, then
//    reports position and shoot level once per field.
//  * gcu: game control. Level choice, game engine, score and health.
//  * output_generator: video output. Draws each picture into the display RAM
//    and hands it to the MC6847 video chip.
// The video output's request/ready/data bus goes to the capture unit while
// `calib_sw` is on and to the game controller otherwise, as the two switches
// of the original select the display mode.
// Not inside: camera, sync separator (hsync_n, vsync_n), flash converter
// (adc_data), display RAM (ram_*), video chip (nms, nfs) and the analog
// circuits behind it; their signals are ports.
module paratroopers_top
  import para_pkg::*;
#(
  parameter int VBLANK_CYC       = 13880,
  parameter int HBLANK_CYC       = 70,
  parameter int LINE_STRIDE      = 5,
  parameter int LINES            = 96,
  parameter int LAST_LINE        = 503,
  parameter int FRAMES_PER_PHASE = 750,
  parameter int START_HEALTH     = 10,
  parameter int MIN_GAP          = 24
) (
  input  logic        clk,
  input  logic        rst,
  // camera side
  input  logic        hsync_n,
  input  logic        vsync_n,
  input  logic [7:0]  adc_data,
  input  logic [7:0]  pixel_threshold,
  // free-running clock for the random number generator
  input  logic        rng_in,
  // display mode switches
  input  logic        calib_sw,
  input  logic        game_sw,
  // video chip and display RAM
  output logic        nms,
  input  logic        nfs,
  output logic [12:0] ram_addr,
  output logic [7:0]  ram_wdata,
  output logic        ram_we,
  input  logic [7:0]  ram_rdata,
  // status
  output logic [6:0]  position,
  output logic        shoot,
  output logic        calibrated,
  output logic [6:0]  shoot_low,
  output logic [6:0]  shoot_high,
  output logic [7:0]  score,
  output logic [7:0]  health,
  output logic [1:0]  level,
  output logic [2:0]  major_state,
  output logic [2:0]  game_state,
  output logic        frame_drawn,
  output logic [4:0]  events         // heli created, drop, removal, hit, ground hit
);
  logic       present;
  logic       vdu_req, vdu_ready;
  logic [7:0] vdu_data;
  logic       vdu_eof;
  logic       cal_ready, cal_eof;
  logic [7:0] cal_data;
  logic       gcu_ready;
  logic [7:0] gcu_bus;
  logic [4:0] og_state;

  vcu #(.VBLANK_CYC(VBLANK_CYC), .HBLANK_CYC(HBLANK_CYC), .LINE_STRIDE(LINE_STRIDE),
        .LINES(LINES), .LAST_LINE(LAST_LINE), .FRAMES_PER_PHASE(FRAMES_PER_PHASE)) u_vcu (
    .clk, .rst, .hsync_n, .vsync_n, .adc_data, .threshold(pixel_threshold),
    .vid_req(vdu_req & calib_sw), .vid_ready(cal_ready), .vid_data(cal_data),
    .end_of_frame(cal_eof), .position, .shoot, .present, .calibrated, .shoot_low, .shoot_high);

  gcu #(.START_HEALTH(START_HEALTH), .MIN_GAP(MIN_GAP)) u_gcu (
    .clk, .rst, .rng_in, .position, .shoot, .present, .calibrated,
    .out_req(vdu_req & ~calib_sw), .out_ready(gcu_ready), .out_bus(gcu_bus),
    .score, .health, .level, .major_state, .game_state,
    .ev_heli_new(events[0]), .ev_drop(events[1]), .ev_remove(events[2]),
    .ev_hit(events[3]), .ev_ground(events[4]));

  assign vdu_ready = calib_sw ? cal_ready : gcu_ready;
  assign vdu_data  = calib_sw ? cal_data  : gcu_bus;
  assign vdu_eof   = calib_sw & cal_eof;

  output_generator u_og (
    .clk, .rst, .calib(calib_sw), .game(game_sw), .request(vdu_req), .ready(vdu_ready),
    .data(vdu_data), .end_of_frame(vdu_eof), .nms, .nfs, .ram_addr, .ram_wdata, .ram_we,
    .ram_rdata, .frame_drawn, .state_o(og_state));
endmodule
