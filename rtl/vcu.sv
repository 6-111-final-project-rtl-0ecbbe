// Video capture unit: turns the camera picture of the playing area into the
// player's position and a shoot level for the game controller, and during
// calibration streams the 1-bit picture to the video output.
//
// The sync separator's syncs and the video output's request pass through the
// synchronizer; the controller picks every fifth line, the digitizer turns
// it into 128 one-bit pixels in the line buffer, and the calibrator (first)
// or the processor (after calibration, selected by calib_done, the original
// addr_sel) read the line buffer. Structure and signal names follow the
// original block diagram; the parameters are passed down unchanged.
module vcu #(
  parameter int VBLANK_CYC       = 13880,
  parameter int HBLANK_CYC       = 70,
  parameter int LINE_STRIDE      = 5,
  parameter int LINES            = 96,
  parameter int LAST_LINE        = 503,
  parameter int FRAMES_PER_PHASE = 750
) (
  input  logic       clk,
  input  logic       rst,
  // sync separator and converter
  input  logic       hsync_n,
  input  logic       vsync_n,
  input  logic [7:0] adc_data,
  input  logic [7:0] threshold,
  // video output (calibration picture)
  input  logic       vid_req,
  output logic       vid_ready,
  output logic [7:0] vid_data,
  output logic       end_of_frame,
  // game controller
  output logic [6:0] position,
  output logic       shoot,
  output logic       present,
  output logic       calibrated,
  output logic [6:0] shoot_low,
  output logic [6:0] shoot_high
);
  logic       hs_s, vs_s, req_s;
  logic       ctl_start, dig_done, start_proc, lb_we;
  logic [6:0] line_idx, line_no;
  logic [3:0] lb_waddr, lb_raddr, cal_raddr, proc_raddr;
  logic [7:0] lb_wdata, lb_rdata;
  logic       cal_phase, proc_frame_done;
  logic [3:0] ctl_state, dig_state, cal_state, proc_state;

  sync2 #(.W(3), .RST_VAL(3'b110)) u_sync (
    .clk, .rst, .d({hsync_n, vsync_n, vid_req}), .q({hs_s, vs_s, req_s}));

  vcu_controller #(.VBLANK_CYC(VBLANK_CYC), .HBLANK_CYC(HBLANK_CYC),
                   .LINE_STRIDE(LINE_STRIDE), .LINES(LINES), .LAST_LINE(LAST_LINE)) u_ctl (
    .clk, .rst, .hsync_n(hs_s), .vsync_n(vs_s), .done(dig_done),
    .start(ctl_start), .line_idx, .state_o(ctl_state));

  digitizer #(.PIXELS(128)) u_dig (
    .clk, .rst, .start(ctl_start), .line_idx, .adc_data, .threshold,
    .done(dig_done), .lb_we, .lb_waddr, .lb_wdata, .start_proc, .line_no,
    .state_o(dig_state));

  line_buffer #(.DEPTH(16), .W(8)) u_lb (
    .clk, .we(lb_we), .waddr(lb_waddr), .wdata(lb_wdata), .raddr(lb_raddr), .rdata(lb_rdata));

  assign lb_raddr = calibrated ? proc_raddr : cal_raddr;

  calibrator #(.FRAMES_PER_PHASE(FRAMES_PER_PHASE), .LINES(LINES)) u_cal (
    .clk, .rst, .start(start_proc), .line_no, .lb_rdata, .lb_raddr(cal_raddr),
    .vid_req(req_s), .vid_ready, .vid_data, .end_of_frame,
    .shoot_low, .shoot_high, .calib_done(calibrated), .phase(cal_phase), .state_o(cal_state));

  processor #(.LINES(LINES)) u_proc (
    .clk, .rst, .enable(calibrated), .start(start_proc), .line_no, .lb_rdata,
    .lb_raddr(proc_raddr), .shoot_low, .shoot_high, .position, .shoot, .present,
    .frame_done(proc_frame_done), .state_o(proc_state));
endmodule
