// End-to-end testbench of the whole game at reduced timings: 8 image rows
// sampled on every 2nd of 22 lines per field (640 clocks per line), 2 frames
// per calibration phase, 3 health points, short helicopter gaps.
// Models around the design:
//  * camera: sync pulses and converter samples of a dark player (columns
//    pl..pr from row ptop down) on a light background;
//  * display RAM: 8 KB, write at the clock edge, asynchronous read;
//  * video chip: a falling edge of nfs every NFS_PERIOD clocks.
// The player is steered by the testbench: during a game it watches the
// sprite list on the bus to the video output and stands under the lowest
// falling object, raising its arms every few fields to fire.
// The run: calibration pictures, switch to game mode, level select, start
// shot, a game to its end, leave and re-enter for a second game, play it to
// the end. Checked along the way: calibration picture contents in the RAM,
// learned thresholds, position tracking, gun drawn at the player position,
// score read-out drawn, health falling to 0. Counted mechanisms (each must
// happen at least once): calibration pictures, calibration complete, level
// pictures, game start by shot, helicopter created, drop, hit, ground hit,
// removal, game over, restart by re-entering.
module tb_paratroopers_top;
  import para_pkg::*;
  localparam int VB = 40, HB = 6, STRIDE = 2, LINES = 8, LAST = 20, LINE_CYC = 640, FR = 2;
  localparam int NFS_PERIOD = 12000;
  logic clk = 0, rst = 1, hsync_n = 1, vsync_n = 1, rng_in = 0, calib_sw = 0, game_sw = 0, nfs = 1;
  logic [7:0] adc = 8'd200, ram_wdata, score, health;
  logic nms, ram_we, shoot, calibrated, frame_drawn;
  logic [12:0] ram_addr;
  logic [6:0] position, shoot_low, shoot_high;
  logic [1:0] level;
  logic [2:0] major_state, game_state;
  logic [4:0] events;
  logic [7:0] ram [8192];
  int checks = 0, failures = 0;
  int pl = 40, pr = 63, ptop = 2;
  // mechanism counters
  int m_calpic = 0, m_cal = 0, m_levelpic = 0, m_start = 0, m_new = 0, m_drop = 0, m_rm = 0;
  int m_hit = 0, m_gnd = 0, m_over = 0, m_restart = 0;

  paratroopers_top #(.VBLANK_CYC(VB), .HBLANK_CYC(HB), .LINE_STRIDE(STRIDE), .LINES(LINES),
    .LAST_LINE(LAST), .FRAMES_PER_PHASE(FR), .START_HEALTH(3), .MIN_GAP(8)) dut (
    .clk, .rst, .hsync_n, .vsync_n, .adc_data(adc), .pixel_threshold(8'd100), .rng_in, .calib_sw,
    .game_sw, .nms, .nfs, .ram_addr, .ram_wdata, .ram_we, .ram_rdata(ram[ram_addr]), .position,
    .shoot, .calibrated, .shoot_low, .shoot_high, .score, .health, .level, .major_state,
    .game_state, .frame_drawn, .events);

  always #5 clk = ~clk;
  always @(negedge clk) rng_in = 1'($urandom);
  always @(posedge clk) if (ram_we) ram[ram_addr] <= ram_wdata;
  initial begin #300000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // camera
  initial begin
    repeat (4) @(negedge clk);
    forever begin
      vsync_n = 0; repeat (3 * LINE_CYC) @(negedge clk); vsync_n = 1;
      repeat (VB + 10) @(negedge clk);
      for (int l = 0; l < LAST + 2; l++) begin
        automatic int row = (l % STRIDE == 0) ? l / STRIDE : -1;
        hsync_n = 0; repeat (5) @(negedge clk); hsync_n = 1;
        for (int t = 0; t < LINE_CYC - 5; t++) begin
          automatic int p = (t - HB - 4) / 3;
          adc = (row >= ptop && row < LINES && p >= pl && p <= pr) ? 8'd30 : 8'd200;
          @(negedge clk);
        end
      end
    end
  end
  task automatic fields(input int n);
    repeat (n) @(posedge vsync_n);
  endtask

  // video chip field sync
  initial forever begin
    repeat (NFS_PERIOD) @(negedge clk);
    nfs = 0; repeat (50) @(negedge clk); nfs = 1;
  end

  // events
  always @(posedge clk) if (!rst) begin
    m_new += events[4]; m_drop += events[3]; m_rm += events[2]; m_hit += events[1]; m_gnd += events[0];
    if (frame_drawn && calib_sw) m_calpic++;
    if (frame_drawn && !calib_sw && major_state == 3'd2) m_levelpic++;
  end

  // snoop the sprite list on its way to the video output: lowest falling object
  int tgt_x = 64, best_y, best_x, nb = 0;
  logic [7:0] tri_b [3];
  always @(posedge dut.vdu_ready) if (!calib_sw) begin
    if (nb == 0 && dut.vdu_data == C_END) begin
      tgt_x = best_x; best_y = -1; best_x = 64;
    end else begin
      tri_b[nb] = dut.vdu_data;
      nb = (nb + 1) % 3;
      if (nb == 0 && (tri_b[0] == C_BOMB || tri_b[0] == C_TROOPER) && int'(tri_b[2]) > best_y && tri_b[2] < 60) begin
        best_y = tri_b[2]; best_x = tri_b[1] + 3;
      end
    end
  end

  task automatic stand_at(input int c, input int top);
    if (c < 12) c = 12;
    if (c > 115) c = 115;
    pl = c - 12; pr = c + 11; ptop = top;
  endtask

  task automatic play_game(input int g);
    int f = 0, last_health = 3;
    while (major_state == 3'd3 && f < 600) begin
      stand_at(tgt_x, (f % 4 < 2) ? 0 : 2);
      fields(1);
      f++;
      checks++;
      if (health > 8'(last_health)) begin failures++; $display("health rose"); end
      last_health = health;
    end
    checks += 2;
    if (major_state != 3'd4) begin failures++; $display("game %0d did not end", g); end
    else m_over++;
    if (health != 0) begin failures++; $display("game over with health %0d", health); end
    $display("game %0d: %0d fields, score %0d", g, f, score);
  endtask

  initial begin
    repeat (4) @(negedge clk); rst = 0;
    // ---------------- calibration ----------------
    calib_sw = 1;
    stand_at(52, 2);                      // arms down
    fields(FR + 1);
    stand_at(52, 0);                      // arms up
    for (int i = 0; i < 10 && !calibrated; i++) fields(1);
    if (calibrated) m_cal++;
    checks += 2;
    if (shoot_low != 7'd2) begin failures++; $display("shoot_low %0d", shoot_low); end
    if (shoot_high != 7'd0) begin failures++; $display("shoot_high %0d", shoot_high); end
    // calibration picture: player columns 40..63 are RAM bytes 10..15 of a line
    checks += 2;
    if (ram[32*(LINES-1) + 12] != 8'hFF) begin failures++; $display("calibration picture: player missing"); end
    if (ram[32*(LINES-1) + 2] != 8'h00) begin failures++; $display("calibration picture: background dark"); end
    // ---------------- level select ----------------
    calib_sw = 0; game_sw = 1;
    stand_at(20, 2);                      // left edge: fastest level
    fields(6);
    checks += 2;
    if (level != 2'd3) begin failures++; $display("level %0d", level); end
    if (position < 7'd17 || position > 7'd22) begin failures++; $display("position %0d want ~20", position); end
    // gun drawn at the player position (rows 83..94)
    begin
      automatic bit found = 0;
      for (int r = 83; r < 95; r++) for (int c = 0; c < 8; c++) if (ram[32*r + c] != 0) found = 1;
      checks++; if (!found) begin failures++; $display("gun not drawn"); end
    end
    // ---------------- first game: start with a shot ----------------
    stand_at(20, 0);
    fields(3);
    checks++;
    if (major_state != 3'd3) begin failures++; $display("game not started by the shot"); end
    else m_start++;
    play_game(0);
    // score read-out drawn (units digit top row is never blank)
    @(posedge frame_drawn);
    checks++; if (ram[2851] == 8'h00) begin failures++; $display("score read-out missing"); end
    // ---------------- second game: leave and come back ----------------
    ptop = LINES;                          // nobody in the picture
    fields(3);
    stand_at(64, 2);
    fields(3);
    checks++;
    if (major_state != 3'd3) begin failures++; $display("no restart"); end
    else m_restart++;
    play_game(1);
    $display("calpic %0d cal %0d levelpic %0d start %0d new %0d drop %0d remove %0d hit %0d ground %0d over %0d restart %0d",
             m_calpic, m_cal, m_levelpic, m_start, m_new, m_drop, m_rm, m_hit, m_gnd, m_over, m_restart);
    checks += 11;
    if (m_calpic == 0)  begin failures++; $display("no calibration picture"); end
    if (m_cal == 0)     begin failures++; $display("calibration never completed"); end
    if (m_levelpic == 0) begin failures++; $display("no level picture"); end
    if (m_start == 0)   begin failures++; $display("no game start"); end
    if (m_new == 0)     begin failures++; $display("no helicopter"); end
    if (m_drop == 0)    begin failures++; $display("no drop"); end
    if (m_rm == 0)      begin failures++; $display("no removal"); end
    if (m_hit == 0)     begin failures++; $display("no hit"); end
    if (m_gnd == 0)     begin failures++; $display("no ground hit"); end
    if (m_over == 0)    begin failures++; $display("no game over"); end
    if (m_restart == 0) begin failures++; $display("no restart"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
