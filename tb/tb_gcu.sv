// Testbench for the game control unit (major, game, output, update and check
// machines, object RAM, shoot register and random bit source together). The
// testbench plays the video output, fetching sprite lists over request/ready
// and parsing them, and plays the player: it aims the gun under the lowest
// falling object and fires now and then. Per frame it checks the list's
// shape (gun first at the player position, score, health, end last), the
// level shown before the game, the score and health read-outs against the
// status ports, and that health never rises during a game. It counts new
// helicopters, drops, removals, hits, ground hits, game overs and restarts
// and fails if any never happened.
module tb_gcu;
  import para_pkg::*;
  logic clk = 0, rst = 1, rng_in = 0, shoot = 0, present = 1, calibrated = 0, out_req = 0;
  logic [6:0] position = 7'd10;
  logic out_ready;
  logic [7:0] out_bus, score, health;
  logic [1:0] level;
  logic [2:0] major_state, game_state;
  logic ev_heli_new, ev_drop, ev_remove, ev_hit, ev_ground;
  int checks = 0, failures = 0;
  int n_new = 0, n_drop = 0, n_rm = 0, n_hit = 0, n_gnd = 0, n_over = 0, n_restart = 0;
  gcu #(.START_HEALTH(6), .MIN_GAP(8)) dut (.clk, .rst, .rng_in, .position, .shoot, .present,
    .calibrated, .out_req, .out_ready, .out_bus, .score, .health, .level, .major_state, .game_state,
    .ev_heli_new, .ev_drop, .ev_remove, .ev_hit, .ev_ground);
  always #5 clk = ~clk;
  always @(negedge clk) rng_in = 1'($urandom);
  always @(posedge clk) if (!rst) begin
    n_new += ev_heli_new; n_drop += ev_drop; n_rm += ev_remove; n_hit += ev_hit; n_gnd += ev_ground;
  end
  initial begin #400000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  byte unsigned fr[$];
  task automatic get_byte(output byte unsigned b);
    @(negedge clk) out_req = 1;
    while (!out_ready) @(negedge clk);
    b = out_bus;
    out_req = 0;
    while (out_ready) @(negedge clk);
  endtask

  // fetch one frame; returns triples in fr (END not included)
  task automatic get_frame();
    byte unsigned b;
    fr = {};
    forever begin
      get_byte(b);
      if (b == C_END && fr.size() % 3 == 0) break;
      fr.push_back(b);
      if (fr.size() > 300) begin failures++; $display("frame without END"); break; end
    end
  endtask

  int shown_score = 0, shown_health = 0;   // status when the frame was fetched
  task automatic check_frame(input bit in_game, input bit before_game);
    int n = fr.size();
    checks += 4;
    if (n < 12 || n % 3 != 0) begin failures++; $display("frame of %0d bytes", n); return; end
    if (fr[0] != C_GUN1 || fr[1] != 8'(position - 7) || fr[2] != GUN_Y ||
        fr[3] != C_GUN2 || fr[4] != 8'(position + 1) || fr[5] != GUN_Y) begin
      failures++; $display("gun sprites %p", fr[0:5]);
    end
    if (fr[n-6] != C_SCORE || fr[n-3] != C_HEALTH) begin failures++; $display("read-outs missing"); end
    if (before_game && fr[n-5] != 8'(3 - position[6:5])) begin failures++; $display("level shown %0d", fr[n-5]); end
    if (in_game && (fr[n-5] != shown_score || fr[n-2] != shown_health)) begin
      failures++; $display("score/health shown %0d/%0d want %0d/%0d", fr[n-5], fr[n-2], shown_score, shown_health);
    end
  endtask

  // aim under the lowest falling object, if any
  task automatic aim();
    int best_y = -1, best_x = 64;
    for (int i = 6; i + 2 < fr.size() - 6; i += 3)
      if ((fr[i] == C_BOMB || fr[i] == C_TROOPER) && fr[i+2] > best_y && fr[i+2] < 60) begin
        best_y = fr[i+2]; best_x = fr[i+1] + 3;
      end
    if (best_x > 120) best_x = 120;
    position = 7'(best_x);
  endtask

  initial begin
    int last_health;
    repeat (4) @(negedge clk); rst = 0;
    repeat (20) @(negedge clk);
    checks++; if (major_state != 3'd1) begin failures++; $display("not waiting for calibration"); end
    calibrated = 1;
    // level selection frames
    for (int p = 0; p < 4; p++) begin
      position = 7'(p * 32 + 9);
      repeat (10) @(negedge clk);
      get_frame(); check_frame(0, 1);
      checks++; if (level != 2'(3 - p)) begin failures++; $display("level %0d for position %0d", level, position); end
    end
    position = 7'd10;                      // fastest level
    repeat (10) @(negedge clk);
    for (int game = 0; game < 2; game++) begin
      if (game == 0) begin                 // the first game starts with a shot
        shoot = 1; repeat (10) @(negedge clk); shoot = 0;
        repeat (10) @(negedge clk);
      end
      checks++; if (major_state != 3'd3) begin failures++; $display("game did not start"); end
      last_health = 6;
      for (int f = 0; f < 3000 && major_state == 3'd3 && game_state != 3'd7; f++) begin
        shown_score = score; shown_health = health;
        get_frame();
        repeat (100) @(negedge clk);      // let update and check finish
        check_frame(1, 0);
        checks++;
        if (health > 8'(last_health)) begin failures++; $display("health rose"); end
        last_health = health;
        aim();
        shoot = (f % 6 < 3);
      end
      repeat (20) @(negedge clk);
      checks += 2;
      if (health != 0) begin failures++; $display("game %0d did not end, health %0d", game, health); end
      if (major_state != 3'd4) begin failures++; $display("not in game over"); end
      else n_over++;
      get_frame(); check_frame(0, 0);
      // the player steps out and back in: a new game
      present = 0; repeat (20) @(negedge clk);
      present = 1; repeat (20) @(negedge clk);
      checks++;
      if (major_state == 3'd3 && health == 8'd6 && score == 0) n_restart++;
      else begin failures++; $display("no restart: major %0d health %0d score %0d", major_state, health, score); end
    end
    $display("events: new %0d drop %0d remove %0d hit %0d ground %0d over %0d restart %0d",
             n_new, n_drop, n_rm, n_hit, n_gnd, n_over, n_restart);
    checks += 7;
    if (n_new == 0) begin failures++; $display("no helicopter created"); end
    if (n_drop == 0) begin failures++; $display("no drop"); end
    if (n_rm == 0) begin failures++; $display("no removal"); end
    if (n_hit == 0) begin failures++; $display("no hit"); end
    if (n_gnd == 0) begin failures++; $display("no ground hit"); end
    if (n_over == 0) begin failures++; $display("no game over"); end
    if (n_restart == 0) begin failures++; $display("no restart"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
