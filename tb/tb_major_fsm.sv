// Testbench for major_fsm, the game's top-level sequencer. It walks the
// machine through wait-for-calibration, level select (the level follows the
// player position, frames are served when the display asks), the start
// shot, game, game over and a restart once the player has left and
// re-entered the picture (while the game machine still reports the old
// game's end), and checks outputs at every step.
module tb_major_fsm;
  logic clk = 0, rst = 1, calibrated = 0, present = 0, shot = 0, game_done = 0;
  logic frame_req = 0, out_busy = 0;
  logic [6:0] position = 0;
  logic shot_clr, out_start, new_game, show_level;
  logic [1:0] level;
  logic [2:0] st;
  int checks = 0, failures = 0, starts = 0, newg = 0;
  major_fsm dut (.clk, .rst, .calibrated, .position, .present, .shot, .shot_clr, .game_done,
    .frame_req, .out_busy, .out_start, .new_game, .level, .show_level, .state_o(st));
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (out_start) starts++;
    if (new_game) newg++;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic expect_state(input int s, input string what);
    checks++;
    if (st != 3'(s)) begin failures++; $display("%s: state %0d want %0d", what, st, s); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    repeat (20) @(negedge clk);
    expect_state(1, "waits for calibration");
    checks++; if (show_level) begin failures++; $display("show_level early"); end
    calibrated = 1; present = 1;
    repeat (3) @(negedge clk);
    expect_state(2, "level select");
    checks++; if (!show_level) begin failures++; $display("show_level low"); end
    for (int p = 0; p < 128; p += 9) begin
      position = 7'(p);
      repeat (3) @(negedge clk);
      checks++;
      if (level != 2'(3 - p / 32)) begin failures++; $display("pos %0d level %0d", p, level); end
    end
    // frames are served on request only while output is idle
    starts = 0;
    frame_req = 1; out_busy = 1;
    repeat (10) @(negedge clk);
    checks++; if (starts != 0) begin failures++; $display("started while busy"); end
    out_busy = 0; @(negedge clk); @(negedge clk); out_busy = 1; frame_req = 0;
    repeat (5) @(negedge clk); out_busy = 0;
    checks++; if (starts != 1) begin failures++; $display("%0d starts for one request", starts); end
    position = 7'd10;                    // level 3
    repeat (3) @(negedge clk);
    shot = 1; @(negedge clk); shot = 0;
    checks += 2;
    if (!shot_clr || !new_game) begin failures++; $display("shot not taken"); end
    if (level != 2'd3) begin failures++; $display("level %0d want 3", level); end
    @(negedge clk);
    expect_state(3, "game");
    position = 7'd100;
    repeat (5) @(negedge clk);
    checks++; if (level != 2'd3) begin failures++; $display("level changed during game"); end
    frame_req = 1; starts = 0;
    repeat (5) @(negedge clk);
    checks++; if (starts != 0) begin failures++; $display("major machine served a frame during game"); end
    frame_req = 0;
    game_done = 1; @(negedge clk); game_done = 0; @(negedge clk);
    expect_state(4, "game over");
    frame_req = 1; repeat (3) @(negedge clk); frame_req = 0;
    checks++; if (starts == 0) begin failures++; $display("no frame in game over"); end
    // present all the time: no restart
    newg = 0;
    repeat (20) @(negedge clk);
    expect_state(4, "stays over while player stays");
    present = 0; repeat (5) @(negedge clk);
    expect_state(4, "player gone");
    // the game machine still shows END until it sees new_game
    game_done = 1;
    present = 1; repeat (2) @(negedge clk);
    game_done = 0; @(negedge clk);
    checks++; if (newg != 1) begin failures++; $display("restart new_game %0d", newg); end
    expect_state(3, "restarted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
