// Testbench for game_fsm, the per-frame game loop. Stand-in output, update
// and check machines answer after random delays; the testbench checks that the
// three run strictly one after another per frame request, that health drops
// by the damage of each frame and that the machine stops in END when health
// runs out (START_HEALTH = 5, damage 2: END after the third frame).
module tb_game_fsm;
  logic clk = 0, rst = 1, new_game = 0, start = 0, frame_req = 0;
  logic out_done = 0, upd_done = 0, chk_done = 0;
  logic out_start, upd_start, chk_start, game_over;
  logic [6:0] damage = 0;
  logic [7:0] health;
  logic [2:0] st;
  int checks = 0, failures = 0;
  string order = "";
  game_fsm #(.START_HEALTH(5)) dut (.clk, .rst, .new_game, .start, .frame_req, .out_start,
    .out_done, .upd_start, .upd_done, .chk_start, .chk_done, .damage, .health, .game_over, .state_o(st));
  always #5 clk = ~clk;
  initial begin #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // stand-in blocks: answer start with a done pulse after a random delay
  always @(posedge clk) begin
    if (out_start) begin order = {order, "O"}; fork begin repeat ($urandom_range(2, 9)) @(negedge clk); out_done = 1; @(negedge clk); out_done = 0; end join_none end
    if (upd_start) begin order = {order, "U"}; fork begin repeat ($urandom_range(2, 9)) @(negedge clk); upd_done = 1; @(negedge clk); upd_done = 0; end join_none end
    if (chk_start) begin order = {order, "C"}; fork begin repeat ($urandom_range(2, 9)) @(negedge clk); chk_done = 1; @(negedge clk); chk_done = 0; end join_none end
  end

  task automatic one_frame(input int dmg);
    damage = 7'(dmg);
    @(negedge clk) frame_req = 1;
    @(negedge clk) frame_req = 0;
    repeat (60) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    repeat (15) @(negedge clk);
    order = "";                          // drop anything seen before reset settled
    checks++; if (health != 8'd5) begin failures++; $display("start health %0d", health); end
    frame_req = 1; repeat (5) @(negedge clk); frame_req = 0;
    checks++; if (order != "") begin failures++; $display("ran before start"); end
    start = 1; @(negedge clk); start = 0;
    repeat (5) @(negedge clk);
    checks++; if (order != "") begin failures++; $display("ran without a frame request"); end
    one_frame(0);
    checks += 2;
    if (order != "OUC") begin failures++; $display("order %s", order); end
    if (health != 8'd5) begin failures++; $display("health %0d want 5", health); end
    for (int f = 0; f < 3; f++) begin
      one_frame(2);
      checks += 2;
      if (health != 8'(f < 2 ? 3 - 2 * f : 0)) begin failures++; $display("frame %0d health %0d", f, health); end
      if (game_over != (f == 2)) begin failures++; $display("frame %0d game_over %b", f, game_over); end
    end
    checks++; if (order != "OUCOUCOUCOUC") begin failures++; $display("order %s", order); end
    one_frame(0);
    checks++; if (order != "OUCOUCOUCOUC") begin failures++; $display("ran after END: %s", order); end
    new_game = 1; @(negedge clk); new_game = 0; repeat (3) @(negedge clk);
    checks += 2;
    if (health != 8'd5 || game_over) begin failures++; $display("new game did not reset"); end
    if (st != 3'd1) begin failures++; $display("new game state %0d", st); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
