// Testbench for check_fsm, the collision step. Each round the testbench fills
// a model object RAM with random helicopters and objects placed near four
// random bullets, works out on its own which sprites are hit (each bullet
// kills at most one sprite, helicopters first, in list order), which objects
// reached the ground and the resulting damage and score, then runs the block
// and compares RAM contents, kill mask, damage and score.
module tb_check_fsm;
  import para_pkg::*;
  logic clk = 0, rst = 1, new_game = 0, start = 0;
  logic done, ram_we, ev_hit, ev_ground;
  logic [4:0] numheli, numobject, ram_addr;
  bullet_t bullets [NUM_BULLETS];
  logic [NUM_BULLETS-1:0] kill_mask;
  logic [6:0] damage;
  logic [7:0] score;
  word_t ram [RAM_DEPTH], ram_wdata, exp_ram [RAM_DEPTH];
  int checks = 0, failures = 0, n_hit = 0, n_gnd = 0, e_hit = 0, e_gnd = 0;
  check_fsm dut (.clk, .rst, .new_game, .start, .done, .numheli, .numobject, .bullets, .kill_mask,
    .damage, .score, .ram_addr, .ram_we, .ram_wdata, .ram_rdata(ram[ram_addr]), .ev_hit, .ev_ground);
  always #5 clk = ~clk;
  always @(posedge clk) if (ram_we) ram[ram_addr] <= ram_wdata;
  always @(posedge clk) if (!rst) begin n_hit += ev_hit; n_gnd += ev_ground; end
  initial begin #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic bit inside_box(int bx, int by, int ox, int oy, int w);
    return bx >= ox && bx < ox + w && by >= oy && by < oy + SPRITE_H;
  endfunction

  initial begin
    int exp_score = 0;
    repeat (3) @(negedge clk); rst = 0;
    repeat (3) @(negedge clk);
    for (int r = 0; r < 400; r++) begin
      automatic bit used [NUM_BULLETS] = '{default: 0};
      automatic int exp_dmg = 0;
      automatic logic [NUM_BULLETS-1:0] exp_mask = '0;
      numheli = 5'($urandom_range(0, HELI_SLOTS));
      numobject = 5'($urandom_range(0, OBJ_SLOTS));
      for (int b = 0; b < NUM_BULLETS; b++)
        bullets[b] = '{x: 7'($urandom_range(0, 127)),
                       y: ($urandom_range(0, 4) == 0) ? BULLET_NONE : 7'($urandom_range(0, 95))};
      for (int i = 0; i < HELI_SLOTS; i++) begin
        heli_t h;
        automatic int b = $urandom_range(0, NUM_BULLETS - 1);
        h = '{exploded: ($urandom_range(0, 5) == 0), timer: 4'($urandom), dir: 1'($urandom),
              x: 9'(int'(bullets[b].x) - $urandom_range(0, 20)), drop_dist: 7'($urandom)};
        ram[i] = word_t'(h);
      end
      for (int i = 0; i < OBJ_SLOTS; i++) begin
        obj_t o;
        automatic int b = $urandom_range(0, NUM_BULLETS - 1);
        o = '{exploded: ($urandom_range(0, 5) == 0), timer: 4'($urandom), is_bomb: 1'($urandom), pad: 0,
              x: 7'(int'(bullets[b].x) - $urandom_range(0, 10)),
              y: ($urandom_range(0, 3) == 0) ? 7'($urandom_range(80, 90)) : 7'(int'(bullets[b].y) - $urandom_range(0, 14))};
        ram[FIRST_OBJECT+i] = word_t'(o);
      end
      // reference
      exp_ram = ram;
      for (int i = 0; i < numheli; i++) begin
        automatic heli_t h = heli_t'(ram[i]);
        if (h.exploded) continue;
        for (int b = 0; b < NUM_BULLETS; b++)
          if (!used[b] && bullets[b].y != BULLET_NONE &&
              inside_box(bullets[b].x, bullets[b].y, h.x, h.dir ? HELI_Y_R : HELI_Y_L, 16)) begin
            used[b] = 1; exp_mask[b] = 1; h.exploded = 1; h.timer = EXPLODE_FRAMES;
            exp_ram[i] = word_t'(h); exp_score++; e_hit++;
            break;
          end
      end
      for (int i = 0; i < numobject; i++) begin
        automatic obj_t o = obj_t'(ram[FIRST_OBJECT+i]);
        automatic bit hitnow = 0;
        if (o.exploded) continue;
        for (int b = 0; b < NUM_BULLETS; b++)
          if (!used[b] && bullets[b].y != BULLET_NONE && inside_box(bullets[b].x, bullets[b].y, o.x, o.y, 8)) begin
            used[b] = 1; exp_mask[b] = 1; hitnow = 1; exp_score++; e_hit++;
            break;
          end
        if (!hitnow && o.y >= GROUND_Y) begin exp_dmg += o.is_bomb ? 2 : 1; e_gnd++; end
        if (hitnow || o.y >= GROUND_Y) begin
          o.exploded = 1; o.timer = EXPLODE_FRAMES; exp_ram[FIRST_OBJECT+i] = word_t'(o);
        end
      end
      if (exp_score > 255) exp_score = 255;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      while (!done) @(negedge clk);
      checks += 4;
      if (kill_mask !== exp_mask) begin failures++; $display("round %0d mask %b want %b", r, kill_mask, exp_mask); end
      if (damage !== 7'(exp_dmg)) begin failures++; $display("round %0d damage %0d want %0d", r, damage, exp_dmg); end
      if (score !== 8'(exp_score)) begin failures++; $display("round %0d score %0d want %0d", r, score, exp_score); end
      if (ram !== exp_ram) begin
        failures++;
        for (int i = 0; i < RAM_DEPTH; i++) if (ram[i] !== exp_ram[i]) $display("round %0d word %0d %h want %h", r, i, ram[i], exp_ram[i]);
      end
      @(negedge clk);
    end
    checks += 2;
    if (n_hit != e_hit || e_hit < 50) begin failures++; $display("hits %0d want %0d", n_hit, e_hit); end
    if (n_gnd != e_gnd || e_gnd < 50) begin failures++; $display("ground %0d want %0d", n_gnd, e_gnd); end
    $display("hits %0d ground %0d", n_hit, n_gnd);
    new_game = 1; @(negedge clk); new_game = 0;
    checks++; if (score != 0) begin failures++; $display("score not cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
