// Testbench for update_fsm, the per-frame movement step of the game. The
// testbench owns the object RAM and runs its own reference model of one frame
// (bullets, helicopter moves, drops, new helicopters, falling objects,
// explosions running out) on separate arrays, then compares helicopter and
// object lists and bullet registers after every frame. Random levels, shots
// and random numbers are used, and between frames random entries are set
// exploding in both copies so that removals from the middle of a list happen.
module tb_update_fsm;
  import para_pkg::*;
  localparam int MIN_GAP = 6;
  logic clk = 0, rst = 1, new_game = 0, start = 0, shot = 0, kill_valid = 0;
  logic [1:0] level = 3;
  logic [7:0] rnd = 0;
  logic [6:0] gun_x = 60;
  logic [NUM_BULLETS-1:0] kill_mask = 0;
  logic done, shot_clr, ram_we, ev_heli_new, ev_drop, ev_remove;
  logic [4:0] numheli, numobject, ram_addr;
  bullet_t bullets [NUM_BULLETS];
  word_t ram [RAM_DEPTH], ram_wdata;
  int checks = 0, failures = 0, n_new = 0, n_drop = 0, n_rm = 0;
  update_fsm #(.MIN_GAP(MIN_GAP)) dut (.clk, .rst, .new_game, .start, .done, .level, .rnd, .shot,
    .shot_clr, .gun_x, .kill_valid, .kill_mask, .numheli, .numobject, .bullets, .ram_addr, .ram_we,
    .ram_wdata, .ram_rdata(ram[ram_addr]), .ev_heli_new, .ev_drop, .ev_remove);
  always #5 clk = ~clk;
  always @(posedge clk) if (ram_we) ram[ram_addr] <= ram_wdata;
  always @(posedge clk) begin n_new += ev_heli_new; n_drop += ev_drop; n_rm += ev_remove; end
  initial begin #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // ---------------- reference model ----------------
  heli_t mh [HELI_SLOTS];
  obj_t  mo [OBJ_SLOTS];
  int    mnh = 0, mno = 0, mcnt = 0, mgap [2] = '{0, 0}, mtgt [2] = '{16, 16};
  int    mbx [NUM_BULLETS], mby [NUM_BULLETS];
  int    e_new = 0, e_drop = 0, e_rm = 0;

  task automatic model_frame();
    bit step = (mcnt == 0), placed = 0;
    int i;
    mcnt = step ? 3 - level : mcnt - 1;
    if (step) for (int d = 0; d < 2; d++) if (mgap[d] < 255) mgap[d]++;
    for (int b = 0; b < NUM_BULLETS; b++)
      if (mby[b] != BULLET_NONE) mby[b] = (mby[b] == 0) ? BULLET_NONE : mby[b] - 1;
      else if (shot && !placed) begin placed = 1; mbx[b] = gun_x; mby[b] = GUN_Y - 1; end
    i = 0;
    while (i < mnh) begin
      heli_t h = mh[i];
      int nx = h.dir ? h.x + 1 : h.x - 1;
      bit rm = 0;
      if (h.exploded) begin
        if (h.timer <= 1) rm = 1; else h.timer--;
      end else if (step) begin
        h.x = 9'(nx);
        if (nx < -16 || nx > 127) rm = 1;
        else if (h.drop_dist <= 1) begin
          h.drop_dist = 7'(16 + rnd[5:0]);
          if (nx >= 0 && nx <= 112 && mno < OBJ_SLOTS) begin
            mo[mno] = '{exploded: 0, timer: 0, is_bomb: rnd[2:0] < 3, pad: 0, x: 7'(nx + 4),
                        y: 7'((h.dir ? HELI_Y_R : HELI_Y_L) + DROP_OFS)};
            mno++; e_drop++;
          end
        end else h.drop_dist--;
      end
      if (rm) begin mh[i] = mh[mnh-1]; mnh--; e_rm++; end
      else begin mh[i] = h; i++; end
    end
    for (int d = 0; d < 2; d++)
      if (mgap[d] >= mtgt[d] && mnh < HELI_SLOTS) begin
        mh[mnh] = '{exploded: 0, timer: 0, dir: 1'(d), x: d ? -15 : 127, drop_dist: 7'(8 + rnd[5:0])};
        mnh++; e_new++;
        mgap[d] = 0; mtgt[d] = MIN_GAP + rnd[5:0];
      end
    i = 0;
    while (i < mno) begin
      obj_t o = mo[i];
      bit rm = 0;
      if (o.exploded) begin
        if (o.timer <= 1) rm = 1; else o.timer--;
      end else if (step && o.y < GROUND_Y) o.y++;
      if (rm) begin mo[i] = mo[mno-1]; mno--; e_rm++; end
      else begin mo[i] = o; i++; end
    end
  endtask

  task automatic compare(input int f);
    checks += 2;
    if (numheli != 5'(mnh)) begin failures++; $display("frame %0d numheli %0d want %0d", f, numheli, mnh); end
    if (numobject != 5'(mno)) begin failures++; $display("frame %0d numobject %0d want %0d", f, numobject, mno); end
    for (int i = 0; i < mnh && i < numheli; i++) begin
      checks++;
      if (ram[i] !== word_t'(mh[i])) begin failures++; $display("frame %0d heli %0d %h want %h", f, i, ram[i], mh[i]); end
    end
    for (int i = 0; i < mno && i < numobject; i++) begin
      checks++;
      if (ram[FIRST_OBJECT+i] !== word_t'(mo[i])) begin failures++; $display("frame %0d obj %0d %h want %h", f, i, ram[FIRST_OBJECT+i], mo[i]); end
    end
    for (int b = 0; b < NUM_BULLETS; b++) begin
      checks++;
      if (bullets[b].y != 7'(mby[b]) || (mby[b] != BULLET_NONE && bullets[b].x != 7'(mbx[b]))) begin
        failures++; $display("frame %0d bullet %0d (%0d,%0d) want (%0d,%0d)", f, b, bullets[b].x, bullets[b].y, mbx[b], mby[b]);
      end
    end
  endtask

  initial begin
    int clr, frames_step;
    for (int b = 0; b < NUM_BULLETS; b++) begin mby[b] = BULLET_NONE; mbx[b] = 0; end
    repeat (3) @(negedge clk); rst = 0;
    repeat (3) @(negedge clk);
    n_new = 0; n_drop = 0; n_rm = 0;
    for (int f = 0; f < 3000; f++) begin
      if (f % 500 == 0) level = 2'($urandom_range(0, 3));
      rnd = 8'($urandom);
      gun_x = 7'($urandom);
      shot = ($urandom_range(0, 5) == 0);
      // explode a random entry now and then
      if ($urandom_range(0, 60) == 0 && mnh > 0) begin
        automatic int i = $urandom_range(0, mnh - 1);
        mh[i].exploded = 1; mh[i].timer = 4'($urandom_range(1, 15)); ram[i] = word_t'(mh[i]);
      end
      if ($urandom_range(0, 5) == 0 && mno > 0) begin
        automatic int i = $urandom_range(0, mno - 1);
        mo[i].exploded = 1; mo[i].timer = 4'($urandom_range(1, 15)); ram[FIRST_OBJECT+i] = word_t'(mo[i]);
      end
      // bullets that hit something are cleared by the check step
      if ($urandom_range(0, 9) == 0) begin
        kill_mask = 4'($urandom); kill_valid = 1;
        for (int b = 0; b < NUM_BULLETS; b++) if (kill_mask[b]) mby[b] = BULLET_NONE;
        @(negedge clk) kill_valid = 0;
      end
      model_frame();
      clr = 0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      while (!done) begin @(negedge clk); if (shot_clr) clr++; end
      checks++;
      if (shot && clr != 1) begin failures++; $display("frame %0d shot_clr %0d", f, clr); end
      shot = 0;
      @(negedge clk);
      compare(f);
    end
    checks += 3;
    if (n_new != e_new || n_new < 20) begin failures++; $display("new helis %0d want %0d", n_new, e_new); end
    if (n_drop != e_drop || n_drop < 20) begin failures++; $display("drops %0d want %0d", n_drop, e_drop); end
    if (n_rm != e_rm || n_rm < 20) begin failures++; $display("removals %0d want %0d", n_rm, e_rm); end
    $display("news %0d drops %0d removals %0d", n_new, n_drop, n_rm);
    // new game empties everything
    new_game = 1; @(negedge clk); new_game = 0; @(negedge clk);
    checks++;
    if (numheli != 0 || numobject != 0 || bullets[0].y != BULLET_NONE) begin failures++; $display("new game"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
