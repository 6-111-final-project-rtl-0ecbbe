// Testbench for output_fsm, which sends the sprite list of one frame to the
// video output. The testbench holds a model object RAM filled with random
// helicopters and objects, random bullets, score and health, builds the
// expected byte stream itself (gun, objects, helicopters, bullets, score,
// health, END) and receives the frame over the request/ready handshake with
// random gaps, comparing byte by byte. It also checks busy and done.
module tb_output_fsm;
  import para_pkg::*;
  logic clk = 0, rst = 1, start = 0, req = 0;
  logic done, busy, ready;
  logic [7:0] bus, number, health;
  logic [6:0] gun_x;
  logic [4:0] numheli, numobject, ram_addr;
  bullet_t bullets [NUM_BULLETS];
  word_t ram [RAM_DEPTH];
  int checks = 0, failures = 0, dones = 0;
  output_fsm dut (.clk, .rst, .start, .done, .busy, .gun_x, .numheli, .numobject, .bullets,
    .number, .health, .ram_addr, .ram_rdata(ram[ram_addr]), .req, .ready, .bus);
  always #5 clk = ~clk;
  always @(posedge clk) if (done) dones++;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  byte unsigned q[$];
  task automatic put(input int c, input int x, input int y);
    q.push_back(8'(c)); q.push_back(8'(x)); q.push_back(8'(y));
  endtask

  task automatic setup_and_expect();
    heli_t h; obj_t o;
    gun_x = 7'($urandom_range(0, 127));
    numheli = 5'($urandom_range(0, HELI_SLOTS));
    numobject = 5'($urandom_range(0, OBJ_SLOTS));
    number = 8'($urandom); health = 8'($urandom);
    for (int i = 0; i < RAM_DEPTH; i++) ram[i] = word_t'($urandom);
    for (int i = 0; i < NUM_BULLETS; i++) begin
      bullets[i].x = 7'($urandom);
      bullets[i].y = ($urandom_range(0, 2) == 0) ? BULLET_NONE : 7'($urandom_range(0, 100));
    end
    q = {};
    put(C_GUN1, gun_x - 7, GUN_Y);
    put(C_GUN2, gun_x + 1, GUN_Y);
    for (int i = 0; i < numobject; i++) begin
      o = obj_t'(ram[FIRST_OBJECT + i]);
      if (o.exploded) begin put(C_EXPLODE1, o.x - 4, o.y); put(C_EXPLODE2, o.x + 4, o.y); end
      else put(o.is_bomb ? C_BOMB : C_TROOPER, o.x, o.y);
    end
    for (int i = 0; i < numheli; i++) begin
      int y;
      h = heli_t'(ram[i]);
      y = h.dir ? HELI_Y_R : HELI_Y_L;
      if (h.exploded) begin put(C_EXPLODE1, h.x, y); put(C_EXPLODE2, h.x + 8, y); end
      else if (!h.dir) begin put(C_HELI1, h.x, y); put(C_HELI2, h.x + 8, y); end
      else begin put(C_HELI2REV, h.x, y); put(C_HELI1REV, h.x + 8, y); end
    end
    for (int i = 0; i < NUM_BULLETS; i++)
      if (bullets[i].y != BULLET_NONE) put(C_BULLET, bullets[i].x, bullets[i].y);
    put(C_SCORE, number, 0);
    put(C_HEALTH, health, 0);
    q.push_back(8'hC0);
  endtask

  initial begin
    for (int i = 0; i < NUM_BULLETS; i++) bullets[i] = '{x: 0, y: BULLET_NONE};
    gun_x = 64; numheli = 0; numobject = 0; number = 0; health = 0;
    repeat (3) @(negedge clk); rst = 0;
    repeat (3) @(negedge clk);
    checks++; if (busy || ready) begin failures++; $display("busy/ready after reset"); end
    for (int f = 0; f < 40; f++) begin
      automatic int n = 0;
      int d0;
      setup_and_expect();
      d0 = dones;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      checks++; if (!busy) begin failures++; $display("not busy"); end
      while (q.size() > 0) begin
        automatic byte unsigned want = q.pop_front();
        repeat ($urandom_range(0, 4)) @(negedge clk);
        req = 1;
        while (!ready) @(negedge clk);
        checks++;
        if (bus !== want) begin failures++; $display("frame %0d byte %0d: %h want %h", f, n, bus, want); end
        req = 0;
        while (ready) @(negedge clk);
        n++;
      end
      repeat (5) @(negedge clk);
      checks += 3;
      if (dones != d0 + 1) begin failures++; $display("frame %0d: %0d done pulses", f, dones - d0); end
      if (busy) begin failures++; $display("still busy"); end
      req = 1; repeat (10) @(negedge clk);
      if (ready) begin failures++; $display("sent more than END"); end
      req = 0; @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
