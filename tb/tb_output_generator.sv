// Testbench for output_generator, the block that draws pictures into the
// display RAM. The testbench models the display RAM (write at the clock edge,
// asynchronous read), the request/ready sender and the video chip's nfs.
//  * Calibration: random bytes of one-bit pixels must land as pixel-doubled
//    2-bit bytes at consecutive addresses until end_of_frame.
//  * Game: the RAM is filled with garbage, random sprites (partly off
//    screen), score and health are sent; the testbench renders the same list
//    itself from the sprite ROM (the ROM has its own test) and compares all
//    3072 bytes.
// Also checked: nms low while drawing and high after, frame_drawn, and that
// a new picture starts only after a falling edge of nfs, and that an
// incomplete calibration picture is abandoned when the mode switch changes.
module tb_output_generator;
  import para_pkg::*;
  logic clk = 0, rst = 1, calib = 0, game = 0, ready = 0, eof = 0, nfs = 1;
  logic [7:0] data = 0;
  logic request, nms, ram_we, frame_drawn;
  logic [12:0] ram_addr;
  logic [7:0] ram_wdata;
  logic [4:0] st;
  logic [7:0] ram [8192], exp_ram [3072];
  int checks = 0, failures = 0, drawn = 0;
  output_generator dut (.clk, .rst, .calib, .game, .request, .ready, .data, .end_of_frame(eof),
    .nms, .nfs, .ram_addr, .ram_wdata, .ram_we, .ram_rdata(ram[ram_addr]), .frame_drawn, .state_o(st));
  always #5 clk = ~clk;
  always @(posedge clk) if (ram_we) ram[ram_addr] <= ram_wdata;
  always @(posedge clk) if (frame_drawn) drawn++;
  initial begin #80000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // reference sprite ROM
  logic [7:0] r_code = 0; logic [3:0] r_row = 0; logic [15:0] r_bits;
  logic [3:0] r_dig = 0; logic [2:0] r_drow = 0; logic [7:0] r_dbits;
  sprite_rom ref_rom (.code(r_code), .row(r_row), .bits(r_bits), .digit(r_dig), .digit_row(r_drow), .digit_bits(r_dbits));

  task automatic send(input logic [7:0] d, input logic e);
    while (!request) @(negedge clk);
    repeat ($urandom_range(0, 3)) @(negedge clk);
    data = d; eof = e; ready = 1;
    while (request) @(negedge clk);
    ready = 0;
    checks++;
    if (nms) begin failures++; $display("nms high while drawing"); end
  endtask

  task automatic finish_picture(input string what);
    repeat (20) @(negedge clk);
    checks += 2;
    if (!nms) begin failures++; $display("%s: nms low after picture", what); end
    if (drawn != 1) begin failures++; $display("%s: frame_drawn %0d", what, drawn); end
    drawn = 0;
  endtask

  task automatic nfs_pulse();
    @(negedge clk) nfs = 0;
    repeat (5) @(negedge clk);
    nfs = 1;
  endtask

  task automatic draw_sprite(input logic [7:0] c, input logic [7:0] x, input logic [7:0] y);
    for (int r = 0; r < SPRITE_H; r++) begin
      int yy = int'(y) + r;
      r_code = c; r_row = 4'(r); #1;
      if (yy >= SCREEN_H) continue;
      for (int p = 0; p < 8; p++) begin
        int xx = int'($signed(x)) + p;
        logic [1:0] colour = r_bits[15 - 2*p -: 2];
        if (xx < 0 || xx >= SCREEN_W) continue;
        exp_ram[yy*32 + xx/4][7 - 2*(xx%4) -: 2] |= colour;
      end
    end
  endtask

  task automatic draw_number(input int base, input int v);
    for (int d = 0; d < 3; d++) begin
      r_dig = 4'(v % 10); v /= 10;
      for (int r = 0; r < 7; r++) begin
        r_drow = 3'(r); #1;
        exp_ram[base - d + 32*r] = r_dbits;
      end
    end
  endtask

  initial begin
    logic [7:0] bytes [40];
    repeat (3) @(negedge clk); rst = 0;
    repeat (20) @(negedge clk);
    checks++; if (request) begin failures++; $display("request with no mode"); end
    // ---------------- calibration picture ----------------
    calib = 1;
    for (int i = 0; i < 40; i++) begin bytes[i] = 8'($urandom); send(bytes[i], 0); end
    send(8'h00, 1);
    finish_picture("calibration");
    for (int i = 0; i < 40; i++) begin
      logic [7:0] hi, lo;
      for (int k = 0; k < 4; k++) begin hi[2*k +: 2] = {2{bytes[i][4+k]}}; lo[2*k +: 2] = {2{bytes[i][k]}}; end
      checks += 2;
      if (ram[2*i] !== hi || ram[2*i+1] !== lo) begin
        failures++; $display("calib byte %0d: %h %h want %h %h", i, ram[2*i], ram[2*i+1], hi, lo);
      end
    end
    repeat (50) @(negedge clk);
    checks++; if (request) begin failures++; $display("restarted before nfs"); end
    nfs_pulse();
    repeat (10) @(negedge clk);
    checks++; if (!request) begin failures++; $display("no restart after nfs"); end
    // next picture starts again at address 0
    send(8'hF0, 0); send(8'h00, 1);
    finish_picture("calibration 2");
    checks++; if (ram[0] !== 8'hFF || ram[1] !== 8'h00) begin failures++; $display("second calib picture"); end
    // a third picture is left incomplete: the switch moves to game mode
    nfs_pulse();
    repeat (10) @(negedge clk);
    send(8'h0F, 0);
    repeat (10) @(negedge clk);
    calib = 0;
    repeat (10) @(negedge clk);
    checks += 2;
    if (request) begin failures++; $display("still requesting after leaving calibration"); end
    if (st != 5'd0) begin failures++; $display("state %0d after leaving calibration", st); end
    // ---------------- game pictures ----------------
    for (int pic = 0; pic < 6; pic++) begin
      automatic int score = $urandom_range(0, 255), health = $urandom_range(0, 255);
      automatic int n = (pic == 0) ? 0 : $urandom_range(5, 40);
      if (pic == 0) game = 1;
      for (int i = 0; i < 8192; i++) ram[i] = 8'($urandom);
      for (int i = 0; i < 3072; i++) exp_ram[i] = 0;
      nfs_pulse();
      for (int s = 0; s < n; s++) begin
        automatic logic [7:0] c = 8'($urandom_range(0, 10));
        automatic logic [7:0] x = ($urandom_range(0, 9) == 0) ? 8'($urandom_range(248, 255)) : 8'($urandom_range(0, 130));
        automatic logic [7:0] y = ($urandom_range(0, 9) == 0) ? 8'($urandom_range(90, 200)) : 8'($urandom_range(0, 95));
        draw_sprite(c, x, y);
        send(c, 0); send(x, 0); send(y, 0);
      end
      draw_number(2851, score); draw_number(2879, health);
      send(C_SCORE, 0); send(8'(score), 0); send(0, 0);
      send(C_HEALTH, 0); send(8'(health), 0); send(0, 0);
      send(C_END, 0);
      finish_picture("game");
      for (int i = 0; i < 3072; i++) begin
        checks++;
        if (ram[i] !== exp_ram[i]) begin
          failures++;
          if (failures < 20) $display("picture %0d byte %0d (row %0d col %0d): %h want %h", pic, i, i/32, i%32, ram[i], exp_ram[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
