// Testbench for processor with 4 lines per frame. The testbench plays the
// line buffer with player shapes, computes the expected bounds itself (first
// and last 8-pixel dark run in any line), and checks position, present and
// the shoot hysteresis (shoot_high = 1, shoot_low = 3) after each frame,
// plus the 64-clock line processing time.
module tb_processor;
  localparam int LINES = 4;
  logic clk = 0, rst = 1, start = 0;
  logic [6:0] line_no = 0, position;
  logic [7:0] lb [16];
  logic [3:0] lb_raddr, st;
  logic shoot, present, frame_done;
  logic pix [LINES][128];
  int checks = 0, failures = 0, cyc = 0, t0 = 0, tl = 0;
  logic exp_shoot = 0;
  logic [6:0] exp_pos = 7'd64;
  processor #(.LINES(LINES)) dut (
    .clk, .rst, .enable(1'b1), .start, .line_no, .lb_rdata(lb[lb_raddr]), .lb_raddr,
    .shoot_low(7'd3), .shoot_high(7'd1), .position, .shoot, .present, .frame_done, .state_o(st));
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // shape: player in columns [l, r] from row top down; noise pixels optional
  task automatic frame(input int l, input int r, input int top, input bit noise);
    int left, right, first;
    left = 128; right = -1; first = -1;
    for (int y = 0; y < LINES; y++)
      for (int x = 0; x < 128; x++)
        pix[y][x] = (y >= top && x >= l && x <= r) || (noise && (x % 10 == 3) && y == 0);
    for (int y = 0; y < LINES; y++) begin
      for (int x = 0; x < 128; x++) if (pix[y][x] && first < 0) first = y;
      for (int x = 0; x + 7 < 128; x++) begin
        bit all = 1;
        for (int k = 0; k < 8; k++) all &= pix[y][x+k];
        if (all) begin if (x < left) left = x; if (x + 7 > right) right = x + 7; end
      end
    end
    for (int y = 0; y < LINES; y++) begin
      for (int b = 0; b < 16; b++) for (int i = 0; i < 8; i++) lb[b][7-i] = pix[y][8*b+i];
      @(negedge clk) start = 1; line_no = 7'(y); t0 = cyc;
      @(negedge clk) start = 0;
      while (st != 4'd1 && st != 4'd9) @(negedge clk);    // back to IDLE or in TRANSMIT
      if (y == 0) tl = cyc - t0;
      repeat (3) @(negedge clk);
    end
    if (left < 128) exp_pos = 7'((left + right) / 2);
    if (first >= 0) begin
      if (first <= 1) exp_shoot = 1; else if (first >= 3) exp_shoot = 0;
    end else exp_shoot = 0;
    checks += 3;
    if (position !== exp_pos) begin failures++; $display("position %0d want %0d", position, exp_pos); end
    if (shoot !== exp_shoot) begin failures++; $display("shoot %b want %b (first row %0d)", shoot, exp_shoot, first); end
    if (present !== (left < 128)) begin failures++; $display("present %b", present); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    repeat (3) @(negedge clk);
    frame(40, 59, 1, 0);    // hand up: shoot
    checks++; if (tl < 60 || tl > 70) begin failures++; $display("line took %0d clocks", tl); end
    frame(40, 59, 1, 0);    // still up: stays high
    frame(100, 111, 3, 0);  // arms down: shoot low
    frame(120, 127, 2, 0);  // right edge, between thresholds: hold
    frame(3, 5, 0, 1);      // too narrow: position held, not present
    frame(0, 7, 1, 0);      // left edge
    for (int i = 0; i < 20; i++) begin
      automatic int a = $urandom_range(0, 110);
      frame(a, a + $urandom_range(7, 17), $urandom_range(0, 3), $urandom_range(0, 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
