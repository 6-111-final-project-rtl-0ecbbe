// Testbench for the video capture unit as a whole (sync inputs through
// digitizer, calibrator and processor) with short timings: 25-line fields of 640
// clocks per line (about NTSC), every 5th line sampled, 4 image rows, 2 frames per
// calibration phase. A camera model drives the converter input from a
// picture of a dark player on a light background, timed from the rising
// hsync at 3 clocks per pixel. The testbench also receives the calibration
// picture over request/ready. Checked: bytes and end-of-frame marks per
// calibration frame, the learned thresholds, then position (within 2
// pixels, as sampling phase is not exact), present and shoot per game frame.
module tb_vcu;
  localparam int VB = 40, HB = 6, STRIDE = 5, LINES = 4, LAST = 23, LINE_CYC = 640, FR = 2;
  logic clk = 0, rst = 1, hsync_n = 1, vsync_n = 1, vid_req = 0;
  logic [7:0] adc = 8'd200, vid_data;
  logic vid_ready, eof, shoot, present, calibrated;
  logic [6:0] position, shoot_low, shoot_high;
  int checks = 0, failures = 0, nbytes = 0, neof = 0, nff = 0;
  // picture: player columns [pl, pr] from row ptop down (no player if ptop >= LINES)
  int pl = 40, pr = 63, ptop = 2;
  vcu #(.VBLANK_CYC(VB), .HBLANK_CYC(HB), .LINE_STRIDE(STRIDE), .LINES(LINES), .LAST_LINE(LAST),
        .FRAMES_PER_PHASE(FR)) dut (
    .clk, .rst, .hsync_n, .vsync_n, .adc_data(adc), .threshold(8'd100), .vid_req, .vid_ready,
    .vid_data, .end_of_frame(eof), .position, .shoot, .present, .calibrated, .shoot_low, .shoot_high);
  always #5 clk = ~clk;
  initial begin #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // camera: one field
  task automatic field();
    vsync_n = 0; repeat (3 * LINE_CYC) @(negedge clk); vsync_n = 1;
    repeat (VB + 10) @(negedge clk);
    for (int l = 0; l < 25; l++) begin
      int row = (l % STRIDE == 0) ? l / STRIDE : -1;
      hsync_n = 0; repeat (5) @(negedge clk); hsync_n = 1;
      for (int t = 0; t < LINE_CYC - 5; t++) begin
        int p = (t - HB - 4) / 3;
        adc = (row >= ptop && row < LINES && p >= pl && p <= pr) ? 8'd30 : 8'd200;
        @(negedge clk);
      end
    end
  endtask

  // video output: take every byte offered
  always begin
    @(negedge clk);
    vid_req = 1;
    while (!vid_ready) @(negedge clk);
    nbytes++;
    if (eof) neof++;
    if (vid_data == 8'hFF) nff++;
    vid_req = 0;
    while (vid_ready) @(negedge clk);
  end

  task automatic game_field(input int l, input int r, input int top);
    pl = l; pr = r; ptop = top;
    field();
    checks += 2;
    if (present != (top < LINES)) begin failures++; $display("present %b for top %0d", present, top); end
    if (top < LINES) begin
      int want = (l + r) / 2, d = int'(position) - want;
      if (d < -2 || d > 2) begin failures++; $display("position %0d want %0d", position, want); end
      checks++;
      if (top <= 0 && !shoot || top >= 2 && shoot) begin failures++; $display("shoot %b for top %0d", shoot, top); end
    end
  endtask

  initial begin
    repeat (4) @(negedge clk); rst = 0;
    // calibration, phase 1: arms down, top row 2
    pl = 40; pr = 63; ptop = 2;
    repeat (FR) field();
    checks += 3;
    if (shoot_low != 7'd2) begin failures++; $display("shoot_low %0d", shoot_low); end
    if (nbytes != FR * (LINES * 16 + 1) || neof != FR) begin failures++; $display("phase 1: %0d bytes %0d eof", nbytes, neof); end
    if (calibrated) begin failures++; $display("calibrated after phase 1"); end
    nbytes = 0; neof = 0; nff = 0;
    // phase 2: arms up, top rows 0 and 1
    ptop = 0; field(); ptop = 1; field();
    checks += 4;
    if (shoot_high != 7'd0) begin failures++; $display("shoot_high %0d", shoot_high); end
    if (nbytes != FR * (LINES * 16 + 1) || neof != FR) begin failures++; $display("phase 2: %0d bytes %0d eof", nbytes, neof); end
    // marker row 2 in both frames (2 x 16) plus the player's three full bytes
    // in rows 0, 1, 3 and rows 1, 3
    if (nff != 2 * 16 + 5 * 3) begin failures++; $display("phase 2: %0d all-dark bytes", nff); end
    nbytes = 0;
    if (!calibrated) begin failures++; $display("not calibrated"); end
    // game
    game_field(40, 63, 2);
    game_field(8, 31, 0);
    game_field(96, 119, 1);
    game_field(60, 83, 2);
    game_field(0, 0, LINES);
    game_field(104, 127, 0);
    for (int i = 0; i < 6; i++) begin
      automatic int a = $urandom_range(0, 100);
      game_field(a, a + $urandom_range(16, 27), $urandom_range(0, 2));
    end
    checks++;
    if (nbytes != 0) begin failures++; $display("%0d bytes sent after calibration", nbytes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
