// Full-size testbench: the whole design with every parameter at its default
// (10 MHz clock, 96 sampled rows, every 5th line, 13880-clock vertical
// blanking wait, 70-clock horizontal wait, 503 counted lines). A camera model
// sends NTSC-like frames (525 lines of 635 clocks) showing a dark player in
// columns 40..63 from image row 30 down; the display RAM is modelled and the
// video chip's nfs falls 60 times a second. In calibration mode each
// frame must come out as a complete calibration picture: all 96 rows in the
// RAM, two RAM bytes per captured byte, dark exactly where the player is.
// Also checked: one picture per frame, nms high once the picture is done,
// and no calibration result after a single frame.
module tb_full_frame;
  localparam int LINE_CYC = 635, TOP = 30, PL = 40, PR = 63;
  logic clk = 0, rst = 1, hsync_n = 1, vsync_n = 1, nfs = 1;
  logic [7:0] adc = 8'd200, ram_wdata, score, health;
  logic nms, ram_we, shoot, calibrated, frame_drawn;
  logic [12:0] ram_addr;
  logic [6:0] position, shoot_low, shoot_high;
  logic [1:0] level;
  logic [2:0] major_state, game_state;
  logic [4:0] events;
  logic [7:0] ram [8192];
  int checks = 0, failures = 0, pictures = 0;
  paratroopers_top dut (
    .clk, .rst, .hsync_n, .vsync_n, .adc_data(adc), .pixel_threshold(8'd100), .rng_in(clk),
    .calib_sw(1'b1), .game_sw(1'b0), .nms, .nfs, .ram_addr, .ram_wdata, .ram_we,
    .ram_rdata(ram[ram_addr]), .position, .shoot, .calibrated, .shoot_low, .shoot_high, .score,
    .health, .level, .major_state, .game_state, .frame_drawn, .events);
  always #50 clk = ~clk;                   // 10 MHz
  always @(posedge clk) if (ram_we) ram[ram_addr] <= ram_wdata;
  always @(posedge clk) if (!rst && frame_drawn) pictures++;
  initial begin #200000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // camera: 525-line frames, vertical sync over the first 3 lines. The
  // vertical blanking wait ends 13880 clocks after vsync rises (line 3), so
  // the first line sampled is line 25.
  task automatic field();
    for (int l = 0; l < 525; l++) begin
      automatic int row = (l >= 25 && (l - 25) % 5 == 0) ? (l - 25) / 5 : -1;
      if (l == 0) vsync_n = 0;
      if (l == 3) vsync_n = 1;
      hsync_n = 0; repeat (47) @(negedge clk); hsync_n = 1;
      for (int t = 0; t < LINE_CYC - 47; t++) begin
        automatic int p = (t - 70 - 4) / 3;
        adc = (row >= TOP && row < 96 && p >= PL && p <= PR) ? 8'd30 : 8'd200;
        @(negedge clk);
      end
    end
  endtask

  initial forever begin
    repeat (166667) @(negedge clk);
    nfs = 0; repeat (300) @(negedge clk); nfs = 1;
  end

  initial begin
    for (int i = 0; i < 8192; i++) ram[i] = 8'h55;
    repeat (4) @(negedge clk); rst = 0;
    field(); field();
    checks += 3;
    if (pictures != 2) begin failures++; $display("%0d pictures after two frames", pictures); end
    if (!nms) begin failures++; $display("nms low after the picture"); end
    if (calibrated) begin failures++; $display("calibrated after one frame"); end
    for (int r = 0; r < 96; r++)
      for (int k = 0; k < 16; k++) begin
        automatic logic [7:0] want;
        if (k == 4 || k == 8) continue;    // edge bytes depend on the sampling phase
        want = (r >= TOP && k >= PL / 8 && k <= PR / 8) ? 8'hFF : 8'h00;
        checks++;
        if (ram[32*r + 2*k] != want || ram[32*r + 2*k + 1] != want) begin
          failures++;
          if (failures < 10) $display("row %0d byte %0d: %h %h want %h", r, k, ram[32*r+2*k], ram[32*r+2*k+1], want);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
