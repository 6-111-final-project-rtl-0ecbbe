// Testbench for calibrator with 4 lines per frame and 3 frames per phase.
// The testbench plays line buffer and video output. Phase 1 frames have
// their first dark line at 2, 1, 3 (average 2 -> shoot_low); phase 2 frames
// at 0, 1, 0 (average 0 -> shoot_high). Every line must arrive as 16 bytes
// over the request/ready handshake, rows equal to a threshold as all ones,
// and each frame must end with an end_of_frame transfer.
module tb_calibrator;
  localparam int LINES = 4, FR = 3;
  logic clk = 0, rst = 1, start = 0, vid_req = 0;
  logic [6:0] line_no = 0, shoot_low, shoot_high;
  logic [7:0] lb [16];
  logic [3:0] lb_raddr, st;
  logic [7:0] vid_data;
  logic vid_ready, eof, calib_done, phase;
  int checks = 0, failures = 0;
  calibrator #(.FRAMES_PER_PHASE(FR), .LINES(LINES)) dut (
    .clk, .rst, .start, .line_no, .lb_rdata(lb[lb_raddr]), .lb_raddr, .vid_req, .vid_ready,
    .vid_data, .end_of_frame(eof), .shoot_low, .shoot_high, .calib_done, .phase, .state_o(st));
  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic receive(output logic [7:0] d, output logic e);
    @(negedge clk) vid_req = 1;
    while (!vid_ready) @(negedge clk);
    d = vid_data; e = eof;
    vid_req = 0;
    while (vid_ready) @(negedge clk);
  endtask

  task automatic frame(input int first_dark, input int lo, input int hi);
    for (int l = 0; l < LINES; l++) begin
      logic [7:0] d; logic e;
      for (int b = 0; b < 16; b++) lb[b] = (l >= first_dark) ? 8'($urandom_range(1, 255)) : 8'h00;
      @(negedge clk) start = 1; line_no = 7'(l);
      @(negedge clk) start = 0;
      for (int b = 0; b < 16; b++) begin
        receive(d, e);
        checks += 2;
        if (e) begin failures++; $display("early end_of_frame"); end
        if (d !== ((l == lo || l == hi) ? 8'hFF : lb[b])) begin
          failures++; $display("line %0d byte %0d: %h want %h", l, b, d, (l == lo || l == hi) ? 8'hFF : lb[b]);
        end
      end
      if (l == LINES - 1) begin
        receive(d, e);
        checks++;
        if (!e) begin failures++; $display("no end_of_frame"); end
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    repeat (3) @(negedge clk);
    checks += 2;
    if (shoot_low != 7'(LINES) || shoot_high != 7'(LINES)) begin failures++; $display("start thresholds"); end
    if (calib_done) begin failures++; $display("done too early"); end
    frame(2, 96, 96); frame(1, 96, 96); frame(3, 96, 96);
    repeat (200) @(negedge clk);
    checks += 2;
    if (shoot_low != 7'd2) begin failures++; $display("shoot_low %0d want 2", shoot_low); end
    if (calib_done) begin failures++; $display("done after phase 1"); end
    frame(0, 2, 96); frame(1, 2, 96); frame(0, 2, 96);
    repeat (200) @(negedge clk);
    checks += 2;
    if (shoot_high != 7'd0) begin failures++; $display("shoot_high %0d want 0", shoot_high); end
    if (!calib_done) begin failures++; $display("calib_done low"); end
    // after calibration no more lines are sent
    @(negedge clk) start = 1; @(negedge clk) start = 0; vid_req = 1;
    repeat (100) @(negedge clk);
    checks++;
    if (vid_ready) begin failures++; $display("sent a line after calibration"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
