// Testbench for vcu_controller with short timings. A sync generator makes
// fields of 40 lines; the testbench answers each start with done. Checked:
// LINES starts per field with line_idx 0..LINES-1, five lines between
// starts, the horizontal delay from the rising hsync to start, and the
// vertical blanking wait from the rising vsync to the first hsync counted.
module tb_vcu_controller;
  localparam int VB = 40, HB = 6, STRIDE = 5, LINES = 4, LAST = 23, LINE_CYC = 60;
  logic clk = 0, rst = 1, hsync_n = 1, vsync_n = 1, done = 0, start;
  logic [6:0] line_idx;
  logic [3:0] st;
  int checks = 0, failures = 0;
  int cyc = 0, last_hrise = 0, vrise = 0, lines_since_start = 0, starts_in_field = 0, hs_count = 0;
  int expect_idx = 0;
  vcu_controller #(.VBLANK_CYC(VB), .HBLANK_CYC(HB), .LINE_STRIDE(STRIDE), .LINES(LINES), .LAST_LINE(LAST))
    dut (.clk, .rst, .hsync_n, .vsync_n, .done, .start, .line_idx, .state_o(st));
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // sync generator: vsync low for 3 lines, then 40 lines with hsync low for 5 cycles
  initial begin
    repeat (4) @(negedge clk); rst = 0;
    for (int f = 0; f < 4; f++) begin
      vsync_n = 0; repeat (3 * LINE_CYC) @(negedge clk); vsync_n = 1; vrise = cyc;
      starts_in_field = 0; expect_idx = 0; hs_count = 0;
      repeat (VB + 10) @(negedge clk);
      for (int l = 0; l < 40; l++) begin
        hsync_n = 0; repeat (5) @(negedge clk); hsync_n = 1; last_hrise = cyc; hs_count++;
        lines_since_start++;
        repeat (LINE_CYC - 5) @(negedge clk);
      end
      checks++;
      if (starts_in_field != LINES) begin failures++; $display("field %0d: %0d starts", f, starts_in_field); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // digitizer stand-in and checks at each start
  always @(posedge clk) if (!rst && start) begin
    checks += 3;
    if (line_idx != 7'(expect_idx)) begin failures++; $display("line_idx %0d want %0d", line_idx, expect_idx); end
    if (cyc - last_hrise < HB + 1 || cyc - last_hrise > HB + 4) begin
      failures++; $display("hblank delay %0d", cyc - last_hrise);
    end
    if (expect_idx > 0 && lines_since_start != STRIDE) begin
      failures++; $display("%0d lines between starts", lines_since_start);
    end
    if (expect_idx == 0 && hs_count != 1) begin
      failures++; $display("first sampled line is hsync %0d", hs_count);
    end
    lines_since_start = 0;
    expect_idx++;
    starts_in_field++;
    fork begin repeat (20) @(negedge clk); done = 1; @(negedge clk); done = 0; end join_none
  end
endmodule
