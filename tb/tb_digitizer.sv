// Testbench for digitizer: drives two different converter samples per pixel
// in step with the 3-clock pixel timing, so that only the average
// of the two decides each bit, and checks the 16 bytes written to the line
// buffer, their order and bit order, the single done pulse before the first
// write, start_proc after the last, line_no, and the sampling time of 384
// clocks.
module tb_digitizer;
  localparam logic [7:0] THR = 8'd100;
  logic clk = 0, rst = 1, start = 0;
  logic [6:0] line_idx = 0, line_no;
  logic [7:0] adc = 0;
  logic done, lb_we, start_proc;
  logic [3:0] lb_waddr, st;
  logic [7:0] lb_wdata;
  logic [7:0] mem [16];
  logic       dark [128];
  int checks = 0, failures = 0, cyc = 0, t_start = 0, t_done = 0, writes = 0, dones = 0, procs = 0;
  digitizer dut (.clk, .rst, .start, .line_idx, .adc_data(adc), .threshold(THR), .done, .lb_we,
                 .lb_waddr, .lb_wdata, .start_proc, .line_no, .state_o(st));
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (lb_we) begin
      mem[lb_waddr] <= lb_wdata; writes++;
      if (dones == 0) begin failures++; $display("write before done"); end
    end
    if (done) begin dones++; t_done = cyc; end
    if (start_proc) procs++;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run_line(input int lidx);
    writes = 0; dones = 0; procs = 0;
    for (int p = 0; p < 128; p++) dark[p] = ($urandom_range(0, 2) == 0) || (p >= 40 && p < 56);
    @(negedge clk) start = 1; line_idx = 7'(lidx);
    @(negedge clk) start = 0; t_start = cyc;
    for (int p = 0; p < 128; p++) begin
      // averages: dark -> 90 (below 100), light -> 110; the two samples differ
      adc = dark[p] ? 8'd140 : 8'd60;  @(negedge clk);
      adc = dark[p] ? 8'd40  : 8'd160; @(negedge clk);
      adc = 8'd0;                      @(negedge clk);
    end
    repeat (100) @(negedge clk);
    checks += 4;
    if (dones != 1) begin failures++; $display("done pulses %0d", dones); end
    if (procs != 1) begin failures++; $display("start_proc pulses %0d", procs); end
    if (writes != 16) begin failures++; $display("writes %0d", writes); end
    if (line_no != 7'(lidx)) begin failures++; $display("line_no %0d", line_no); end
    checks++;
    if (t_done - t_start < 383 || t_done - t_start > 386) begin failures++; $display("sampling took %0d clocks", t_done - t_start); end
    for (int b = 0; b < 16; b++) begin
      logic [7:0] want;
      for (int i = 0; i < 8; i++) want[7-i] = dark[8*b+i];
      checks++;
      if (mem[b] !== want) begin failures++; $display("byte %0d = %h want %h", b, mem[b], want); end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    repeat (3) @(negedge clk);
    for (int l = 0; l < 6; l++) run_line(l * 7 + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
