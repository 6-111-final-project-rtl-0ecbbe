// Testbench for line_buffer: random writes against a reference array, every
// address read back through the asynchronous read port.
module tb_line_buffer;
  logic clk = 0, we = 0;
  logic [3:0] waddr = 0, raddr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] ref_mem [16];
  int checks = 0, failures = 0;
  line_buffer dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int a = 0; a < 16; a++) begin
      @(negedge clk) we = 1; waddr = 4'(a); wdata = 8'(a * 17 + 3); ref_mem[a] = wdata;
    end
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 1) == 1; waddr = 4'($urandom); wdata = 8'($urandom);
      raddr = 4'($urandom);
      #1 checks++;
      if (rdata !== ref_mem[raddr]) begin failures++; $display("addr %0d got %h want %h", raddr, rdata, ref_mem[raddr]); end
      @(posedge clk); if (we) ref_mem[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
