// Testbench for object_ram: random writes and reads against a reference
// array over all 32 words.
module tb_object_ram;
  logic clk = 0, we = 0;
  logic [4:0] addr = 0;
  logic [21:0] wdata = 0, rdata;
  logic [21:0] ref_mem [32];
  int checks = 0, failures = 0;
  object_ram dut (.clk, .we, .addr, .wdata, .rdata);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int a = 0; a < 32; a++) begin
      @(negedge clk) we = 1; addr = 5'(a); wdata = 22'($urandom); ref_mem[a] = wdata;
    end
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      we = ($urandom_range(0, 2) == 0); addr = 5'($urandom); wdata = 22'($urandom);
      #1 checks++;
      if (rdata !== ref_mem[addr]) begin failures++; $display("addr %0d got %h want %h", addr, rdata, ref_mem[addr]); end
      @(posedge clk); if (we) ref_mem[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
