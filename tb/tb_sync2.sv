// Testbench for sync2: the output must follow the input exactly two clock
// edges later, and hold the reset value during reset.
module tb_sync2;
  logic clk = 0, rst = 1;
  logic [2:0] d, q;
  int checks = 0, failures = 0;
  logic [2:0] hist [3];
  sync2 #(.W(3), .RST_VAL(3'b101)) dut (.clk, .rst, .d, .q);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    d = 3'b000;
    repeat (3) @(posedge clk);
    #1 checks++; if (q !== 3'b101) begin failures++; $display("reset value %b", q); end
    rst = 0;
    hist = '{default: 3'b000};
    for (int i = 0; i < 200; i++) begin
      @(negedge clk) d = 3'($urandom);
      @(posedge clk); #1;
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = d;
      if (i >= 2) begin
        checks++;
        if (q !== hist[1]) begin failures++; $display("cycle %0d q=%b want %b", i, q, hist[1]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
