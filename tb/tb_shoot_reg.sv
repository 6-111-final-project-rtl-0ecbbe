// Testbench for shoot_reg: set once per rising edge of the level, held until
// cleared, not set again while the level stays high.
module tb_shoot_reg;
  logic clk = 0, rst = 1, lvl = 0, clr = 0, pending;
  int checks = 0, failures = 0;
  shoot_reg dut (.clk, .rst, .shoot_lvl(lvl), .clr, .pending);
  always #5 clk = ~clk;
  task automatic expect_p(input logic v, input string what);
    checks++;
    if (pending !== v) begin failures++; $display("%s: pending=%b want %b", what, pending, v); end
  endtask
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (3) @(posedge clk); @(negedge clk) rst = 0;
    repeat (5) @(negedge clk); expect_p(0, "idle");
    lvl = 1; repeat (5) @(negedge clk); expect_p(1, "after rise");
    clr = 1; @(negedge clk) clr = 0; expect_p(0, "after clear");
    repeat (10) @(negedge clk); expect_p(0, "level held high");
    lvl = 0; repeat (5) @(negedge clk); expect_p(0, "after fall");
    for (int k = 0; k < 10; k++) begin
      lvl = 1; repeat (4) @(negedge clk); expect_p(1, "rise again");
      repeat (3) @(negedge clk); expect_p(1, "held without clear");
      clr = 1; @(negedge clk) clr = 0; expect_p(0, "cleared");
      lvl = 0; repeat (4) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
