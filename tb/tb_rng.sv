// Testbench for rng: each clock exactly one bit, taken in turn, flips when
// the input is high; with a 1.84 MHz input against a 10 MHz clock the
// register must visit many different values.
module tb_rng;
  logic clk = 0, din = 0;
  logic [7:0] rnd, prev;
  int checks = 0, failures = 0;
  bit seen [256];
  int distinct = 0;
  int ptr;
  rng dut (.clk, .din, .rnd);
  always #50 clk = ~clk;          // 10 MHz
  // 1.84 MHz input: toggles 0.368 times per clock, always between clock edges
  int phase = 0;
  always @(negedge clk) begin
    phase += 368;
    if (phase >= 1000) begin phase -= 1000; din <= ~din; end
  end
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    @(posedge clk); #1;
    // the pointer is not reset: read its power-up value once
    @(negedge clk);
    #1 ptr = int'(dut.bit_sel);
    for (int i = 0; i < 20000; i++) begin
      logic [7:0] want;
      if (i > 0) @(negedge clk);
      #1;
      want = rnd;
      want[ptr] = rnd[ptr] ^ din;
      @(posedge clk); #1;
      checks++;
      if (rnd !== want) begin failures++; if (failures < 5) $display("cycle %0d rnd=%h want %h", i, rnd, want); end
      ptr = (ptr + 1) % 8;
      if (!seen[rnd]) begin seen[rnd] = 1; distinct++; end
    end
    checks++;
    if (distinct < 64) begin failures++; $display("only %0d distinct values", distinct); end
    $display("distinct values: %0d", distinct);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
