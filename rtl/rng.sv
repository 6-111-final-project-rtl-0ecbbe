// Random number generator of the game controller. An 8-bit register in which
// one bit per clock, taken in turn (bit 0, 1, ..., 7, 0, ...), is replaced by
// its old value XOR the input `din`, a free-running clock of unrelated
// frequency (1.84 MHz against the 10 MHz system clock in the original). The
// beat between the two clocks makes the register wander over all values.
// Neither the register nor the bit pointer is reset, as in the original, so
// every power-up starts elsewhere. `rnd` is the register itself.
module rng (
  input  logic       clk,
  input  logic       din,
  output logic [7:0] rnd
);
  logic [2:0] bit_sel;
  always_ff @(posedge clk) begin
    rnd[bit_sel] <= rnd[bit_sel] ^ din;
    bit_sel      <= bit_sel + 1'b1;
  end
endmodule
