// Two-flop synchronizer for signals that arrive from another clock domain
// (the sync separator, and the request/ready wires between the three units,
// which in the original system ran on separate kits with separate clocks).
// Output follows the input two clock edges later. Reset value is RST_VAL.
module sync2 #(
  parameter int          W       = 1,
  parameter logic [W-1:0] RST_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;
  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= RST_VAL;
      q    <= RST_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
