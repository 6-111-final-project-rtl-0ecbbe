// Line buffer of the video capture unit: 16 bytes holding one sampled video
// line at one bit per pixel (128 pixels). Byte k holds pixels 8k..8k+7, the
// leftmost pixel in bit 7. One synchronous write port (digitizer) and one
// asynchronous read port (calibrator or processor, chosen outside by addr_sel),
// like the small static RAM it stands for. Depth 16 and width 8 follow the
// original design; the read timing is this design's choice.
module line_buffer #(
  parameter int DEPTH = 16,
  parameter int W     = 8
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];
  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;
  assign rdata = mem[raddr];
endmodule
