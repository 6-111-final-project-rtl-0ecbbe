// Object RAM of the game controller: 32 words of 22 bits. Words 0..7 hold
// helicopters (para_pkg::heli_t), words 8..31 bombs and paratroopers
// (para_pkg::obj_t). Each section is kept packed, so its valid entries sit
// at its lowest addresses and a count says how many there are. One port:
// writes at the clock edge, reads asynchronously. The split into two
// sections follows the original design; the sizes and read timing are this
// design's choice.
module object_ram #(
  parameter int DEPTH = para_pkg::RAM_DEPTH,
  parameter int W     = para_pkg::WORD_W
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];
  always_ff @(posedge clk) if (we) mem[addr] <= wdata;
  assign rdata = mem[addr];
endmodule
