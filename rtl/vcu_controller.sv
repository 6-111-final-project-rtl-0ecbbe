// Controller of the video capture unit. It follows the sync separator's
// active-low vertical and horizontal syncs and tells the digitizer when to
// sample a video line. After the vertical sync pulse it waits out the
// vertical blanking interval (1.388 ms), then counts lines by their
// horizontal sync pulses; on every LINE_STRIDE-th line it waits out the
// horizontal blanking (7 us), pulses `start` for one clock and waits for the
// digitizer's `done`. LINES lines are sampled per frame, which gives the
// 96-row image; when the line count reaches LAST_LINE (503) it goes back to
// wait for the next vertical sync. `line_idx` numbers the sampled line
// (0 = top) and is valid with `start`.
//
// The nine states and their printed conditions follow the original state
// diagram; the returns to WAIT_HSYNC_LOW for lines that are not sampled and
// after a sampled line, the early return on a new vertical sync, and the
// cycle counts at a 10 MHz clock are this design's choices.
// syncs are expected already synchronized to clk.
module vcu_controller #(
  parameter int VBLANK_CYC  = 13880,  // 1.388 ms at 10 MHz
  parameter int HBLANK_CYC  = 70,     // 7 us at 10 MHz
  parameter int LINE_STRIDE = 5,
  parameter int LINES       = 96,
  parameter int LAST_LINE   = 503
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       hsync_n,
  input  logic       vsync_n,
  input  logic       done,
  output logic       start,
  output logic [6:0] line_idx,
  output logic [3:0] state_o
);
  typedef enum logic [3:0] {
    INITIALIZE, WAIT_VSYNC_LOW, WAIT_VSYNC_HIGH, DELAY_VBLANK, WAIT_HSYNC_LOW,
    WAIT_HSYNC_HIGH, FP_DELAY, START_SAMPLE, WAIT_SAMPLE
  } state_e;

  state_e      state;
  logic [15:0] delay;
  logic [9:0]  count;     // lines since the end of vertical blanking
  logic [3:0]  stride;    // 0 on a line to sample
  logic [6:0]  sampled;   // lines sampled in this frame

  assign state_o = state;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= INITIALIZE;
      delay    <= '0;
      count    <= '0;
      stride   <= '0;
      sampled  <= '0;
      start    <= 1'b0;
      line_idx <= '0;
    end else begin
      start <= 1'b0;
      unique case (state)
        INITIALIZE: begin
          count   <= '0;
          stride  <= '0;
          sampled <= '0;
          state   <= WAIT_VSYNC_LOW;
        end
        WAIT_VSYNC_LOW:  if (!vsync_n) state <= WAIT_VSYNC_HIGH;
        WAIT_VSYNC_HIGH: if (vsync_n) begin
          delay   <= 16'(VBLANK_CYC - 1);
          count   <= '0;
          stride  <= '0;
          sampled <= '0;
          state   <= DELAY_VBLANK;
        end
        DELAY_VBLANK: begin
          if (delay == 0) state <= WAIT_HSYNC_LOW;
          else delay <= delay - 1'b1;
        end
        WAIT_HSYNC_LOW: begin
          if (!vsync_n)      state <= WAIT_VSYNC_HIGH;
          else if (!hsync_n) state <= WAIT_HSYNC_HIGH;
        end
        WAIT_HSYNC_HIGH: if (hsync_n) begin
          // a new line starts
          count  <= count + 1'b1;
          stride <= (stride == 4'(LINE_STRIDE - 1)) ? '0 : stride + 1'b1;
          if (stride == 0 && sampled < 7'(LINES)) begin
            delay <= 16'(HBLANK_CYC - 1);
            state <= FP_DELAY;
          end else if (count + 1'b1 >= 10'(LAST_LINE)) begin
            state <= WAIT_VSYNC_LOW;
          end else begin
            state <= WAIT_HSYNC_LOW;
          end
        end
        FP_DELAY: begin
          if (delay == 0) state <= START_SAMPLE;
          else delay <= delay - 1'b1;
        end
        START_SAMPLE: begin
          start    <= 1'b1;
          line_idx <= sampled;
          sampled  <= sampled + 1'b1;
          state    <= WAIT_SAMPLE;
        end
        WAIT_SAMPLE: if (done) begin
          if (count >= 10'(LAST_LINE)) state <= WAIT_VSYNC_LOW;
          else                         state <= WAIT_HSYNC_LOW;
        end
        default: state <= INITIALIZE;
      endcase
    end
  end
endmodule
