// Processor of the video capture unit: turns each frame of 1-bit video into
// the player's horizontal position and a shoot level.
//
// For every sampled line it walks the 16 line-buffer bytes as overlapping
// pairs (high byte = bytes k, low byte = k+1). In COMPUTE_BOUNDS an 8-pixel
// window slides across the 16 pixels of the pair; the first all-ones window
// gives a left bound, the last one a right bound (the player is assumed at
// least 8 pixels wide, so single noisy pixels are ignored). Over a frame it
// keeps the smallest left and largest right bound and the first line that
// holds any dark pixel. On the last line (TRANSMIT) it outputs
// position = (left + right) / 2 and updates the shoot level with hysteresis:
// shoot goes high when the first dark line is at or above shoot_high (a
// raised hand) and low when it is at or below shoot_low (arms down).
// Outputs hold until the next frame; `present` says whether a player was
// seen in the last frame, `frame_done` pulses when the outputs change.
// A line takes 4 + 4*15 clocks. It runs only while `enable` (calibration
// finished) is high.
//
// States, the 8-pixel window, the min/max bounds and the hysteresis follow
// the original design; the `present` flag, the position held when nobody is
// seen and the per-frame first-dark-line rule are this design's reading.
module processor #(
  parameter int LINES = 96
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       enable,
  input  logic       start,
  input  logic [6:0] line_no,
  input  logic [7:0] lb_rdata,
  output logic [3:0] lb_raddr,
  input  logic [6:0] shoot_low,
  input  logic [6:0] shoot_high,
  output logic [6:0] position,
  output logic       shoot,
  output logic       present,
  output logic       frame_done,
  output logic [3:0] state_o
);
  typedef enum logic [3:0] {
    INITIALIZE, IDLE, INIT_HIGH_BYTE, SETUP_LOW_BYTE, INIT_LOW_BYTE, COMPUTE_BOUNDS,
    SHIFT_BYTE, LOAD_ADDR_LOW_BYTE, LOAD_DATA_LOW_BYTE, TRANSMIT
  } state_e;

  state_e     state;
  logic [7:0] high_byte, low_byte;
  logic [3:0] high_addr;
  logic [6:0] cur_line;
  logic [7:0] left, right;           // 128 / 0 when nothing found yet
  logic [6:0] first_dark;
  logic       dark_seen;

  // window search over the current pair
  logic [15:0] pair;
  logic        l_found, r_found;
  logic [3:0]  l_ofs, r_ofs;
  logic [7:0]  win_left, win_right;

  assign state_o = state;
  assign pair    = {high_byte, low_byte};

  always_comb begin
    l_found = 1'b0;
    r_found = 1'b0;
    l_ofs   = '0;
    r_ofs   = '0;
    // offsets 0..7 start in the high byte; offset 8 (the low byte alone) only
    // on the last pair, where the low byte never becomes a high byte
    for (int k = 8; k >= 0; k--) begin
      if ((k < 8 || high_addr == 4'd14) && pair[15-k -: 8] == 8'hFF) begin
        l_found = 1'b1;
        l_ofs   = 4'(k);
      end
    end
    for (int k = 0; k <= 8; k++) begin
      if ((k < 8 || high_addr == 4'd14) && pair[15-k -: 8] == 8'hFF) begin
        r_found = 1'b1;
        r_ofs   = 4'(k);
      end
    end
    win_left  = {1'b0, high_addr, 3'b000} + 8'(l_ofs);
    win_right = {1'b0, high_addr, 3'b000} + 8'(r_ofs) + 8'd7;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= INITIALIZE;
      high_byte  <= '0;
      low_byte   <= '0;
      high_addr  <= '0;
      lb_raddr   <= '0;
      cur_line   <= '0;
      left       <= 8'd128;
      right      <= 8'd0;
      first_dark <= '0;
      dark_seen  <= 1'b0;
      position   <= 7'd64;
      shoot      <= 1'b0;
      present    <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      unique case (state)
        INITIALIZE: state <= IDLE;
        IDLE: begin
          lb_raddr  <= 4'h0;
          high_addr <= 4'h0;
          if (start && enable) begin
            cur_line <= line_no;
            state    <= INIT_HIGH_BYTE;
          end
        end
        INIT_HIGH_BYTE: begin high_byte <= lb_rdata; state <= SETUP_LOW_BYTE; end
        SETUP_LOW_BYTE: begin lb_raddr <= 4'h1;        state <= INIT_LOW_BYTE;  end
        INIT_LOW_BYTE:  begin low_byte <= lb_rdata;    state <= COMPUTE_BOUNDS; end
        COMPUTE_BOUNDS: begin
          if (pair != '0 && !dark_seen) begin
            dark_seen  <= 1'b1;
            first_dark <= cur_line;
          end
          if (l_found && win_left < left)   left  <= win_left;
          if (r_found && win_right > right) right <= win_right;
          state <= SHIFT_BYTE;
        end
        SHIFT_BYTE: begin
          high_byte <= low_byte;
          high_addr <= lb_raddr;
          if (lb_raddr == 4'hF)
            state <= (cur_line == 7'(LINES - 1)) ? TRANSMIT : IDLE;
          else
            state <= LOAD_ADDR_LOW_BYTE;
        end
        LOAD_ADDR_LOW_BYTE: begin lb_raddr <= lb_raddr + 1'b1; state <= LOAD_DATA_LOW_BYTE; end
        LOAD_DATA_LOW_BYTE: begin low_byte <= lb_rdata;        state <= COMPUTE_BOUNDS;     end
        TRANSMIT: begin
          if (left != 8'd128) begin
            position <= 7'((9'(left) + 9'(right)) >> 1);
            present  <= 1'b1;
          end else begin
            present  <= 1'b0;
          end
          if (dark_seen) begin
            if (first_dark <= shoot_high)     shoot <= 1'b1;
            else if (first_dark >= shoot_low) shoot <= 1'b0;
          end else begin
            shoot <= 1'b0;
          end
          left       <= 8'd128;
          right      <= 8'd0;
          dark_seen  <= 1'b0;
          frame_done <= 1'b1;
          state      <= IDLE;
        end
        default: state <= INITIALIZE;
      endcase
    end
  end
endmodule
