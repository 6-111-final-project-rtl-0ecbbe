// Calibrator of the video capture unit. It finds the two shoot thresholds of
// the player: shoot_low, the top row of the player standing with arms down
// (first phase), and shoot_high, the top row with a hand raised (second
// phase). Each phase lasts FRAMES_PER_PHASE frames. For every sampled line
// (`start` from the digitizer) it loads the 16 bytes of the line buffer into
// a 128-bit register (LOAD_LINE); in CALIBRATE it notes the first line of the
// frame with any dark pixel. At the end of each frame that line number (96 if
// the frame had none) is added to a sum; at the end of a phase the sum is
// divided by the frame count (DIVIDE, by repeated subtraction) to give the
// threshold, which starts at 96, the bottom of the screen.
//
// Every line is also sent to the video output so the player can see the
// calibration: WAIT_VID_REQ waits for the request, SETUP_DATA puts one byte
// on vid_data (all ones on the rows equal to a threshold, so they show as
// lines) and raises vid_ready, VERIFY_TRANSMIT waits for the request to fall
// and lowers vid_ready. After the 16 bytes of the last line one more transfer
// carries end_of_frame. When both phases are over, calib_done rises and stays
// (it hands the line buffer to the processor).
//
// States, the 96 start value, the per-line display with marked thresholds
// and the handshake follow the original design. The averaging by an explicit
// divide state, the extra end-of-frame transfer and FRAMES_PER_PHASE = 750
// (5 s of fields) are this design's choices. vid_req must be synchronized.
module calibrator #(
  parameter int FRAMES_PER_PHASE = 750,
  parameter int LINES            = 96
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [6:0] line_no,
  input  logic [7:0] lb_rdata,
  output logic [3:0] lb_raddr,
  input  logic       vid_req,
  output logic       vid_ready,
  output logic [7:0] vid_data,
  output logic       end_of_frame,
  output logic [6:0] shoot_low,
  output logic [6:0] shoot_high,
  output logic       calib_done,
  output logic       phase,
  output logic [3:0] state_o
);
  typedef enum logic [3:0] {
    INITIALIZE, IDLE, LOAD_LINE, CALIBRATE, WAIT_VID_REQ, SETUP_DATA, VERIFY_TRANSMIT, DIVIDE
  } state_e;

  state_e       state;
  logic [127:0] line_reg;
  logic [4:0]   byte_cnt;
  logic [4:0]   tx_cnt;
  logic [6:0]   cur_line;
  logic [6:0]   first_dark;
  logic [15:0]  frame_cnt;
  logic [23:0]  sum;
  logic [6:0]   quot;
  logic         eof_pending;

  assign state_o  = state;
  assign lb_raddr = byte_cnt[3:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= INITIALIZE;
      line_reg     <= '0;
      byte_cnt     <= '0;
      tx_cnt       <= '0;
      cur_line     <= '0;
      first_dark   <= 7'(LINES);
      frame_cnt    <= '0;
      sum          <= '0;
      quot         <= '0;
      eof_pending  <= 1'b0;
      vid_ready    <= 1'b0;
      vid_data     <= '0;
      end_of_frame <= 1'b0;
      shoot_low    <= 7'(LINES);
      shoot_high   <= 7'(LINES);
      calib_done   <= 1'b0;
      phase        <= 1'b0;
    end else begin
      unique case (state)
        INITIALIZE: state <= IDLE;
        IDLE: if (start && !calib_done) begin
          cur_line <= line_no;
          byte_cnt <= '0;
          state    <= LOAD_LINE;
        end
        LOAD_LINE: begin
          line_reg[127 - 8*byte_cnt[3:0] -: 8] <= lb_rdata;
          byte_cnt <= byte_cnt + 1'b1;
          if (byte_cnt == 5'd15) state <= CALIBRATE;
        end
        CALIBRATE: begin
          if (line_reg != '0 && first_dark == 7'(LINES)) first_dark <= cur_line;
          tx_cnt <= '0;
          state  <= WAIT_VID_REQ;
        end
        WAIT_VID_REQ: if (vid_req) state <= SETUP_DATA;
        SETUP_DATA: begin
          if (eof_pending) begin
            vid_data     <= '0;
            end_of_frame <= 1'b1;
          end else if (cur_line == shoot_low || cur_line == shoot_high) begin
            vid_data <= 8'hFF;
          end else begin
            vid_data <= line_reg[127 - 8*tx_cnt[3:0] -: 8];
          end
          vid_ready <= 1'b1;
          state     <= VERIFY_TRANSMIT;
        end
        VERIFY_TRANSMIT: if (!vid_req) begin
          vid_ready    <= 1'b0;
          end_of_frame <= 1'b0;
          if (eof_pending) begin
            eof_pending <= 1'b0;
            state       <= IDLE;
          end else if (tx_cnt == 5'd15) begin
            if (cur_line == 7'(LINES - 1)) begin
              // frame complete: account it
              sum        <= sum + 24'(first_dark);
              first_dark <= 7'(LINES);
              frame_cnt  <= frame_cnt + 1'b1;
              eof_pending <= 1'b1;
              state      <= (frame_cnt == 16'(FRAMES_PER_PHASE - 1)) ? DIVIDE : WAIT_VID_REQ;
              quot       <= '0;
            end else begin
              state <= IDLE;
            end
          end else begin
            tx_cnt <= tx_cnt + 1'b1;
            state  <= WAIT_VID_REQ;
          end
        end
        DIVIDE: begin
          if (sum >= 24'(FRAMES_PER_PHASE)) begin
            sum  <= sum - 24'(FRAMES_PER_PHASE);
            quot <= quot + 1'b1;
          end else begin
            if (!phase) shoot_low  <= quot;
            else        shoot_high <= quot;
            if (phase) calib_done <= 1'b1;
            phase     <= 1'b1;
            sum       <= '0;
            frame_cnt <= '0;
            state     <= WAIT_VID_REQ;   // still owes the end-of-frame transfer
          end
        end
        default: state <= INITIALIZE;
      endcase
    end
  end

  // handshake rules on the sending side: once offered, a byte stays on the
  // bus with vid_ready high until the receiver drops vid_req
  a_hold_ready: assert property (@(posedge clk) disable iff (rst) vid_ready && vid_req |=> vid_ready);
  a_hold_data:  assert property (@(posedge clk) disable iff (rst) vid_ready && vid_req |=> $stable(vid_data));
endmodule
