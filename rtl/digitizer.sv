// Digitizer of the video capture unit. On `start` it reads PIXELS pixels
// from the flash converter, two samples per pixel (SAMPLE1, SAMPLE2), and in
// STORE_BITS compares the average of the two with `threshold`: a pixel darker
// than the threshold (a person in front of the light background) becomes 1.
// When all pixels are in, it pulses `done` at once, so that the controller
// can look for the next horizontal sync, and then writes the 16 bytes into
// the line buffer through WRITE1 (address and data), WRITE2 (write enable),
// WRITE3 (release) and INCR_ADDR. After the last byte it pulses `start_proc`
// for the calibrator and processor, with `line_no` naming the line.
// A line takes 3 clocks per pixel (384 at 128 pixels) plus 4 per byte.
//
// States and the two-sample average follow the original design; which of
// dark/light is 1 and the bit order (leftmost pixel in bit 7 of byte 0) are
// this design's reading.
module digitizer #(
  parameter int PIXELS = 128
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [6:0] line_idx,
  input  logic [7:0] adc_data,
  input  logic [7:0] threshold,
  output logic       done,
  output logic       lb_we,
  output logic [3:0] lb_waddr,
  output logic [7:0] lb_wdata,
  output logic       start_proc,
  output logic [6:0] line_no,
  output logic [3:0] state_o
);
  localparam int BYTES = PIXELS / 8;

  typedef enum logic [3:0] {
    INITIALIZE, IDLE, SAMPLE1, SAMPLE2, STORE_BITS, WRITE1, WRITE2, WRITE3, INCR_ADDR
  } state_e;

  state_e            state;
  logic [7:0]        s1, s2;
  logic [PIXELS-1:0] bits;
  logic [7:0]        pix_cnt;
  logic [3:0]        byte_cnt;
  logic [8:0]        sum;

  assign state_o = state;
  assign sum     = {1'b0, s1} + {1'b0, s2};

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= INITIALIZE;
      s1         <= '0;
      s2         <= '0;
      bits       <= '0;
      pix_cnt    <= '0;
      byte_cnt   <= '0;
      done       <= 1'b0;
      lb_we      <= 1'b0;
      lb_waddr   <= '0;
      lb_wdata   <= '0;
      start_proc <= 1'b0;
      line_no    <= '0;
    end else begin
      done       <= 1'b0;
      start_proc <= 1'b0;
      unique case (state)
        INITIALIZE: state <= IDLE;
        IDLE: if (start) begin
          pix_cnt <= '0;
          line_no <= line_idx;
          state   <= SAMPLE1;
        end
        SAMPLE1: begin s1 <= adc_data; state <= SAMPLE2;    end
        SAMPLE2: begin s2 <= adc_data; state <= STORE_BITS; end
        STORE_BITS: begin
          bits    <= {bits[PIXELS-2:0], (sum[8:1] < threshold)};
          pix_cnt <= pix_cnt + 1'b1;
          if (pix_cnt == 8'(PIXELS - 1)) begin
            byte_cnt <= '0;
            done     <= 1'b1;
            state    <= WRITE1;
          end else begin
            state <= SAMPLE1;
          end
        end
        WRITE1: begin
          lb_waddr <= byte_cnt;
          lb_wdata <= bits[PIXELS-1 - 8*byte_cnt -: 8];
          state    <= WRITE2;
        end
        WRITE2: begin lb_we <= 1'b1; state <= WRITE3; end
        WRITE3: begin lb_we <= 1'b0; state <= INCR_ADDR; end
        INCR_ADDR: begin
          if (byte_cnt == 4'(BYTES - 1)) begin
            start_proc <= 1'b1;
            state      <= IDLE;
          end else begin
            byte_cnt <= byte_cnt + 1'b1;
            state    <= WRITE1;
          end
        end
        default: state <= INITIALIZE;
      endcase
    end
  end
endmodule
