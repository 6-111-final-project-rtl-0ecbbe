// Output generator of the video output: draws each picture into the display
// RAM that the MC6847 video chip shows (128 x 96 pixels, 2 bits per pixel,
// 32 bytes per row, 3072 bytes; leftmost pixel of a byte in bits 7:6).
//
// From START the `calib` or `game` switch picks a mode; while drawing, `nms`
// is held low so the video chip leaves the RAM alone.
//  * Calibration: request a byte of 8 one-bit pixels from the capture unit,
//    receive it, and draw it as two RAM bytes (each pixel doubled to colour
//    3), at consecutive addresses, until a transfer carries end_of_frame.
//  * Game: clear the RAM, then request sprite triples (code, x, y) from the
//    game controller. Each sprite is loaded from the sprite ROM row by row
//    and ORed into the RAM: x is a signed column, so a row covers up to three
//    bytes, each read, merged and written back; parts off screen are skipped.
//    Codes 11 and 12 draw x as three decimal digits at the bottom left and
//    bottom right. The end code finishes the picture.
// Calibration pictures stop when the switch leaves calibration mode (the
// capture unit sends nothing once calibrated).
// At the end `nms` rises and the generator waits in DISPLAY until the video
// chip has shown the picture (falling edge of `nfs`), then starts again.
// Request/ready: raise `request` while `ready` is low; when `ready` rises
// take the data and drop `request`; wait for `ready` to fall.
// RAM: `ram_we` writes `ram_wdata` at `ram_addr` at the clock edge;
// `ram_rdata` is the RAM's asynchronous read data at `ram_addr`.
//
// The modes, the states of the original state diagram, the request/ready
// protocol, the 2-bits-per-pixel layout, the pixel doubling, the shifted
// read-merge-write of sprites and the read-out positions (bytes 2851, 2879)
// follow the original design. nms low while drawing follows the text; the
// original state diagram labels the edges the other way round. The single
// RAM access per clock and the clipping rules are this design's.
module output_generator
  import para_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        calib,
  input  logic        game,
  // request/ready bus (capture unit in calibration, game controller in game)
  output logic        request,
  input  logic        ready,
  input  logic [7:0]  data,
  input  logic        end_of_frame,
  // video chip
  output logic        nms,
  input  logic        nfs,
  // display RAM
  output logic [12:0] ram_addr,
  output logic [7:0]  ram_wdata,
  output logic        ram_we,
  input  logic [7:0]  ram_rdata,
  // status
  output logic        frame_drawn,
  output logic [4:0]  state_o
);
  localparam int RAM_BYTES = SCREEN_W / 4 * SCREEN_H;   // 3072
  localparam logic [12:0] SCORE_ADDR  = 13'd2851;       // row 89, byte 3
  localparam logic [12:0] HEALTH_ADDR = 13'd2879;       // row 89, byte 31

  typedef enum logic [4:0] {
    START, REQ_PIXEL, RECV_PIXEL, DRAW_PIXEL0, DRAW_PIXEL1, DRAW_NEXT, CLEAR, REQ_OBJECT, RECV_OBJECT,
    LOAD_SPRITE, ROW_SETUP, BYTE_READ, BYTE_WRITE, TEXT_SETUP, TEXT_WRITE, DONE_WRITING, DISPLAY
  } state_e;

  state_e      state;
  logic        ready_s, nfs_s, nfs_d;
  logic [7:0]  pix;
  logic        eof;
  logic [1:0]  cnt;
  logic [7:0]  s_type, s_x, s_y;
  logic [3:0]  row;
  logic [1:0]  j;
  logic [23:0] row_bits;
  logic [7:0]  value;
  logic [1:0]  dig_no;
  logic [2:0]  dig_row;
  logic [3:0]  dig;
  logic [12:0] text_base;

  sync2 #(.W(2), .RST_VAL(2'b01)) u_sync (.clk, .rst, .d({ready, nfs}), .q({ready_s, nfs_s}));

  logic [15:0] spr_bits;
  logic [7:0]  digit_bits;
  sprite_rom u_rom (.code(s_type), .row, .bits(spr_bits), .digit(dig), .digit_row(dig_row),
                    .digit_bits);

  // pixel doubling for the calibration picture: 4 one-bit pixels -> one byte
  function automatic logic [7:0] dbl(input logic [3:0] p);
    for (int i = 0; i < 4; i++) dbl[2*i +: 2] = {2{p[i]}};
  endfunction

  // position of the current sprite byte
  logic [8:0]         y_row;
  logic signed [7:0]  col;
  logic signed [8:0]  colj;
  logic               in_screen;
  logic [7:0]         part;
  assign y_row     = 9'(s_y) + 9'(row);
  assign col       = $signed(s_x) >>> 2;
  assign colj      = 9'(col) + 9'(j);
  assign in_screen = (y_row < 9'(SCREEN_H)) && (colj >= 0) && (colj < 9'sd32);
  assign part      = row_bits[23 - 8*int'(j) -: 8];

  assign state_o = state;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= START;
      request     <= 1'b0;
      nms         <= 1'b0;
      nfs_d       <= 1'b1;
      ram_addr    <= '0;
      ram_wdata   <= '0;
      ram_we      <= 1'b0;
      pix         <= '0;
      eof         <= 1'b0;
      cnt         <= '0;
      s_type      <= '0;
      s_x         <= '0;
      s_y         <= '0;
      row         <= '0;
      j           <= '0;
      row_bits    <= '0;
      value       <= '0;
      dig_no      <= '0;
      dig_row     <= '0;
      dig         <= '0;
      text_base   <= '0;
      frame_drawn <= 1'b0;
    end else begin
      ram_we      <= 1'b0;
      frame_drawn <= 1'b0;
      nfs_d       <= nfs_s;
      unique case (state)
        START: begin
          nms      <= 1'b0;
          request  <= 1'b0;
          ram_addr <= '0;
          if (calib) state <= REQ_PIXEL;
          else if (game) state <= CLEAR;
        end
        // ---------------- calibration picture ----------------
        REQ_PIXEL: begin
          // the capture unit stops sending once calibrated: leave when the
          // switch is turned away, dropping a pending request
          if (!calib) begin
            request <= 1'b0;
            state   <= START;
          end else if (!request && !ready_s) request <= 1'b1;
          if (request && ready_s) begin
            pix     <= data;
            eof     <= end_of_frame;
            request <= 1'b0;
            state   <= RECV_PIXEL;
          end
        end
        RECV_PIXEL: state <= eof ? DONE_WRITING : DRAW_PIXEL0;
        DRAW_PIXEL0: begin
          ram_wdata <= dbl(pix[7:4]);
          ram_we    <= 1'b1;
          state     <= DRAW_PIXEL1;
        end
        DRAW_PIXEL1: begin
          ram_addr  <= ram_addr + 1'b1;
          ram_wdata <= dbl(pix[3:0]);
          ram_we    <= 1'b1;
          state     <= DRAW_NEXT;
        end
        DRAW_NEXT: begin
          ram_addr <= (ram_addr == 13'(RAM_BYTES - 1)) ? 13'd0 : ram_addr + 1'b1;
          state    <= REQ_PIXEL;
        end
        // ---------------- game picture ----------------
        CLEAR: begin
          if (!ram_we) begin
            ram_wdata <= 8'h00;
            ram_we    <= 1'b1;
          end else if (ram_addr == 13'(RAM_BYTES - 1)) begin
            cnt   <= '0;
            state <= REQ_OBJECT;
          end else begin
            ram_addr  <= ram_addr + 1'b1;
            ram_wdata <= 8'h00;
            ram_we    <= 1'b1;
          end
        end
        REQ_OBJECT: begin
          if (!request && !ready_s) request <= 1'b1;
          if (request && ready_s) begin
            request <= 1'b0;
            state   <= RECV_OBJECT;
            unique case (cnt)
              2'd0:    s_type <= data;
              2'd1:    s_x    <= data;
              default: s_y    <= data;
            endcase
          end
        end
        RECV_OBJECT: begin
          if (cnt == 2'd0 && s_type == C_END) begin
            state <= DONE_WRITING;
          end else if (cnt == 2'd2) begin
            cnt   <= '0;
            state <= LOAD_SPRITE;
          end else begin
            cnt   <= cnt + 1'b1;
            state <= REQ_OBJECT;
          end
        end
        LOAD_SPRITE: begin
          row <= '0;
          if (s_type == C_SCORE || s_type == C_HEALTH) begin
            value     <= s_x;
            text_base <= (s_type == C_SCORE) ? SCORE_ADDR : HEALTH_ADDR;
            dig_no    <= '0;
            state     <= TEXT_SETUP;
          end else begin
            state <= ROW_SETUP;
          end
        end
        ROW_SETUP: begin
          row_bits <= {spr_bits, 8'h00} >> (2 * int'(s_x[1:0]));
          j        <= '0;
          state    <= BYTE_READ;
        end
        BYTE_READ: begin
          if (in_screen && part != 8'h00) begin
            ram_addr <= {y_row[6:0], 5'b0} + 13'(colj[4:0]);
            state    <= BYTE_WRITE;
          end else if (j == 2'd2) begin
            if (row == 4'(SPRITE_H - 1)) state <= REQ_OBJECT;
            else begin row <= row + 1'b1; state <= ROW_SETUP; end
          end else begin
            j <= j + 1'b1;
          end
        end
        BYTE_WRITE: begin
          ram_wdata <= ram_rdata | part;
          ram_we    <= 1'b1;
          if (j == 2'd2) begin
            if (row == 4'(SPRITE_H - 1)) state <= REQ_OBJECT;
            else begin row <= row + 1'b1; state <= ROW_SETUP; end
          end else begin
            j     <= j + 1'b1;
            state <= BYTE_READ;
          end
        end
        TEXT_SETUP: begin
          dig     <= 4'(value % 8'd10);
          value   <= value / 8'd10;
          dig_row <= '0;
          state   <= TEXT_WRITE;
        end
        TEXT_WRITE: begin
          ram_addr  <= text_base - 13'(dig_no) + 13'(32 * int'(dig_row));
          ram_wdata <= digit_bits;
          ram_we    <= 1'b1;
          if (dig_row == 3'd6) begin
            if (dig_no == 2'd2) state <= REQ_OBJECT;
            else begin dig_no <= dig_no + 1'b1; state <= TEXT_SETUP; end
          end else begin
            dig_row <= dig_row + 1'b1;
          end
        end
        DONE_WRITING: begin
          nms         <= 1'b1;
          frame_drawn <= 1'b1;
          state       <= DISPLAY;
        end
        DISPLAY: if (nfs_d && !nfs_s) state <= START;
        default: state <= START;
      endcase
    end
  end
endmodule
