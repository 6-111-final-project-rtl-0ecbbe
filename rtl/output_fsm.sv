// Output machine of the game controller: sends the current frame to the
// video output over the request/ready bus. Each sprite is three bytes: its
// code, its x and its y (para_pkg::code_e). Order: the gun as two halves
// around the player position, the bombs and paratroopers, the helicopters
// (two halves each, mirrored when flying right, two explosion halves when
// hit), the bullets, the score (or level) and health read-outs, then the
// single byte END_CODE, which no other byte of a frame can equal in the
// code position, so the receiver re-aligns within one frame.
//
// Handshake per byte, as in the original: wait for `req` high, drive `bus`
// and raise `ready`; wait for `req` low, drop `ready`. `req` must be
// synchronized. `done` pulses after END_CODE has been taken.
// Codes, halves, offsets (gun at position-7 and +1, explosions at x-4 and
// x+4) and the order gun/objects/helicopters/bullets follow the original;
// the read-out sprites are this design's addition.
module output_fsm
  import para_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output logic          done,
  output logic          busy,
  input  logic [6:0]    gun_x,
  input  logic [4:0]    numheli,
  input  logic [4:0]    numobject,
  input  bullet_t       bullets [NUM_BULLETS],
  input  logic [7:0]    number,
  input  logic [7:0]    health,
  output logic [4:0]    ram_addr,
  input  word_t         ram_rdata,
  input  logic          req,
  output logic          ready,
  output logic [7:0]    bus
);
  typedef enum logic [3:0] {
    P_GUN1, P_GUN2, P_OBJ, P_HELI, P_BUL, P_SCORE, P_HEALTH, P_END, P_DONE
  } part_e;
  typedef enum logic [2:0] {S_IDLE, S_ITEM, S_TX_REQ, S_TX_ACK, S_NEXT} state_e;

  state_e     state;
  part_e      part;
  logic [4:0] idx;
  logic       half;
  logic [1:0] byte_no;
  logic [7:0] tri_b [3];

  // item at (part, idx, half)
  logic       emit;          // the item exists
  logic       two_halves;    // the current entry has a second half
  logic [7:0] it_code, it_x, it_y;
  heli_t      h;
  obj_t       o;

  assign h        = heli_t'(ram_rdata);
  assign o        = obj_t'(ram_rdata);
  assign ram_addr = (part == P_OBJ) ? 5'(FIRST_OBJECT) + idx : idx;
  assign busy     = (state != S_IDLE);

  always_comb begin
    emit       = 1'b0;
    two_halves = 1'b0;
    it_code    = '0;
    it_x       = '0;
    it_y       = '0;
    unique case (part)
      P_GUN1: begin emit = 1'b1; it_code = C_GUN1; it_x = {1'b0, gun_x} - 8'd7; it_y = 8'(GUN_Y); end
      P_GUN2: begin emit = 1'b1; it_code = C_GUN2; it_x = {1'b0, gun_x} + 8'd1; it_y = 8'(GUN_Y); end
      P_OBJ: if (idx < numobject) begin
        emit = 1'b1;
        it_y = {1'b0, o.y};
        if (o.exploded) begin
          two_halves = 1'b1;
          it_code    = half ? C_EXPLODE2 : C_EXPLODE1;
          it_x       = half ? {1'b0, o.x} + 8'd4 : {1'b0, o.x} - 8'd4;
        end else begin
          it_code = o.is_bomb ? C_BOMB : C_TROOPER;
          it_x    = {1'b0, o.x};
        end
      end
      P_HELI: if (idx < numheli) begin
        emit       = 1'b1;
        two_halves = 1'b1;
        it_y       = h.dir ? 8'(HELI_Y_R) : 8'(HELI_Y_L);
        it_x       = 8'(h.x) + (half ? 8'd8 : 8'd0);
        if (h.exploded)  it_code = half ? C_EXPLODE2 : C_EXPLODE1;
        else if (!h.dir) it_code = half ? C_HELI2 : C_HELI1;
        else             it_code = half ? C_HELI1REV : C_HELI2REV;
      end
      P_BUL: if (idx < 5'(NUM_BULLETS) && bullets[idx[1:0]].y != BULLET_NONE) begin
        emit    = 1'b1;
        it_code = C_BULLET;
        it_x    = {1'b0, bullets[idx[1:0]].x};
        it_y    = {1'b0, bullets[idx[1:0]].y};
      end
      P_SCORE:  begin emit = 1'b1; it_code = C_SCORE;  it_x = number; end
      P_HEALTH: begin emit = 1'b1; it_code = C_HEALTH; it_x = health; end
      P_END:    begin emit = 1'b1; it_code = C_END; end
      default:  ;
    endcase
  end

  // is there anything left in the current list part?
  logic more;
  always_comb begin
    unique case (part)
      P_OBJ:   more = idx < numobject;
      P_HELI:  more = idx < numheli;
      P_BUL:   more = idx < 5'(NUM_BULLETS);
      default: more = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      part    <= P_GUN1;
      idx     <= '0;
      half    <= 1'b0;
      byte_no <= '0;
      tri_b   <= '{default: '0};
      ready   <= 1'b0;
      bus     <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          part  <= P_GUN1;
          idx   <= '0;
          half  <= 1'b0;
          state <= S_ITEM;
        end
        S_ITEM: begin
          if (part == P_DONE) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else if (emit) begin
            tri_b   <= '{it_code, it_x, it_y};
            byte_no <= '0;
            state   <= S_TX_REQ;
          end else begin
            state <= S_NEXT;        // empty bullet register or end of a list
          end
        end
        S_TX_REQ: if (req) begin
          bus   <= tri_b[byte_no];
          ready <= 1'b1;
          state <= S_TX_ACK;
        end
        S_TX_ACK: if (!req) begin
          ready <= 1'b0;
          if (part == P_END || byte_no == 2'd2) state <= S_NEXT;
          else begin
            byte_no <= byte_no + 1'b1;
            state   <= S_TX_REQ;
          end
        end
        S_NEXT: begin
          state <= S_ITEM;
          if (two_halves && !half) begin
            half <= 1'b1;
          end else if ((part == P_OBJ || part == P_HELI || part == P_BUL) && more) begin
            half <= 1'b0;
            idx  <= idx + 1'b1;
          end else begin
            half <= 1'b0;
            idx  <= '0;
            part <= part_e'(part + 1'b1);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // handshake rules on the sending side: once offered, a byte stays on the
  // bus with ready high until the receiver drops req
  a_hold_ready: assert property (@(posedge clk) disable iff (rst) ready && req |=> ready);
  a_hold_data:  assert property (@(posedge clk) disable iff (rst) ready && req |=> $stable(bus));
endmodule
