// Update machine of the game controller: advances the game by one frame.
//  1. Bullets (registers): each live bullet climbs one row per frame whatever
//     the level, and disappears above row 0. If the shoot register is set, a
//     new bullet starts just above the gun in the first free register, and
//     the shoot register is cleared.
//  2. Helicopters (RAM words 0..7): an exploding one counts its 15 frames down
//     and is then removed; a live one moves one column on a move frame and is
//     removed when it has left the screen. Each carries the distance it still
//     has to fly before its next drop; at zero it drops a bomb (probability
//     3/8) or a paratrooper (5/8) below itself, if it is on screen, and takes
//     a new random distance.
//  3. New helicopters: for each direction, a new one enters once the previous
//     one in that direction has flown a random distance (MIN_GAP plus 0..63).
//  4. Objects (RAM words 8..31): exploding ones count down and are removed;
//     live ones fall one row on a move frame, down to the ground row.
// Move frames depend on the level: every (LEVELS - level)-th frame.
// Removing an entry copies the last entry of its section over it and shrinks
// the count, so each section stays packed at its low addresses; the copied
// entry is then examined in turn.
// `kill_valid` with `kill_mask` (from the check machine) empties bullets at
// once. `new_game` empties everything.
//
// What is updated, the 3/8 bomb probability, the random gaps and drop points,
// the speed set by the level and the 15-frame explosions follow the original
// design. The drop point kept as a remaining distance, the gap rule, the
// speed formula and the packing by copying the last entry are this design's.
module update_fsm
  import para_pkg::*;
#(
  parameter int MIN_GAP = 24
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          new_game,
  input  logic          start,
  output logic          done,
  input  logic [1:0]    level,
  input  logic [7:0]    rnd,
  input  logic          shot,
  output logic          shot_clr,
  input  logic [6:0]    gun_x,
  input  logic          kill_valid,
  input  logic [NUM_BULLETS-1:0] kill_mask,
  output logic [4:0]    numheli,
  output logic [4:0]    numobject,
  output bullet_t       bullets [NUM_BULLETS],
  output logic [4:0]    ram_addr,
  output logic          ram_we,
  output word_t         ram_wdata,
  input  word_t         ram_rdata,
  // event counters for tests and read-out
  output logic          ev_heli_new,
  output logic          ev_drop,
  output logic          ev_remove
);
  typedef enum logic [3:0] {
    U_IDLE, U_BUL, U_HELI, U_DROP, U_RM_RD, U_RM_WR, U_NEW0, U_NEW1, U_OBJ, U_DONE
  } state_e;

  state_e     state, ret_state;
  logic [4:0] idx;
  logic       sec;              // section being packed: 0 helis, 1 objects
  logic       step;             // this frame moves the sprites
  logic [1:0] move_cnt;
  logic [7:0] gap    [2];
  logic [7:0] target [2];
  word_t      tmp;
  obj_t       drop_obj;

  heli_t h, h_new;
  obj_t  o, o_new;
  assign h = heli_t'(ram_rdata);
  assign o = obj_t'(ram_rdata);

  // decisions for the helicopter at idx
  logic              h_remove, h_drop;
  logic signed [8:0] hx;
  always_comb begin
    h_new    = h;
    h_remove = 1'b0;
    h_drop   = 1'b0;
    hx       = h.dir ? h.x + 9'sd1 : h.x - 9'sd1;
    if (h.exploded) begin
      if (h.timer <= 4'd1) h_remove = 1'b1;
      else h_new.timer = h.timer - 1'b1;
    end else if (step) begin
      h_new.x = hx;
      if (hx < -9'sd16 || hx > 9'sd127) h_remove = 1'b1;
      else if (h.drop_dist <= 7'd1) begin
        h_new.drop_dist = 7'd16 + 7'(rnd[5:0]);
        h_drop = (hx >= 9'sd0) && (hx <= 9'sd112) && (numobject < 5'(OBJ_SLOTS));
      end else begin
        h_new.drop_dist = h.drop_dist - 1'b1;
      end
    end
  end

  // decisions for the object at idx
  logic o_remove;
  always_comb begin
    o_new    = o;
    o_remove = 1'b0;
    if (o.exploded) begin
      if (o.timer <= 4'd1) o_remove = 1'b1;
      else o_new.timer = o.timer - 1'b1;
    end else if (step && o.y < 7'(GROUND_Y)) begin
      o_new.y = o.y + 1'b1;
    end
  end

  logic [4:0] cnt_sec, base_sec;
  assign cnt_sec  = sec ? numobject : numheli;
  assign base_sec = sec ? 5'(FIRST_OBJECT) : 5'd0;

  // a new helicopter entering from the side picked by the state
  heli_t nh;
  always_comb begin
    nh.exploded  = 1'b0;
    nh.timer     = '0;
    nh.dir       = (state == U_NEW1);
    nh.x         = (state == U_NEW1) ? -9'sd15 : 9'sd127;
    nh.drop_dist = 7'd8 + 7'(rnd[5:0]);
  end

  // RAM port
  always_comb begin
    ram_addr  = idx;
    ram_we    = 1'b0;
    ram_wdata = ram_rdata;
    unique case (state)
      U_HELI: begin
        ram_addr  = idx;
        ram_we    = (idx < numheli) && !h_remove;
        ram_wdata = word_t'(h_new);
      end
      U_DROP: begin
        ram_addr  = 5'(FIRST_OBJECT) + numobject;
        ram_we    = 1'b1;
        ram_wdata = word_t'(drop_obj);
      end
      U_RM_RD: ram_addr = base_sec + cnt_sec - 1'b1;
      U_RM_WR: begin
        ram_addr  = base_sec + idx;
        ram_we    = 1'b1;
        ram_wdata = tmp;
      end
      U_NEW0, U_NEW1: begin
        ram_addr  = numheli;
        ram_we    = (gap[state == U_NEW1] >= target[state == U_NEW1]) && (numheli < 5'(HELI_SLOTS));
        ram_wdata = word_t'(nh);
      end
      U_OBJ: begin
        ram_addr  = 5'(FIRST_OBJECT) + idx;
        ram_we    = (idx < numobject) && !o_remove;
        ram_wdata = word_t'(o_new);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst || new_game) begin
      state       <= U_IDLE;
      ret_state   <= U_IDLE;
      idx         <= '0;
      sec         <= 1'b0;
      step        <= 1'b0;
      move_cnt    <= '0;
      gap         <= '{default: 8'd0};
      target      <= '{default: 8'd16};
      tmp         <= '0;
      drop_obj    <= '0;
      numheli     <= '0;
      numobject   <= '0;
      bullets     <= '{default: bullet_t'{x: 7'd0, y: BULLET_NONE}};
      done        <= 1'b0;
      shot_clr    <= 1'b0;
      ev_heli_new <= 1'b0;
      ev_drop     <= 1'b0;
      ev_remove   <= 1'b0;
    end else begin
      done        <= 1'b0;
      shot_clr    <= 1'b0;
      ev_heli_new <= 1'b0;
      ev_drop     <= 1'b0;
      ev_remove   <= 1'b0;
      if (kill_valid)
        for (int b = 0; b < NUM_BULLETS; b++)
          if (kill_mask[b]) bullets[b].y <= BULLET_NONE;
      unique case (state)
        U_IDLE: if (start) state <= U_BUL;
        U_BUL: begin
          logic placed;
          placed = 1'b0;
          step     <= (move_cnt == 0);
          move_cnt <= (move_cnt == 0) ? 2'(LEVELS - 1 - int'(level)) : move_cnt - 1'b1;
          if (move_cnt == 0)
            for (int d = 0; d < 2; d++) if (gap[d] != 8'hFF) gap[d] <= gap[d] + 1'b1;
          for (int b = 0; b < NUM_BULLETS; b++) begin
            if (bullets[b].y != BULLET_NONE) begin
              bullets[b].y <= (bullets[b].y == 0) ? BULLET_NONE : bullets[b].y - 1'b1;
            end else if (shot && !placed) begin
              placed = 1'b1;
              bullets[b] <= '{x: gun_x, y: 7'(GUN_Y - 1)};
            end
          end
          if (shot) shot_clr <= 1'b1;
          idx   <= '0;
          sec   <= 1'b0;
          state <= U_HELI;
        end
        U_HELI: begin
          if (idx >= numheli) begin
            state <= U_NEW0;
          end else if (h_remove) begin
            ev_remove <= 1'b1;
            if (idx == numheli - 1'b1) begin
              numheli <= numheli - 1'b1;
            end else begin
              ret_state <= U_HELI;
              state     <= U_RM_RD;
            end
          end else if (h_drop) begin
            drop_obj <= '{exploded: 1'b0, timer: 4'd0, is_bomb: (rnd[2:0] < 3'd3), pad: 2'b00,
                          x: 7'(hx + 9'sd4),
                          y: 7'((h.dir ? HELI_Y_R : HELI_Y_L) + DROP_OFS)};
            state    <= U_DROP;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        U_DROP: begin
          numobject <= numobject + 1'b1;
          ev_drop   <= 1'b1;
          idx       <= idx + 1'b1;
          state     <= U_HELI;
        end
        U_RM_RD: begin
          tmp   <= ram_rdata;
          state <= U_RM_WR;
        end
        U_RM_WR: begin
          if (sec) numobject <= numobject - 1'b1;
          else     numheli   <= numheli - 1'b1;
          state <= ret_state;
        end
        U_NEW0, U_NEW1: begin
          if (ram_we) begin
            numheli     <= numheli + 1'b1;
            ev_heli_new <= 1'b1;
            gap[state == U_NEW1]    <= '0;
            target[state == U_NEW1] <= 8'(MIN_GAP) + 8'(rnd[5:0]);
          end
          if (state == U_NEW0) state <= U_NEW1;
          else begin
            idx   <= '0;
            sec   <= 1'b1;
            state <= U_OBJ;
          end
        end
        U_OBJ: begin
          if (idx >= numobject) begin
            state <= U_DONE;
          end else if (o_remove) begin
            ev_remove <= 1'b1;
            if (idx == numobject - 1'b1) begin
              numobject <= numobject - 1'b1;
            end else begin
              ret_state <= U_OBJ;
              state     <= U_RM_RD;
            end
          end else begin
            idx <= idx + 1'b1;
          end
        end
        U_DONE: begin
          done  <= 1'b1;
          state <= U_IDLE;
        end
        default: state <= U_IDLE;
      endcase
    end
  end
endmodule
